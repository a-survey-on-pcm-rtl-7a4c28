// nbols_error_calc: error pattern calculator of the non-binary OLS decoder.
//
// One-step majority-logic decoding: for every data symbol j it selects the
// 2t syndrome symbols s_i with h(i, j) = 1 (one from each check group, see
// nbols_pkg) and feeds them to a digit-majority circuit, which returns the
// error magnitude e_j, or 0 when symbol j is correct. Because H satisfies the
// row-column constraint, the 2t checks of symbol j share no other data symbol,
// so up to t errors elsewhere can spoil at most t of them. All k symbols are
// handled in parallel. Check symbols are not corrected: only the information
// symbols leave the decoder, as in the document's decoder.
//
// Interface: syndrome_i[i] is syndrome symbol i; err_o[j] is e_j.
// Timing: purely combinational; the selection is wiring only.
module nbols_error_calc
  import nbols_pkg::*;
#(
  parameter  int unsigned K = DEF_K,
  parameter  int unsigned T = DEF_T,
  parameter  int unsigned B = DEF_B,
  localparam int unsigned M = isqrt(K),
  localparam int unsigned R = 2 * T * M
) (
  input  logic [R-1:0][B-1:0] syndrome_i,
  output logic [K-1:0][B-1:0] err_o
);

  for (genvar j = 0; j < K; j++) begin : g_sym
    logic [2*T-1:0][B-1:0] s_j;
    logic [B-1:0]          e_j;
    for (genvar g = 0; g < 2 * T; g++) begin : g_grp
      assign s_j[g] = syndrome_i[chk_index(g, j, M)];
    end
    nbols_digit_majority #(.T(T), .B(B)) u_maj (
      .s_i(s_j),
      .e_o(e_j)
    );
    assign err_o[j] = e_j;
  end

endmodule

// nbols_digit_majority: reduced-complexity majority circuit over GF(2^b).
//
// Finds the error magnitude of one data symbol from the 2t syndrome symbols
// S_j that check it. Instead of decoding each b-bit symbol into 2^b lines and
// voting on whole symbols, it votes on each binary digit on its own: output
// bit d is 1 when more than t of the 2t inputs have bit d set. This is not a
// true symbol majority (inputs 3,3,4,5 over GF(8) with t = 2 give 1, not 3),
// but with at most t symbol errors at least t+1 of the inputs equal the error
// magnitude e_j, so every digit of e_j wins its vote; and when symbol j is
// correct at least t inputs are 0, so no digit can reach t+1 ones. The
// digit-wise vote and its threshold follow the document; the adder-based
// population count is this design's choice.
//
// Interface: s_i[g] is the syndrome symbol of check group g covering the
// symbol; e_o is the error magnitude (0 when the symbol is correct).
// Timing: purely combinational.
module nbols_digit_majority #(
  parameter int unsigned T = nbols_pkg::DEF_T,  // 2t inputs, threshold t+1
  parameter int unsigned B = nbols_pkg::DEF_B   // bits per symbol
) (
  input  logic [2*T-1:0][B-1:0] s_i,
  output logic [B-1:0]          e_o
);

  localparam int unsigned CW = $clog2(2 * T + 1);

  always_comb begin
    for (int d = 0; d < B; d++) begin
      logic [CW-1:0] ones;
      ones = '0;
      for (int g = 0; g < 2 * T; g++) ones += CW'(s_i[g][d]);
      e_o[d] = (ones > CW'(T));
    end
  end

endmodule

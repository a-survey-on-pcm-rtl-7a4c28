// nbols_encoder: check symbol generator of the non-binary OLS code (encoder).
//
// Takes k = m*m information symbols of b bits and produces the r = 2*t*m
// check symbols and the systematic n = k + r symbol codeword that is written
// to the multilevel PCM cells. Check symbol i is the GF(2^b) sum of the data
// symbols j with h(i, j) = 1 in the binary OLS parity-check matrix (see
// nbols_pkg); in GF(2^b) this sum is a bitwise XOR, so every check symbol is
// b XOR trees of m inputs each. The H matrix and the XOR-based encoder follow
// the document; the codeword layout (data symbols at indices 0 .. k-1, check
// symbols at k .. n-1) is this design's choice.
//
// Interface: data_i[j] is data symbol j; check_o[i] is check symbol i;
// codeword_o = {check_o, data_i}. Timing: purely combinational, no clock.
module nbols_encoder
  import nbols_pkg::*;
#(
  parameter  int unsigned K = DEF_K,  // information symbols, a perfect square
  parameter  int unsigned T = DEF_T,  // correctable symbol errors
  parameter  int unsigned B = DEF_B,  // bits per symbol (2^b-level cells)
  localparam int unsigned M = isqrt(K),
  localparam int unsigned R = 2 * T * M,
  localparam int unsigned N = K + R
) (
  input  logic [K-1:0][B-1:0] data_i,
  output logic [R-1:0][B-1:0] check_o,
  output logic [N-1:0][B-1:0] codeword_o
);

  if (M * M != K) begin : g_bad_k
    $error("nbols_encoder: K = %0d is not a perfect square", K);
  end
  if (!is_pow2(M) && !is_prime(M)) begin : g_bad_m
    $error("nbols_encoder: square order %0d must be a prime or a power of two", M);
  end
  if (M > 256) begin : g_big_m
    $error("nbols_encoder: square order %0d above 256 is not supported", M);
  end
  if (T < 1 || 2 * T - 2 > M - 1) begin : g_bad_t
    $error("nbols_encoder: T = %0d needs %0d orthogonal Latin squares of order %0d", T,
           2 * T - 2, M);
  end

  for (genvar i = 0; i < R; i++) begin : g_chk
    // Data symbols selected by row i of H; the others contribute zero.
    logic [K-1:0][B-1:0] terms;
    logic [B-1:0]        sum;
    for (genvar j = 0; j < K; j++) begin : g_term
      if (h_bit(i, j, M)) begin : g_on
        assign terms[j] = data_i[j];
      end else begin : g_off
        assign terms[j] = '0;
      end
    end
    always_comb begin
      sum = '0;
      for (int j = 0; j < K; j++) sum ^= terms[j];
    end
    assign check_o[i] = sum;
  end

  assign codeword_o = {check_o, data_i};

endmodule

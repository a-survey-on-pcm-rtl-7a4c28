// nbols_syndrome_gen: syndrome generator of the non-binary OLS decoder.
//
// Re-encodes the received data symbols with the same check symbol generator
// as the write path (nbols_encoder) and adds, in GF(2^b), the received check
// symbols: s_i = c'_i + sum_j h(i, j) d'_j, a bitwise XOR. A zero syndrome
// means no check detects an error; a symbol error of magnitude e in data
// symbol j shows up as s_i = e in each of the 2t checks covering j. Reusing
// the encoder follows the document's remark that the encoder and syndrome
// generator are conventional XOR networks; sharing the module is this design's
// choice.
//
// Interface: rx_codeword_i is the n-symbol word read from the cells (data at
// indices 0 .. k-1, checks at k .. n-1); syndrome_o[i] is syndrome symbol i.
// Timing: purely combinational.
module nbols_syndrome_gen
  import nbols_pkg::*;
#(
  parameter  int unsigned K = DEF_K,
  parameter  int unsigned T = DEF_T,
  parameter  int unsigned B = DEF_B,
  localparam int unsigned M = isqrt(K),
  localparam int unsigned R = 2 * T * M,
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0][B-1:0] rx_codeword_i,
  output logic [R-1:0][B-1:0] syndrome_o
);

  logic [K-1:0][B-1:0] rx_data;
  logic [R-1:0][B-1:0] rx_check;
  logic [R-1:0][B-1:0] recomputed;
  logic [N-1:0][B-1:0] unused_cw;

  assign rx_data  = rx_codeword_i[K-1:0];
  assign rx_check = rx_codeword_i[N-1:K];

  nbols_encoder #(.K(K), .T(T), .B(B)) u_recompute (
    .data_i    (rx_data),
    .check_o   (recomputed),
    .codeword_o(unused_cw)
  );

  assign syndrome_o = recomputed ^ rx_check;

endmodule

// nbols_pcm_ecc: error correction for a multilevel phase change memory (PCM)
// with a non-binary orthogonal Latin square (OLS) code.
//
// Each PCM cell stores one b-bit symbol (2^b resistance levels). Resistance
// drift can move a cell across a level threshold and turn its symbol into any
// other value. The write path encodes k information symbols into an n-symbol
// codeword (k data + r = 2*t*sqrt(k) check symbols) that goes to n cells; the
// read path decodes the n symbols read back and corrects up to t erroneous
// cells, whatever the size of each symbol error. The code uses the 0/1 parity
// check matrix of the binary OLS code with GF(2^b) (XOR) arithmetic, and the
// decoder is the parallel one-step majority-logic decoder with the digit-wise
// majority circuit, both as in the document. The cell array itself is analog
// and sits outside this module: its symbols enter and leave through the
// codeword ports.
//
// Default configuration (this design's choice where the document gives no
// numbers): k = 64 symbols of b = 3 bits (octal cells), t = 2, so r = 32 and
// n = 96 cells per word.
//
// Interface: wr_data_i -> wr_codeword_o (to the cells); rd_codeword_i (from
// the cells) -> rd_data_o, with rd_syndrome_o and rd_err_o showing what the
// decoder found. Timing: both paths are purely combinational.
module nbols_pcm_ecc
  import nbols_pkg::*;
#(
  parameter  int unsigned K = DEF_K,
  parameter  int unsigned T = DEF_T,
  parameter  int unsigned B = DEF_B,
  localparam int unsigned M = isqrt(K),
  localparam int unsigned R = 2 * T * M,
  localparam int unsigned N = K + R
) (
  // write path: information symbols in, codeword to the PCM cells
  input  logic [K-1:0][B-1:0] wr_data_i,
  output logic [N-1:0][B-1:0] wr_codeword_o,
  // read path: codeword from the PCM cells, corrected information symbols out
  input  logic [N-1:0][B-1:0] rd_codeword_i,
  output logic [K-1:0][B-1:0] rd_data_o,
  output logic [R-1:0][B-1:0] rd_syndrome_o,
  output logic [K-1:0][B-1:0] rd_err_o
);

  logic [R-1:0][B-1:0] wr_check;

  nbols_encoder #(.K(K), .T(T), .B(B)) u_enc (
    .data_i    (wr_data_i),
    .check_o   (wr_check),
    .codeword_o(wr_codeword_o)
  );

  nbols_decoder #(.K(K), .T(T), .B(B)) u_dec (
    .rx_codeword_i(rd_codeword_i),
    .data_o       (rd_data_o),
    .syndrome_o   (rd_syndrome_o),
    .err_o        (rd_err_o)
  );

endmodule

// nbols_decoder: parallel decoder of the non-binary OLS code.
//
// Syndrome generator -> error pattern calculator (digit-majority per data
// symbol) -> GF(2^b) adder. Corrects any pattern of up to t erroneous
// symbols among the n = k + r symbols read from the cells, whatever the error
// magnitudes, in one combinational pass with no iteration. The structure
// follows the document's decoder block diagram.
//
// Interface: rx_codeword_i is the word read from the cells (data at indices
// 0 .. k-1, checks at k .. n-1); data_o is the corrected data; syndrome_o and
// err_o expose the intermediate syndrome and error pattern, so that a caller
// can see whether anything was corrected (a non-zero syndrome). Timing:
// purely combinational.
module nbols_decoder
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
  output logic [K-1:0][B-1:0] data_o,
  output logic [R-1:0][B-1:0] syndrome_o,
  output logic [K-1:0][B-1:0] err_o
);

  nbols_syndrome_gen #(.K(K), .T(T), .B(B)) u_syn (
    .rx_codeword_i(rx_codeword_i),
    .syndrome_o   (syndrome_o)
  );

  nbols_error_calc #(.K(K), .T(T), .B(B)) u_epc (
    .syndrome_i(syndrome_o),
    .err_o     (err_o)
  );

  nbols_adder #(.K(K), .B(B)) u_add (
    .rx_data_i(rx_codeword_i[K-1:0]),
    .err_i    (err_o),
    .data_o   (data_o)
  );

endmodule

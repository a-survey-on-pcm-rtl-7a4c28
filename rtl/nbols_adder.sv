// nbols_adder: GF(2^b) adder of the non-binary OLS decoder.
//
// Corrects the received information symbols by adding the error pattern:
// d_j = d'_j + e_j. In GF(2^b) addition and subtraction are both the bitwise
// XOR of the b-bit symbols, so a symbol received as v_j + e_j returns to v_j.
// Follows the document's decoder; the XOR realisation is the one it names for
// codes over GF(2^b).
//
// Interface: rx_data_i[j] received data symbol, err_i[j] its error magnitude,
// data_o[j] corrected symbol. Timing: purely combinational.
module nbols_adder #(
  parameter int unsigned K = nbols_pkg::DEF_K,
  parameter int unsigned B = nbols_pkg::DEF_B
) (
  input  logic [K-1:0][B-1:0] rx_data_i,
  input  logic [K-1:0][B-1:0] err_i,
  output logic [K-1:0][B-1:0] data_o
);

  always_comb begin
    for (int j = 0; j < K; j++) data_o[j] = rx_data_i[j] ^ err_i[j];
  end

endmodule

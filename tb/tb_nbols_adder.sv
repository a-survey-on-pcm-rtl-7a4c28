// tb_nbols_adder: self-checking testbench of the GF(2^b) adder.
//
// Random received symbols and error patterns at k = 64, b = 3; each output
// symbol must be the received symbol with the error removed, computed here
// symbol by symbol as an integer XOR.
module tb_nbols_adder;
  localparam int K = 64, B = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [K-1:0][B-1:0] rx, err, dout;
  int checks = 0, failures = 0;

  nbols_adder dut (.rx_data_i(rx), .err_i(err), .data_o(dout));

  initial begin
    int r[K], e[K];
    rx = '0;
    err = '0;
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < K; j++) begin
        r[j] = $urandom_range(7);
        e[j] = (n % 2 == 0) ? $urandom_range(7) : 0;
        rx[j] = B'(r[j]);
        err[j] = B'(e[j]);
      end
      @(posedge clk);
      for (int j = 0; j < K; j++) begin
        checks++;
        if (int'(dout[j]) != (r[j] ^ e[j])) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d symbol %0d", n, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

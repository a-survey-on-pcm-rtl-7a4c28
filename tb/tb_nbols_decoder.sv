// tb_nbols_decoder: self-checking testbench of the parallel decoder.
//
// Random data words (k = 64, t = 2, b = 3) are encoded with the reference
// encoder, 0 .. t random symbols of the 96-symbol word get random nonzero
// error magnitudes, and the decoder must return the original data; the
// syndrome must be zero exactly when no error was added, and the error
// pattern output must equal the injected data-symbol errors.
module tb_nbols_decoder;
  import tb_ols_ref_pkg::*;
  localparam int K = 64, T = 2, B = 3, R = 32, N = K + R;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0][B-1:0] cw;
  logic [K-1:0][B-1:0] dout, err;
  logic [R-1:0][B-1:0] syn;
  int checks = 0, failures = 0;

  nbols_decoder dut (.rx_codeword_i(cw), .data_o(dout), .syndrome_o(syn), .err_o(err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int d[], c[], w[];
    cw = '0;
    d = new[K];
    w = new[N];
    for (int n = 0; n < 1500; n++) begin
      foreach (d[j]) d[j] = $urandom_range(7);
      ref_encode(d, T, c);
      for (int j = 0; j < K; j++) w[j] = d[j];
      for (int i = 0; i < R; i++) w[K + i] = c[i];
      inject(w, n % (T + 1), B);
      foreach (w[x]) cw[x] = B'(w[x]);
      @(posedge clk);
      for (int j = 0; j < K; j++) begin
        check(int'(dout[j]) == d[j], $sformatf("word %0d symbol %0d", n, j));
        check(int'(err[j]) == (w[j] ^ d[j]), $sformatf("word %0d error %0d", n, j));
      end
      check((syn == '0) == (n % (T + 1) == 0), $sformatf("word %0d syndrome zero test", n));
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

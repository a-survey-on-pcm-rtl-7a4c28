// tb_nbols_error_calc: self-checking testbench of the error pattern calculator.
//
// At k = 64, t = 2, b = 3 it forms the syndrome of a random error pattern of
// up to t symbols (in data or check positions) with the reference encoder and
// requires the calculator to return exactly the data part of that pattern:
// each erroneous data symbol's magnitude and zero everywhere else.
module tb_nbols_error_calc;
  import tb_ols_ref_pkg::*;
  localparam int K = 64, T = 2, B = 3, R = 32, N = K + R;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [R-1:0][B-1:0] syn;
  logic [K-1:0][B-1:0] err;
  int checks = 0, failures = 0;

  nbols_error_calc dut (.syndrome_i(syn), .err_o(err));

  initial begin
    int w[], ed[], s[];
    syn = '0;
    w = new[N];
    ed = new[K];
    for (int n = 0; n < 1000; n++) begin
      foreach (w[x]) w[x] = 0;
      inject(w, n % (T + 1), B);
      for (int j = 0; j < K; j++) ed[j] = w[j];
      ref_encode(ed, T, s);
      for (int i = 0; i < R; i++) syn[i] = B'(s[i] ^ w[K + i]);
      @(posedge clk);
      for (int j = 0; j < K; j++) begin
        checks++;
        if (int'(err[j]) != ed[j]) begin
          failures++;
          if (failures < 10) $display("FAIL: pattern %0d symbol %0d: %0d vs %0d", n, j,
                                      err[j], ed[j]);
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

// tb_nbols_syndrome_gen: self-checking testbench of the syndrome generator.
//
// Builds codewords with the reference encoder (k = 64, t = 2, b = 3), adds
// 0 to 4 random symbol errors anywhere in the word, and compares the
// syndrome with the reference: re-encoded received data XOR received checks.
// Error-free words must give an all-zero syndrome.
module tb_nbols_syndrome_gen;
  import tb_ols_ref_pkg::*;
  localparam int K = 64, T = 2, B = 3, R = 32, N = K + R;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0][B-1:0] cw;
  logic [R-1:0][B-1:0] syn;
  int checks = 0, failures = 0;

  nbols_syndrome_gen dut (.rx_codeword_i(cw), .syndrome_o(syn));

  initial begin
    int d[], c[], w[], rd[], rc[];
    cw = '0;
    d = new[K];
    w = new[N];
    rd = new[K];
    for (int n = 0; n < 400; n++) begin
      foreach (d[j]) d[j] = $urandom_range(7);
      ref_encode(d, T, c);
      for (int j = 0; j < K; j++) w[j] = d[j];
      for (int i = 0; i < R; i++) w[K + i] = c[i];
      inject(w, n % 5, B);
      foreach (w[x]) cw[x] = B'(w[x]);
      @(posedge clk);
      for (int j = 0; j < K; j++) rd[j] = w[j];
      ref_encode(rd, T, rc);
      for (int i = 0; i < R; i++) begin
        checks++;
        if (int'(syn[i]) != (rc[i] ^ w[K + i]) || (n % 5 == 0 && syn[i] != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d syndrome %0d", n, i);
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

// tb_ecc_cfg_run: test harness that runs one configuration (k, t, b) of the
// PCM error correction end to end.
//
// For WORDS random data words it checks the encoder output against the
// reference encoder, adds 0 .. t random nonzero symbol errors anywhere in the
// codeword (all t+1 counts occur), and checks that the decoder returns the
// written data. Results come out on ports when done rises.
module tb_ecc_cfg_run #(
  parameter int K = 16,
  parameter int T = 2,
  parameter int B = 2,
  parameter int WORDS = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_ols_ref_pkg::*;
  localparam int M = ref_isqrt(K), R = 2 * T * M, N = K + R;

  logic [K-1:0][B-1:0] wr_data, rd_data, rd_err;
  logic [N-1:0][B-1:0] wr_cw, rd_cw;
  logic [R-1:0][B-1:0] rd_syn;

  nbols_pcm_ecc #(.K(K), .T(T), .B(B)) dut (
    .wr_data_i    (wr_data),
    .wr_codeword_o(wr_cw),
    .rd_codeword_i(rd_cw),
    .rd_data_o    (rd_data),
    .rd_syndrome_o(rd_syn),
    .rd_err_o     (rd_err)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d t=%0d b=%0d: %s", K, T, B, what);
    end
  endtask

  initial begin
    int d[], c[], w[];
    done = 0;
    checks = 0;
    failures = 0;
    wr_data = '0;
    rd_cw = '0;
    d = new[K];
    w = new[N];
    for (int n = 0; n < WORDS; n++) begin
      foreach (d[j]) d[j] = $urandom_range((1 << B) - 1);
      foreach (d[j]) wr_data[j] = B'(d[j]);
      @(posedge clk);
      ref_encode(d, T, c);
      for (int i = 0; i < R; i++) check(int'(wr_cw[K + i]) == c[i], "check symbol");
      foreach (w[x]) w[x] = int'(wr_cw[x]);
      inject(w, n % (T + 1), B);
      foreach (w[x]) rd_cw[x] = B'(w[x]);
      @(posedge clk);
      for (int j = 0; j < K; j++) check(int'(rd_data[j]) == d[j], $sformatf("word %0d", n));
    end
    done = 1;
  end
endmodule

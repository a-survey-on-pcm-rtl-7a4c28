// tb_nbols_pcm_ecc: end-to-end testbench of the PCM error correction at its
// default configuration (k = 64 octal symbols, t = 2, n = 96 cells).
//
// Each operation writes a random data word through the encoder into a model
// of the multilevel cell array (a plain array of 2^b-level symbols), lets
// some cells drift, reads the word back through the decoder and compares with
// what was written. Drift is modelled two ways: a cell creeping up one or
// more resistance levels (level v becomes v + s, saturating at the top level,
// the usual way drift moves a cell across a threshold), and an arbitrary
// symbol change. Up to t cells per word are disturbed. The encoder output is
// also compared with the reference encoder.
//
// Mechanisms counted, each of which must occur: clean reads (zero syndrome),
// corrections of a data cell, errors in check cells (tolerated, nothing to
// correct), words with the full t disturbed cells, errors that change more
// than one binary digit of a symbol, and drift by a single level.
module tb_nbols_pcm_ecc;
  import tb_ols_ref_pkg::*;
  localparam int K = 64, T = 2, B = 3, R = 32, N = K + R, LEVELS = 1 << B;
  localparam int WORDS = 3000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [K-1:0][B-1:0] wr_data, rd_data, rd_err;
  logic [N-1:0][B-1:0] wr_cw, rd_cw;
  logic [R-1:0][B-1:0] rd_syn;

  int checks = 0, failures = 0;
  int n_clean = 0, n_data_fix = 0, n_check_err = 0, n_full_t = 0, n_multi_digit = 0;
  int n_one_level = 0;

  nbols_pcm_ecc dut (
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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int d[], c[], cells[], lvl, nerr, p, step;
    int picked[$];
    bit dup;
    wr_data = '0;
    rd_cw = '0;
    d = new[K];
    cells = new[N];
    for (int n = 0; n < WORDS; n++) begin
      // write
      foreach (d[j]) d[j] = $urandom_range(LEVELS - 1);
      foreach (d[j]) wr_data[j] = B'(d[j]);
      @(posedge clk);
      ref_encode(d, T, c);
      for (int j = 0; j < K; j++) check(int'(wr_cw[j]) == d[j], "codeword data part");
      for (int i = 0; i < R; i++) check(int'(wr_cw[K + i]) == c[i], "codeword check part");
      foreach (cells[x]) cells[x] = int'(wr_cw[x]);
      // drift: 0 .. t distinct cells change level
      nerr = n % (T + 1);
      picked.delete();
      while (picked.size() < nerr) begin
        p = $urandom_range(N - 1);
        dup = 0;
        foreach (picked[i]) if (picked[i] == p) dup = 1;
        lvl = cells[p];
        if (dup) continue;
        if ($urandom_range(1) == 0 && lvl < LEVELS - 1) begin
          // creep up by one or more levels, never past the top level
          step = $urandom_range(LEVELS - 1 - lvl, 1);
          cells[p] = lvl + step;
        end else begin
          // arbitrary change of the stored symbol
          cells[p] = lvl ^ $urandom_range(LEVELS - 1, 1);
        end
        if (cells[p] == int'(wr_cw[p])) continue;
        picked.push_back(p);
        if (p < K) n_data_fix++;
        else n_check_err++;
        if ($countones(cells[p] ^ int'(wr_cw[p])) > 1) n_multi_digit++;
        if (cells[p] - int'(wr_cw[p]) == 1) n_one_level++;
      end
      if (nerr == 0) n_clean++;
      if (nerr == T) n_full_t++;
      // read
      foreach (cells[x]) rd_cw[x] = B'(cells[x]);
      @(posedge clk);
      for (int j = 0; j < K; j++)
        check(int'(rd_data[j]) == d[j], $sformatf("op %0d symbol %0d: %0d vs %0d", n, j,
                                                  rd_data[j], d[j]));
      check((rd_syn == '0) == (nerr == 0), $sformatf("op %0d syndrome", n));
    end
    need(n_clean, "clean reads");
    need(n_data_fix, "data cells corrected");
    need(n_check_err, "check cells in error");
    need(n_full_t, "words with t cells in error");
    need(n_multi_digit, "multi-digit symbol errors");
    need(n_one_level, "one-level drift errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * WORDS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

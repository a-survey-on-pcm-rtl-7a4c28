// tb_nbols_encoder: self-checking testbench of the check symbol generator.
//
// At the default configuration (k = 64, t = 2, b = 3) it checks (1) the code
// structure by encoding each unit word: a lone symbol must appear in exactly
// 2t check symbols, one per group of m, and any two data symbols may share at
// most one check (row-column constraint); (2) random words against the
// independent reference encoder; (3) the codeword layout {check, data}.
module tb_nbols_encoder;
  import tb_ols_ref_pkg::*;

  localparam int K = 64, T = 2, B = 3;
  localparam int M = 8, R = 2 * T * M, N = K + R;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [K-1:0][B-1:0] data;
  logic [R-1:0][B-1:0] check;
  logic [N-1:0][B-1:0] codeword;

  int checks = 0, failures = 0;

  nbols_encoder dut (.data_i(data), .check_o(check), .codeword_o(codeword));

  // Rows of H each data symbol uses, found from the DUT with unit words.
  int rows_of[K][$];

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int d[], c[], shared;
    data = '0;
    @(posedge clk);
    // structure from unit words
    for (int j = 0; j < K; j++) begin
      data = '0;
      data[j] = B'(1 + j % ((1 << B) - 1));
      @(posedge clk);
      for (int i = 0; i < R; i++)
        if (check[i] != 0) begin
          rows_of[j].push_back(i);
          expect_eq(check[i] == data[j], $sformatf("unit %0d check %0d value", j, i));
        end
      expect_eq(rows_of[j].size() == 2 * T, $sformatf("symbol %0d column weight %0d", j,
                                                       rows_of[j].size()));
      for (int g = 0; g < 2 * T && g < rows_of[j].size(); g++)
        expect_eq(rows_of[j][g] / M == g, $sformatf("symbol %0d group %0d", j, g));
    end
    for (int j1 = 0; j1 < K; j1++)
      for (int j2 = j1 + 1; j2 < K; j2++) begin
        shared = 0;
        foreach (rows_of[j1][a]) foreach (rows_of[j2][b2])
          if (rows_of[j1][a] == rows_of[j2][b2]) shared++;
        expect_eq(shared <= 1, $sformatf("symbols %0d,%0d share %0d checks", j1, j2, shared));
      end
    // random words against the reference
    d = new[K];
    for (int n = 0; n < 300; n++) begin
      foreach (d[j]) d[j] = $urandom_range((1 << B) - 1);
      if (n == 0) foreach (d[j]) d[j] = (1 << B) - 1;
      foreach (d[j]) data[j] = B'(d[j]);
      @(posedge clk);
      ref_encode(d, T, c);
      for (int i = 0; i < R; i++)
        expect_eq(check[i] == B'(c[i]), $sformatf("word %0d check %0d: %0d vs %0d", n, i,
                                                  check[i], c[i]));
      expect_eq(codeword == {check, data}, $sformatf("word %0d layout", n));
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

// tb_nbols_pcm_ecc_cfgs: end-to-end runs of the PCM error correction at
// configurations other than the default, to exercise the parameters:
// quaternary cells (b = 2), t = 1 and t up to (m+1)/2, square orders that are
// powers of two (GF(m) Latin squares) and primes (modular Latin squares),
// and a data length near 100 symbols (k = 121, m = 11).
module tb_nbols_pcm_ecc_cfgs;
  localparam int NCFG = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int c[NCFG], f[NCFG];
  int checks = 0, failures = 0;

  tb_ecc_cfg_run #(.K(16),  .T(2), .B(2)) r0 (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_ecc_cfg_run #(.K(16),  .T(1), .B(3)) r1 (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_ecc_cfg_run #(.K(25),  .T(3), .B(3)) r2 (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_ecc_cfg_run #(.K(49),  .T(4), .B(2)) r3 (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_ecc_cfg_run #(.K(64),  .T(4), .B(3)) r4 (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_ecc_cfg_run #(.K(121), .T(2), .B(3)) r5 (.clk(clk), .done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    wait (&done);
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i];
      failures += f[i];
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

// tb_nbols_digit_majority: self-checking testbench of the digit-wise majority
// circuit.
//
// Drives every input combination of a t = 2, b = 3 instance (4 symbols of
// 3 bits) and of a t = 3, b = 2 instance, comparing with a per-digit vote
// (more than t ones out of 2t). Also checks the worked case (3,3,4,5) -> 1
// over GF(8), and that whenever t+1 inputs equal a value e the output is e.
module tb_nbols_digit_majority;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0][2:0] s_a;
  logic [2:0]      e_a;
  logic [5:0][1:0] s_b;
  logic [1:0]      e_b;

  int checks = 0, failures = 0;

  nbols_digit_majority #(.T(2), .B(3)) dut_a (.s_i(s_a), .e_o(e_a));
  nbols_digit_majority #(.T(3), .B(2)) dut_b (.s_i(s_b), .e_o(e_b));

  function automatic int vote(input int syms[], input int t, input int b);
    int r = 0, n;
    for (int d = 0; d < b; d++) begin
      n = 0;
      foreach (syms[g]) n += (syms[g] >> d) & 1;
      if (n > t) r |= 1 << d;
    end
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int sy[];
    s_a = '0;
    s_b = '0;
    // worked case
    s_a = {3'd5, 3'd4, 3'd3, 3'd3};
    @(posedge clk);
    check(e_a == 3'd1, $sformatf("(3,3,4,5) gave %0d", e_a));
    // exhaustive t=2, b=3
    sy = new[4];
    for (int v = 0; v < (1 << 12); v++) begin
      s_a = 12'(v);
      @(posedge clk);
      foreach (sy[g]) sy[g] = (v >> (3 * g)) & 7;
      check(e_a == 3'(vote(sy, 2, 3)), $sformatf("t2 input %h gave %0d", v, e_a));
    end
    // exhaustive t=3, b=2
    sy = new[6];
    for (int v = 0; v < (1 << 12); v++) begin
      s_b = 12'(v);
      @(posedge clk);
      foreach (sy[g]) sy[g] = (v >> (2 * g)) & 3;
      check(e_b == 2'(vote(sy, 3, 2)), $sformatf("t3 input %h gave %0d", v, e_b));
    end
    // t+1 copies of e always give e (the decoding guarantee)
    for (int n = 0; n < 500; n++) begin
      int e, odd;
      e = $urandom_range(7);
      odd = $urandom_range(3);
      for (int g = 0; g < 4; g++) s_a[g] = 3'(e);
      s_a[odd] = 3'($urandom_range(7));
      @(posedge clk);
      check(e_a == 3'(e), $sformatf("3 copies of %0d gave %0d", e, e_a));
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

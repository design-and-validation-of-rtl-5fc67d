// tb_lma_binary: runs the bisection search for random operating points and
// compares its i_d* with the exact minimiser of the loss W (from
// dW/di_d = 0); the result must lie within 5 mA (the search step is
// d = 1 mA, and near the optimum the 2 mA-apart losses differ by little
// more than the Q16.16 resolution of W) or, when the exact minimiser is outside
// [-10 A, 10 A], at that bound. It also checks that the result never has
// more loss than i_d = 0, that a search takes at most 15 passes of 8 clocks
// (the 20 A interval halves down to 2 mA in 14; the equal-ends exit may end
// it sooner), and exercises the equal-ends exit: at zero speed W is symmetric
// in i_d, so the first pass must end at i_d* = 0.
module tb_lma_binary;
  import hil_pkg::*;
  import motor_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, done;
  q16_t i_q, w_r, id_ref;
  logic [5:0] passes;
  int checks = 0, failures = 0;

  lma_binary dut (.clk, .rst, .start, .i_q, .w_r, .busy, .done, .id_ref, .passes);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real iq, w, opt, got;
    int cyc, n_equal, n_bound;
    n_equal = 0; n_bound = 0;
    i_q = '0; w_r = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      iq = 16.0 * $urandom_range(0, 10000) / 10000.0 - 8.0;
      w  = 3000.0 * $urandom_range(0, 10000) / 10000.0;
      if (t % 50 == 0) w = 0.0;
      if (t % 50 == 1) begin w = 4000.0; iq = 0.5; end    // minimiser below -10 A
      @(negedge clk);
      i_q = r2q(iq); w_r = r2q(w);
      iq = q2r(i_q); w = q2r(w_r);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      got = q2r(id_ref);
      opt = id_opt(iq, w);
      if (opt < -10.0) begin opt = -10.0; n_bound++; end
      if (opt > 10.0)  begin opt = 10.0;  n_bound++; end
      checks++;
      if (absr(got - opt) > 0.005) begin
        failures++; $display("iq=%f w=%f: id*=%f expected %f", iq, w, got, opt);
      end
      checks++;
      if (loss_w(got, iq, w) > loss_w(0.0, iq, w) + 1e-3) begin
        failures++; $display("more loss than i_d = 0");
      end
      checks++;
      if (w == 0.0) begin
        n_equal++;
        if (passes != 1 || id_ref != 0) begin failures++; $display("equal-ends exit: passes %0d", passes); end
      end else if (passes < 1 || passes > 15 || cyc > 130) begin
        failures++; $display("passes %0d, %0d clocks", passes, cyc);
      end
    end
    checks++;
    if (n_equal == 0 || n_bound == 0) begin failures++; $display("a case was not exercised"); end
    $display("equal-ends exits %0d, bound cases %0d", n_equal, n_bound);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lma_model: random operating points; the closed-form i_d* computed in
// Q32.32 must match the real-number minimiser of W to 1e-3 A, and be clamped
// to +-10 A where the minimiser lies beyond. done must come 99 clocks after
// the start is taken (one clock of set-up, 96 divider steps, two of hand-over).
module tb_lma_model;
  import hil_pkg::*;
  import motor_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, done;
  q16_t i_q, w_r, id_ref;
  int checks = 0, failures = 0;

  lma_model dut (.clk, .rst, .start, .i_q, .w_r, .busy, .done, .id_ref);

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
    int cyc, n_clamp;
    n_clamp = 0;
    i_q = '0; w_r = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 600; t++) begin
      iq = 20.0 * $urandom_range(0, 10000) / 10000.0 - 10.0;
      w  = 6000.0 * $urandom_range(0, 10000) / 10000.0 - 3000.0;
      if (t % 40 == 0) w = 0.0;
      if (t % 40 == 1) w = 30000.0;
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
      if (opt < -10.0) begin opt = -10.0; n_clamp++; end
      if (opt > 10.0)  begin opt = 10.0;  n_clamp++; end
      checks++;
      if (absr(got - opt) > 1e-3) begin
        failures++; $display("iq=%f w=%f: id*=%f expected %f", iq, w, got, opt);
      end
      checks++;
      if (cyc != 99) begin failures++; $display("latency %0d", cyc); end
    end
    checks++;
    if (n_clamp == 0) begin failures++; $display("clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_loss_eval: random operating points (i_d, i_q in +-10 A, speed in
// +-2000 rad/s) streamed one per clock into the pipeline; each result,
// two clocks later, is compared with the real-number loss W.
// Tolerance 0.02 W plus 0.2 %.
module tb_loss_eval;
  import hil_pkg::*;
  import motor_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, w_valid;
  q16_t i_d, i_q, w_r, w_loss;
  int checks = 0, failures = 0;

  loss_eval dut (.clk, .rst, .in_valid, .i_d, .i_q, .w_r, .w_valid, .w_loss);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q [$];
  int  nin = 0;

  initial begin
    real id, iq, w;
    i_d = '0; i_q = '0; w_r = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      id = 20.0 * $urandom_range(0, 10000) / 10000.0 - 10.0;
      iq = 20.0 * $urandom_range(0, 10000) / 10000.0 - 10.0;
      w  = 4000.0 * $urandom_range(0, 10000) / 10000.0 - 2000.0;
      @(negedge clk);
      i_d = r2q(id); i_q = r2q(iq); w_r = r2q(w);
      exp_q.push_back(loss_w(q2r(i_d), q2r(i_q), q2r(w_r)));
      in_valid = (t % 7 != 3);  // a gap now and then
      if (!in_valid) void'(exp_q.pop_back());
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results: check against the queue of expected values, in order; values
  // are read at the clock edge, before the edge updates them
  int lat_in [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && in_valid) lat_in.push_back(cyc);
    if (!rst && w_valid) begin
      real e, g;
      int c0;
      e = exp_q.pop_front();
      c0 = lat_in.pop_front();
      g = q2r(w_loss);
      checks++;
      if (absr(g - e) > 0.02 + 2e-3 * e) begin
        failures++; $display("W %f expected %f", g, e);
      end
      checks++;
      if (cyc - c0 != 2) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end
endmodule

// tb_lma_unit: the loss-minimisation block with its three i_d* policies.
// Samples come every 200 clocks. For each policy (classical, model-based,
// bisection) and random steady operating points it checks i_d* against the
// exact loss minimiser (0 A for the classical policy; 1e-3 A model-based;
// 5 mA bisection), that an LMA search finishes after every sample of the
// LMA policies, and that the speed PI's first step after a speed error is
// Kp e + Ki Ts e and that i_q* saturates at 10 A under a held error.
// Counts every policy switch.
module tb_lma_unit;
  import hil_pkg::*;
  import motor_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic sample = 1'b0, iq_valid, lma_done;
  logic [1:0] lma_mode;
  q16_t w_ref, w_r, i_q, iq_ref, id_ref;
  int checks = 0, failures = 0;

  lma_unit dut (.clk, .rst, .sample, .lma_mode, .w_ref, .w_r, .i_q, .iq_valid, .iq_ref, .id_ref, .lma_done);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (lma_done) n_done++;

  task automatic do_sample();
    @(negedge clk); sample = 1'b1;
    @(negedge clk); sample = 1'b0;
    repeat (198) @(negedge clk);
  endtask

  initial begin
    real iq, w, opt, got, tol, y1;
    int switches, d0;
    switches = 0;
    lma_mode = 2'd0; w_ref = '0; w_r = '0; i_q = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // speed PI: first step, then saturation
    w_ref = r2q(100.0); w_r = '0;
    do_sample();
    y1 = (3277.0 + 13.0) / 65536.0 * 100.0;
    checks++;
    if (absr(q2r(iq_ref) - y1) > 1e-3) begin failures++; $display("iq* %f expected %f", q2r(iq_ref), y1); end
    repeat (300) do_sample();
    checks++;
    if (iq_ref != 32'sd655360) begin failures++; $display("iq* not at its 10 A limit: %f", q2r(iq_ref)); end
    w_ref = '0;
    for (int m = 0; m < 9; m++) begin
      lma_mode = 2'(m % 3);
      switches++;
      for (int t = 0; t < 10; t++) begin
        iq = 16.0 * $urandom_range(0, 10000) / 10000.0 - 8.0;
        w  = 2500.0 * $urandom_range(1, 10000) / 10000.0;
        i_q = r2q(iq); w_r = r2q(w);
        iq = q2r(i_q); w = q2r(w_r);
        d0 = n_done;
        do_sample();
        got = q2r(id_ref);
        opt = (lma_mode == 2'd0) ? 0.0 : id_opt(iq, w);
        tol = (lma_mode == 2'd2) ? 0.005 : 1e-3;
        if (opt < -10.0) opt = -10.0;
        checks++;
        if (absr(got - opt) > tol) begin
          failures++; $display("mode %0d iq=%f w=%f: id*=%f expected %f", lma_mode, iq, w, got, opt);
        end
        checks++;
        if ((lma_mode != 2'd0) != (n_done == d0 + 1)) begin
          failures++; $display("mode %0d: %0d searches ended", lma_mode, n_done - d0);
        end
      end
    end
    $display("policy switches %0d, LMA searches %0d", switches, n_done);
    checks++;
    if (switches < 3 || n_done == 0) begin failures++; $display("mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

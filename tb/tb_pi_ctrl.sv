// tb_pi_ctrl: drives random reference/measurement sequences, including long
// runs that push the output into its limits, and compares each sample with a
// real-number model of y(k) = sat(y(k-1) + Kp (e(k) - e(k-1)) + Ki Ts e(k)).
// Each step starts the model from the block's previous output, so the
// one-LSB truncation of the fixed-point products does not accumulate;
// tolerance 1e-4. Checks the one-clock latency, that the output
// holds between samples and that both limits were reached.
module tb_pi_ctrl;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  q16_t ref_i, meas, y;
  int checks = 0, failures = 0;

  // current-loop settings of the controller, limits +-173 V
  pi_ctrl dut (.clk, .rst, .in_valid, .ref_i, .meas, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q16_t r2q(real r);
    return q16_t'($rtoi(r * 65536.0));
  endfunction

  function automatic real q2r(q16_t q);
    return $itor(q) / 65536.0;
  endfunction

  initial begin
    real kp, kits, ym, e, ep, ey, r, m, yprev;
    int hit_hi, hit_lo;
    kp = 5.0; kits = 655.0 / 65536.0; ym = 11337728.0 / 65536.0;
    ep = 0.0; ey = 0.0; hit_hi = 0; hit_lo = 0;
    ref_i = '0; meas = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 6000; k++) begin
      // slow drift with bursts of large constant error
      if ((k / 500) % 3 == 1)      begin r = 100.0; m = 0.0; end
      else if ((k / 500) % 3 == 2) begin r = -100.0; m = 0.0; end
      else begin
        r = 10.0 * $urandom_range(0, 1000) / 1000.0 - 5.0;
        m = 10.0 * $urandom_range(0, 1000) / 1000.0 - 5.0;
      end
      @(negedge clk);
      ref_i = r2q(r); meas = r2q(m);
      r = q2r(ref_i); m = q2r(meas);
      yprev = q2r(y);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      e  = r - m;
      ey = yprev + kp * (e - ep) + kits * e;
      ep = e;
      if (ey > ym)  begin ey = ym;  hit_hi++; end
      if (ey < -ym) begin ey = -ym; hit_lo++; end
      checks++;
      if (!out_valid) begin failures++; $display("latency"); end
      checks++;
      if (q2r(y) - ey > 1e-4 || ey - q2r(y) > 1e-4) begin
        failures++;
        $display("k=%0d y=%f expected %f", k, q2r(y), ey);
      end
      @(negedge clk);
      checks++;
      if (q2r(y) - ey > 1e-4 || ey - q2r(y) > 1e-4) begin failures++; $display("y moved without a sample"); end
    end
    checks++;
    if (hit_hi == 0 || hit_lo == 0) begin failures++; $display("limits not reached"); end
    $display("limit samples: high %0d low %0d", hit_hi, hit_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_decoupling: random v*, currents and speeds against the real-number
// decoupling law v_d = v_d* - (Rs+Rc)/Rc w Lq i_q,
// v_q = v_q* + (Rs+Rc)/Rc w (Ld i_d + lambda_m), with the example motor
// (Rs 1, Rc 200 ohm, Ld 5 mH, Lq 7 mH, lambda_m 0.1 Wb, as Q16.16 constants).
// Tolerance 0.05 V plus 0.1 % (the truncation of each Q16.16 product,
// scaled by speeds up to 1800 rad/s); one-clock latency checked.
module tb_decoupling;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  dq_t  v_star, i_dq, v_dq;
  q16_t w_r;
  int checks = 0, failures = 0;

  decoupling dut (.clk, .rst, .in_valid, .v_star, .i_dq, .w_r, .out_valid, .v_dq);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic real absr(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  initial begin
    real rs, rc, ld, lq, lm, kc, vd, vq, id, iq, w, ed, eq;
    rs = q2r(MOTOR_RS); rc = q2r(MOTOR_RC); ld = q2r(MOTOR_LD); lq = q2r(MOTOR_LQ); lm = q2r(MOTOR_LM);
    kc = (rs + rc) / rc;
    v_star = '0; i_dq = '0; w_r = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      vd = 200.0 * $urandom_range(0, 1000) / 1000.0 - 100.0;
      vq = 200.0 * $urandom_range(0, 1000) / 1000.0 - 100.0;
      id = 20.0 * $urandom_range(0, 1000) / 1000.0 - 10.0;
      iq = 20.0 * $urandom_range(0, 1000) / 1000.0 - 10.0;
      w  = 3600.0 * $urandom_range(0, 1000) / 1000.0 - 1800.0;
      @(negedge clk);
      v_star.d = r2q(vd); v_star.q = r2q(vq); i_dq.d = r2q(id); i_dq.q = r2q(iq); w_r = r2q(w);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      ed = vd - kc * w * lq * iq;
      eq = vq + kc * w * (ld * id + lm);
      checks++;
      if (!out_valid) begin failures++; $display("latency"); end
      checks++;
      if (absr(q2r(v_dq.d) - ed) > 0.05 + 1e-3 * absr(ed) ||
          absr(q2r(v_dq.q) - eq) > 0.05 + 1e-3 * absr(eq)) begin
        failures++;
        $display("v_dq %f %f expected %f %f", q2r(v_dq.d), q2r(v_dq.q), ed, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

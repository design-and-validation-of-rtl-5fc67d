// tb_dq_to_abc: random d-q voltages and angles; the outputs must be the
// balanced set v_n = V cos(theta + phi - 2 pi n/3) with V = |v_dq| and
// phi = atan2(v_q, v_d), and v_alpha/v_beta the rotated vector. Tolerance
// 0.02 V on values up to 200 V. One-clock latency is checked.
module tb_dq_to_abc;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  dq_t  v_dq;
  q16_t sin_t, cos_t, v_alpha, v_beta;
  abc_t v_abc;
  int checks = 0, failures = 0;

  dq_to_abc dut (.clk, .rst, .in_valid, .v_dq, .sin_t, .cos_t, .out_valid, .v_alpha, .v_beta, .v_abc);

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

  function automatic real absr(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic real q2r(q16_t q);
    return $itor(q) / 65536.0;
  endfunction

  initial begin
    real th, vd, vq, amp, phi, ea, eb, ec, eal, ebe;
    v_dq = '0; sin_t = '0; cos_t = Q_ONE;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      th = 6.2831853 * $urandom_range(0, 100000) / 100000.0 - 3.14159265;
      vd = 280.0 * $urandom_range(0, 1000) / 1000.0 - 140.0;
      vq = 280.0 * $urandom_range(0, 1000) / 1000.0 - 140.0;
      amp = $sqrt(vd * vd + vq * vq);
      phi = $atan2(vq, vd);
      ea  = amp * $cos(th + phi);
      eb  = amp * $cos(th + phi - 2.0943951);
      ec  = amp * $cos(th + phi + 2.0943951);
      eal = amp * $cos(th + phi);
      ebe = amp * $sin(th + phi);
      @(negedge clk);
      v_dq.d = r2q(vd); v_dq.q = r2q(vq); sin_t = r2q($sin(th)); cos_t = r2q($cos(th));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("latency"); end
      checks++;
      if (absr(q2r(v_abc.a) - ea) > 0.02 || absr(q2r(v_abc.b) - eb) > 0.02 ||
          absr(q2r(v_abc.c) - ec) > 0.02) begin
        failures++;
        $display("v_abc %f %f %f expected %f %f %f", q2r(v_abc.a), q2r(v_abc.b), q2r(v_abc.c), ea, eb, ec);
      end
      checks++;
      if (absr(q2r(v_alpha) - eal) > 0.02 || absr(q2r(v_beta) - ebe) > 0.02) begin
        failures++;
        $display("v_ab %f %f expected %f %f", q2r(v_alpha), q2r(v_beta), eal, ebe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

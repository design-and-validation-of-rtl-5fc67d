// tb_svm_duty: random phase references (inside and beyond the linear range)
// against a real-number model of the duty-cycle SVM:
// U* = -(max+min)/2, d = 1/2 + (V + U*)/Vcc clamped to [0,1],
// T_ON = round(50 (1-d)), T_OFF = 100 - T_ON. Also checks the one-clock
// latency and that the pulse is centred (T_ON + T_OFF = T_PWM).
module tb_svm_duty;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic v_valid = 1'b0, t_valid;
  abc_t v_ref;
  q16_t duty [3];
  logic [5:0] t_on [3];
  logic [6:0] t_off [3];
  int checks = 0, failures = 0;

  svm_duty dut (.clk, .rst, .v_valid, .v_ref, .t_valid, .duty, .t_on, .t_off);

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

  initial begin
    real vr [3];
    real vcc, vmax, vmin, u, d, ton_r;
    int  ton_e;
    vcc = 300.0;
    v_ref = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      real amp, ang;
      amp = (t % 4 == 3) ? 220.0 : 170.0 * $urandom_range(0, 1000) / 1000.0;
      ang = 6.2831853 * $urandom_range(0, 100000) / 100000.0;
      vr[0] = amp * $cos(ang);
      vr[1] = amp * $cos(ang - 2.0943951);
      vr[2] = amp * $cos(ang + 2.0943951);
      @(negedge clk);
      v_ref.a = r2q(vr[0]); v_ref.b = r2q(vr[1]); v_ref.c = r2q(vr[2]);
      v_valid = 1'b1;
      @(negedge clk);
      v_valid = 1'b0;
      checks++;
      if (!t_valid) begin failures++; $display("latency: t_valid not set after one clock"); end
      vmax = vr[0]; vmin = vr[0];
      for (int n = 1; n < 3; n++) begin
        if (vr[n] > vmax) vmax = vr[n];
        if (vr[n] < vmin) vmin = vr[n];
      end
      u = -(vmax + vmin) / 2.0;
      for (int n = 0; n < 3; n++) begin
        d = 0.5 + (vr[n] + u) / vcc;
        if (d < 0.0) d = 0.0;
        if (d > 1.0) d = 1.0;
        ton_r = 50.0 * (1.0 - d);
        ton_e = $rtoi(ton_r + 0.5);
        checks++;
        if ($itor(duty[n]) / 65536.0 - d > 0.001 || d - $itor(duty[n]) / 65536.0 > 0.001) begin
          failures++; $display("duty %f expected %f", $itor(duty[n]) / 65536.0, d);
        end
        checks++;
        // allow one step only where the exact value sits on a rounding edge
        if (int'(t_on[n]) != ton_e &&
            !((ton_r - $floor(ton_r) > 0.499) && (ton_r - $floor(ton_r) < 0.501))) begin
          failures++; $display("t_on %0d expected %0d (%f)", t_on[n], ton_e, ton_r);
        end
        checks++;
        if (int'(t_on[n]) + int'(t_off[n]) != 100) begin
          failures++; $display("t_on + t_off = %0d", t_on[n] + t_off[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

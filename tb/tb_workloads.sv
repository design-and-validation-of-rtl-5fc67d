// tb_workloads: the three kinds of evaluation of the minimum-loss controller,
// run closed loop against the behavioural inverter + PMSM model with the
// top at its default parameters:
//   speed profile  - steady speeds of 500, 1000 and 1500 rad/s electrical
//                    (1190, 2390, 3580 rpm with the model's 4 pole pairs)
//                    at 0.5 Nm load;
//   torque profile - loads of 0.4, 1.0 and 2.0 Nm at 1000 rad/s;
//   detuned motor  - the plant's Rs, Rc, Ld, Lq and lambda_m 10 % above the
//                    constants the controller is built with, at 1000 rad/s;
//   9-bit sensing  - nominal motor at 1000 rad/s, with the angle and speed
//                    seen through a 9-bit effective ADC resolution.
// At each point the motor runs with classical FOC (i_d* = 0), then with the
// bisection LMA, then with the model-based LMA. For each the mean machine
// loss and efficiency (power delivered to the load and friction, over that
// power plus the electrical loss) are measured over 2 ms, and the efficiency gain over classical FOC is printed.
// Checks: the speed is held within 5 %, each LMA lowers the losses, and with
// the nominal motor each LMA's i_d* lies within 50 mA of the exact optimum.
module tb_workloads;
  import hil_pkg::*;
  import motor_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] lma_mode = 2'd0;
  q16_t w_ref = '0, w_meas, theta, i_a, i_b;
  logic [2:0] s_abc;
  logic sample_en, out_valid, period_start, lma_done;
  dq_t  i_dq, v_dq;
  q16_t id_ref, iq_ref, v_alpha, v_beta;
  abc_t v_abc;
  q16_t duty [3];
  int checks = 0, failures = 0;

  foc_lma_top dut (
    .clk, .rst, .lma_mode, .w_ref, .w_meas, .theta, .i_a, .i_b,
    .s_abc, .sample_en, .out_valid, .period_start, .i_dq, .id_ref, .iq_ref,
    .lma_done, .v_dq, .v_abc, .v_alpha, .v_beta, .duty
  );

  pmsm_plant_model plant (.clk, .s_abc, .i_a, .i_b, .theta_q(theta), .w_q(w_meas));

  always #5 clk = ~clk;

  initial begin
    repeat (50_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run, then measure mean loss and efficiency over 2 ms
  task automatic measure(input int settle_ms, output real loss, output real eff);
    real acc_w, acc_p, pout;
    repeat (settle_ms * 100_000) @(posedge clk);
    acc_w = 0.0; acc_p = 0.0;
    for (int k = 0; k < 200; k++) begin
      repeat (1000) @(posedge clk);
      acc_w += plant.loss();
      acc_p += (plant.cr + plant.fv * plant.wm) * plant.wm;
    end
    loss = acc_w / 200.0;
    pout = acc_p / 200.0;
    eff  = pout / (pout + loss);
  endtask

  task automatic point(input string name, input real w, input real load, input bit nominal,
                       input int settle_cls);
    real l_c, e_c, l_b, e_b, l_m, e_m, opt;
    plant.cr = load;
    w_ref = r2q(w);
    lma_mode = 2'd0;
    measure(settle_cls, l_c, e_c);
    checks++;
    if (absr(plant.we - w) > 0.05 * w) begin failures++; $display("%s: speed %f", name, plant.we); end
    for (int m = 0; m < 2; m++) begin
      lma_mode = (m == 0) ? 2'd2 : 2'd1;
      if (m == 0) measure(6, l_b, e_b);
      else        measure(6, l_m, e_m);
      opt = id_opt(q2r(i_dq.q), q2r(w_meas));
      checks++;
      if (absr(plant.we - w) > 0.05 * w) begin failures++; $display("%s: speed %f", name, plant.we); end
      checks++;
      if (nominal && absr(q2r(id_ref) - opt) > 0.05) begin
        failures++; $display("%s mode %0d: i_d* %f, optimum %f", name, lma_mode, q2r(id_ref), opt);
      end
      checks++;
      if (((m == 0) ? l_b : l_m) >= l_c) begin failures++; $display("%s mode %0d: no loss reduction", name, lma_mode); end
    end
    $display("%s: classical eff %6.3f %%  loss %7.3f W | bisection %6.3f %% (%7.3f W) | model-based %6.3f %% (%7.3f W)",
             name, 100.0 * e_c, l_c, 100.0 * (e_b - e_c), l_b, 100.0 * (e_m - e_c), l_m);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    point("speed 500 rad/s",  500.0,  0.5, 1'b1, 25);
    point("speed 1000 rad/s", 1000.0, 0.5, 1'b1, 20);
    point("speed 1500 rad/s", 1500.0, 0.5, 1'b1, 20);
    point("load 0.4 Nm",      1000.0, 0.4, 1'b1, 20);
    point("load 1.0 Nm",      1000.0, 1.0, 1'b1, 15);
    point("load 2.0 Nm",      1000.0, 2.0, 1'b1, 15);
    // detuned plant: 10 % above the controller's constants
    plant.rs = 1.1 * plant.rs; plant.rc = 1.1 * plant.rc; plant.ld = 1.1 * plant.ld;
    plant.lq = 1.1 * plant.lq; plant.lm = 1.1 * plant.lm;
    point("detuned, 1000 rad/s", 1000.0, 0.5, 1'b0, 20);
    plant.rs = plant.rs / 1.1; plant.rc = plant.rc / 1.1; plant.ld = plant.ld / 1.1;
    plant.lq = plant.lq / 1.1; plant.lm = plant.lm / 1.1;
    plant.adc_bits = 9;
    point("9-bit sensing, 1000 rad/s", 1000.0, 0.5, 1'b0, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

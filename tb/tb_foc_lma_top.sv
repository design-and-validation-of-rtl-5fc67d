// tb_foc_lma_top: closed-loop run of the whole controller, at its default
// parameters, against the behavioural inverter + PMSM model.
//   1. classical FOC (i_d* = 0): the motor starts from rest with a 0.5 Nm
//      load and accelerates to w_ref = 1000 rad/s (electrical); i_q* must
//      hit its 10 A limit on the way, the speed must settle within 3 %, and
//      the measured i_d stay near 0;
//   2. bisection LMA, then 3. model-based LMA, each for 8 ms at the same
//      speed and load: i_d* must approach the exact loss minimiser of the
//      present operating point, the measured i_d must follow it, and the
//      machine's losses must fall below those of classical FOC.
// It also checks the PWM: every period lasts 10000 clocks (100 us), and
// the output stages of the modulator switch in every period.
// Counted mechanisms: samples, PWM periods, current-limit samples, policy
// switches, LMA searches per policy; a failure is counted for any that never
// happened.
module tb_foc_lma_top;
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
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  int n_sample = 0, n_period = 0, n_limit = 0, n_switch = 0;
  int n_search [3] = '{0, 0, 0};
  int last_period = -1, cyc = 0, bad_period = 0;
  logic [2:0] toggled = '0, s_prev = '0;
  int no_switching = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (sample_en) n_sample++;
      if (sample_en && (iq_ref == 32'sd655360)) n_limit++;
      if (lma_done) n_search[lma_mode]++;
      toggled = toggled | (s_abc ^ s_prev);
      s_prev  = s_abc;
      if (period_start) begin
        n_period++;
        if (last_period >= 0 && cyc - last_period != 10000) bad_period++;
        if (n_period > 20 && toggled != 3'b111) no_switching++;
        last_period = cyc;
        toggled = '0;
      end
    end
  end

  // run for a number of milliseconds and return the mean loss of the machine
  task automatic run_ms(input int ms, output real mean_loss);
    real acc;
    acc = 0.0;
    for (int k = 0; k < ms * 100; k++) begin
      repeat (1000) @(posedge clk);
      acc += plant.loss();
    end
    mean_loss = acc / (ms * 100);
  endtask

  task automatic check_lma(input string name, input real w_cls);
    real w_lma, opt, iqm, wm;
    run_ms(8, w_lma);      // settle
    run_ms(2, w_lma);      // measure
    iqm = q2r(i_dq.q); wm = plant.we;
    opt = id_opt(iqm, wm);
    $display("%s: speed %f, i_d* %f (minimiser %f), i_d %f, i_q %f, loss %f W (classical %f W)",
             name, wm, q2r(id_ref), opt, plant.id, plant.iq, w_lma, w_cls);
    checks++;
    if (absr(wm - 1000.0) > 30.0) begin failures++; $display("%s: speed off", name); end
    checks++;
    if (absr(q2r(id_ref) - opt) > 0.05) begin failures++; $display("%s: i_d* off the minimiser", name); end
    checks++;
    if (absr(plant.id - q2r(id_ref)) > 0.3) begin failures++; $display("%s: i_d does not follow", name); end
    checks++;
    if (!(w_lma < w_cls - 0.05)) begin failures++; $display("%s: no loss reduction", name); end
  endtask

  initial begin
    real w_cls;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // 1. classical FOC, start-up
    lma_mode = 2'd0;
    w_ref = r2q(1000.0);
    run_ms(37, w_cls);
    run_ms(3, w_cls);
    $display("classical: speed %f, i_d %f, i_q %f, loss %f W", plant.we, plant.id, plant.iq, w_cls);
    checks++;
    if (absr(plant.we - 1000.0) > 30.0) begin failures++; $display("speed not reached"); end
    checks++;
    if (absr(plant.id) > 0.3) begin failures++; $display("i_d not held at 0"); end
    // 2. bisection LMA
    lma_mode = 2'd2; n_switch++;
    check_lma("bisection", w_cls);
    // 3. model-based LMA
    lma_mode = 2'd1; n_switch++;
    check_lma("model-based", w_cls);
    // mechanisms
    $display("samples %0d, PWM periods %0d, current-limit samples %0d, policy switches %0d, searches %0d/%0d",
             n_sample, n_period, n_limit, n_switch, n_search[1], n_search[2]);
    checks++;
    if (bad_period != 0) begin failures++; $display("%0d PWM periods of wrong length", bad_period); end
    checks++;
    if (no_switching != 0) begin failures++; $display("%0d PWM periods without switching", no_switching); end
    checks++;
    if (n_sample == 0 || n_period == 0 || n_limit == 0 || n_switch == 0 ||
        n_search[1] == 0 || n_search[2] == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// foc_lma_top: digital controller of a permanent-magnet synchronous motor
// with minimum-losses field-oriented control and space-vector PWM, the part
// of the hardware-in-the-loop set-up that runs in the FPGA. The motor,
// inverter and sensors are simulated outside; this block sees their sampled
// values and returns the three upper-switch commands S_A, S_B, S_C.
//
// Signal flow (the design's block diagram), every 10 us sample:
//   i_a, i_b, theta --abc_to_dq--> i_d, i_q
//   w_ref, w, i_q ---lma_unit----> i_q* (speed PI), i_d* (LMA policy)
//   i_d* - i_d, i_q* - i_q --pi_ctrl x2--> v_d*, v_q*
//   v*, i_dq, w ---decoupling----> v_d, v_q
//   v_dq, theta ---dq_to_abc-----> v_a, v_b, v_c (and v_alpha, v_beta)
//   v_abc ---------svm_duty------> switch-on instants T_ON,n
//   T_ON,n --------pwm_gen-------> S_A, S_B, S_C (10 kHz, 1 MHz counter)
// One sincos_cordic serves both transforms; clk_div makes the 1 MHz counter
// step and the 100 kHz sample pulse from the system clock.
// Timing: sample_en latches the inputs; the new switch-on instants are ready
// CTRL_LAT = ITER + 7 = 23 clocks later (out_valid pulse) and take effect at
// the start of the next PWM period. With the 100 MHz clock assumed here a
// sample period has 1000 clocks, so the chain is far from its limit.
// All analogue quantities are Q16.16: amperes, volts, radians and electrical
// rad/s. Interfaces, clock frequency, gains and motor constants are this
// design's choices where the design gives none (see each block).
module foc_lma_top
  import hil_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned CNT_HZ    = 1_000_000,
  parameter int unsigned SAMPLE_HZ = 100_000,
  parameter int unsigned HALF      = 50,       // T_PWM/2 in counter steps
  parameter q16_t        VCC       = DC_LINK,
  parameter q16_t        KP_I      = 32'sd327680, // current PI: 5 V/A
  parameter q16_t        KI_TS_I   = 32'sd655,    // Ki = 1000 V/(A s)
  parameter q16_t        V_LIM     = 32'sd11337728 // 173 V
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] lma_mode,   // 0 classical FOC, 1 model-based, 2 bisection
  input  q16_t       w_ref,      // speed reference
  input  q16_t       w_meas,     // measured electrical speed
  input  q16_t       theta,      // measured electrical angle, [-pi, pi]
  input  q16_t       i_a,        // measured phase currents
  input  q16_t       i_b,
  output logic [2:0] s_abc,      // upper switch commands (bit 0 = S_A)
  output logic       sample_en,  // 100 kHz sample instant
  output logic       out_valid,  // new switch-on instants computed
  output logic       period_start,
  output dq_t        i_dq,       // measured currents in d-q
  output q16_t       id_ref,
  output q16_t       iq_ref,
  output logic       lma_done,
  output dq_t        v_dq,       // decoupled voltage commands
  output abc_t       v_abc,      // phase voltage references
  output q16_t       v_alpha,
  output q16_t       v_beta,
  output q16_t       duty [3]
);
  localparam int unsigned TW = $clog2(HALF+1);

  logic cnt_en;
  clk_div #(.CLK_HZ(CLK_HZ), .CNT_HZ(CNT_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_div (
    .clk, .rst, .cnt_en, .sample_en
  );

  // inputs sampled at the sampling instant
  q16_t ia_s, ib_s, th_s, w_s, wr_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      ia_s <= '0; ib_s <= '0; th_s <= '0; w_s <= '0; wr_s <= '0;
    end else if (sample_en) begin
      ia_s <= i_a; ib_s <= i_b; th_s <= theta; w_s <= w_meas; wr_s <= w_ref;
    end
  end

  logic start_sc;
  always_ff @(posedge clk) begin
    if (rst) start_sc <= 1'b0;
    else     start_sc <= sample_en;
  end

  logic sc_busy, sc_done;
  q16_t sin_t, cos_t;
  sincos_cordic u_sincos (
    .clk, .rst, .start(start_sc), .theta(th_s),
    .busy(sc_busy), .done(sc_done), .sin_o(sin_t), .cos_o(cos_t)
  );

  logic idq_valid;
  abc_to_dq u_abc2dq (
    .clk, .rst, .in_valid(sc_done), .i_a(ia_s), .i_b(ib_s),
    .sin_t, .cos_t, .out_valid(idq_valid), .i_dq
  );

  // LMA and speed loop: run on the measured i_q of the previous sample
  logic iq_valid;
  lma_unit u_lma (
    .clk, .rst, .sample(start_sc), .lma_mode,
    .w_ref(wr_s), .w_r(w_s), .i_q(i_dq.q),
    .iq_valid, .iq_ref, .id_ref, .lma_done
  );

  logic vd_valid, vq_valid;
  dq_t  v_star;
  pi_ctrl #(.KP(KP_I), .KI_TS(KI_TS_I), .Y_MAX(V_LIM), .Y_MIN(-V_LIM)) u_pi_d (
    .clk, .rst, .in_valid(idq_valid), .ref_i(id_ref), .meas(i_dq.d),
    .out_valid(vd_valid), .y(v_star.d)
  );
  pi_ctrl #(.KP(KP_I), .KI_TS(KI_TS_I), .Y_MAX(V_LIM), .Y_MIN(-V_LIM)) u_pi_q (
    .clk, .rst, .in_valid(idq_valid), .ref_i(iq_ref), .meas(i_dq.q),
    .out_valid(vq_valid), .y(v_star.q)
  );

  logic vdq_valid;
  decoupling u_dec (
    .clk, .rst, .in_valid(vd_valid), .v_star, .i_dq, .w_r(w_s),
    .out_valid(vdq_valid), .v_dq
  );

  logic vabc_valid;
  dq_to_abc u_dq2abc (
    .clk, .rst, .in_valid(vdq_valid), .v_dq, .sin_t, .cos_t,
    .out_valid(vabc_valid), .v_alpha, .v_beta, .v_abc
  );

  logic [TW-1:0]                t_on  [3];
  logic [$clog2(2*HALF+1)-1:0] t_off [3];
  svm_duty #(.VCC(VCC), .HALF(HALF)) u_svm (
    .clk, .rst, .v_valid(vabc_valid), .v_ref(v_abc),
    .t_valid(out_valid), .duty, .t_on, .t_off
  );

  logic [TW-1:0] count;
  logic          up;
  pwm_gen #(.HALF(HALF)) u_pwm (
    .clk, .rst, .cnt_en, .t_on_i(t_on), .load(out_valid),
    .count, .up, .s(s_abc), .period_start
  );

  logic unused;
  assign unused = ^{sc_busy, iq_valid, vq_valid, count, up,
                    t_off[0], t_off[1], t_off[2]};
endmodule

// pmsm_plant_model: behavioural (non-synthesizable) model of the plant that
// the controller drives in the hardware-in-the-loop set-up: an ideal
// two-level voltage-source inverter, the PMSM with iron losses, and ideal
// speed, position and current sensors. Real-number arithmetic, forward Euler,
// one integration step every STEP_CLKS clocks of CLK_PERIOD_NS.
//   inverter:  v_n = Vcc/3 (2 S_n - S_other1 - S_other2), amplitude-invariant
//              Park transform to v_d, v_q at the rotor angle
//   machine:   v_d = Rs i_d + (Rs+Rc)/Rc (d lambda_d/dt - w lambda_q)
//              v_q = Rs i_q + (Rs+Rc)/Rc (d lambda_q/dt + w lambda_d)
//              lambda_d = Ld i_d + lambda_m, lambda_q = Lq i_q
//              C_e = 3/2 p (lambda_m i_q - (Ld - Lq) i_d i_q)
//              J dw_m/dt = C_e - C_r - f_v w_m,  w = p w_m
// Electrical constants are the controller's example motor; p, J, f_v and the
// load torque C_r are set here. The loss W of the present state is available
// as loss(). Setting adc_bits to N > 0 quantises the angle (full scale
// [-pi, pi)) and the speed (full scale +-W_FS rad/s) to N bits, as an ADC of
// that effective resolution would; 0 leaves them exact.
module pmsm_plant_model
  import hil_pkg::*;
#(
  parameter int  STEP_CLKS     = 50,
  parameter real CLK_PERIOD_NS = 10.0
) (
  input  logic       clk,
  input  logic [2:0] s_abc,
  output q16_t       i_a,
  output q16_t       i_b,
  output q16_t       theta_q,
  output q16_t       w_q
);
  real rs, rc, ld, lq, lm, vcc, pp, jm, fv, cr, dt;
  real lam_d, lam_q, id, iq, wm, we, th;
  real va, vb, vc, vd, vq, ce;
  int  cnt;
  int  adc_bits;
  localparam real W_FS = 2000.0;

  function automatic real quant(real v, real fs);
    real lsb;
    if (adc_bits <= 0) return v;
    lsb = 2.0 * fs / (2.0 ** adc_bits);
    return lsb * $floor(v / lsb);
  endfunction

  function automatic real qr(q16_t q);
    return $itor(q) / 65536.0;
  endfunction

  function automatic real loss();
    real a, b, fd, fq;
    fd = lm + ld * id;
    fq = lq * iq;
    a  = id - we * fq / rc;
    b  = iq - we * fd / rc;
    return 1.5 * rs * (a * a + b * b) + 1.5 * we * we / rc * (fq * fq + fd * fd);
  endfunction

  initial begin
    rs = qr(MOTOR_RS); rc = qr(MOTOR_RC); ld = qr(MOTOR_LD); lq = qr(MOTOR_LQ);
    lm = qr(MOTOR_LM); vcc = qr(DC_LINK);
    pp = 4.0; jm = 2.0e-4; fv = 1.0e-4; cr = 0.5;
    dt = STEP_CLKS * CLK_PERIOD_NS * 1.0e-9;
    id = 0.0; iq = 0.0; lam_d = lm; lam_q = 0.0;
    wm = 0.0; we = 0.0; th = 0.0; cnt = 0; adc_bits = 0;
  end

  always @(posedge clk) begin
    cnt = cnt + 1;
    if (cnt == STEP_CLKS) begin
      cnt = 0;
      va = vcc / 3.0 * (2.0 * s_abc[0] - s_abc[1] - s_abc[2]);
      vb = vcc / 3.0 * (2.0 * s_abc[1] - s_abc[0] - s_abc[2]);
      vc = vcc / 3.0 * (2.0 * s_abc[2] - s_abc[0] - s_abc[1]);
      vd = 2.0 / 3.0 * (va * $cos(th) + vb * $cos(th - 2.0943951) + vc * $cos(th + 2.0943951));
      vq = -2.0 / 3.0 * (va * $sin(th) + vb * $sin(th - 2.0943951) + vc * $sin(th + 2.0943951));
      lam_d = lam_d + dt * ((vd - rs * id) * rc / (rs + rc) + we * lam_q);
      lam_q = lam_q + dt * ((vq - rs * iq) * rc / (rs + rc) - we * lam_d);
      id = (lam_d - lm) / ld;
      iq = lam_q / lq;
      ce = 1.5 * pp * (lm * iq - (ld - lq) * id * iq);
      wm = wm + dt * (ce - cr - fv * wm) / jm;
      we = pp * wm;
      th = th + dt * we;
      if (th > 3.14159265) th = th - 6.2831853;
      if (th < -3.14159265) th = th + 6.2831853;
    end
  end

  always_comb begin
    i_a     = q16_t'($rtoi(65536.0 * (id * $cos(th) - iq * $sin(th))));
    i_b     = q16_t'($rtoi(65536.0 * (id * $cos(th - 2.0943951) - iq * $sin(th - 2.0943951))));
    theta_q = q16_t'($rtoi(65536.0 * quant(th, 3.14159265)));
    w_q     = q16_t'($rtoi(65536.0 * quant(we, W_FS)));
  end
endmodule

// svm_duty: space-vector modulation by the duty-cycle method.
//
// From the three phase voltage references V_ra, V_rb, V_rc it computes the
// common-mode offset U* = -(max(V_r) + min(V_r))/2, the duty cycles
// d_n = 1/2 + (V_rn + U*)/V_cc and the switch-on / switch-off instants
// T_ON,n = T_PWM/2 (1 - d_n), T_OFF,n = T_PWM/2 (1 + d_n) of each phase, all
// as given by the design; no sector search or trigonometry is needed. Adding
// U* centres the references in the DC link, which is what makes the result
// equal to the space-vector switching pattern.
// Division by V_cc is a multiplication by the constant 1/V_cc, held with 32
// fractional bits (V_cc is a parameter). Duties are clamped to [0,1] (over-modulation handling is this
// design's choice). The instants are expressed in PWM counter steps
// (1 us, T_PWM/2 = HALF = 50 steps) and rounded to the nearest step.
// Timing: one clock of latency, v_valid -> t_valid.
module svm_duty
  import hil_pkg::*;
#(
  parameter q16_t        VCC  = DC_LINK,  // DC-link voltage, Q16.16
  parameter int unsigned HALF = 50        // T_PWM/2 in counter steps
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      v_valid,
  input  abc_t                      v_ref,
  output logic                      t_valid,
  output q16_t                      duty  [3],
  output logic [$clog2(HALF+1)-1:0] t_on  [3],
  output logic [$clog2(2*HALF+1)-1:0] t_off [3]
);
  localparam logic signed [63:0] INV_VCC = q_recip32(VCC);  // 1/Vcc, 32 fraction bits
  localparam int unsigned W  = $clog2(HALF+1);
  localparam int unsigned WO = $clog2(2*HALF+1);

  q16_t vr [3];
  q16_t vmax, vmin, ustar;
  q16_t d_c [3];
  logic [W-1:0] on_c [3];

  always_comb begin
    vr[0] = v_ref.a;
    vr[1] = v_ref.b;
    vr[2] = v_ref.c;
    vmax = vr[0];
    vmin = vr[0];
    for (int n = 1; n < 3; n++) begin
      if (vr[n] > vmax) vmax = vr[n];
      if (vr[n] < vmin) vmin = vr[n];
    end
    ustar = q16_t'(-((33'(vmax) + 33'(vmin)) >>> 1));
    for (int n = 0; n < 3; n++) begin
      logic signed [63:0] ton;
      d_c[n] = q_add(Q_ONE >>> 1, q_sat(96'((64'(q_add(vr[n], ustar)) * INV_VCC) >>> 32)));
      if (d_c[n] < 0)     d_c[n] = '0;
      if (d_c[n] > Q_ONE) d_c[n] = Q_ONE;
      ton = 64'(HALF) * 64'(Q_ONE - d_c[n]);     // Q16.16 counter steps
      on_c[n] = W'((ton + 64'sd32768) >>> QF);   // round to nearest step
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t_valid <= 1'b0;
      for (int n = 0; n < 3; n++) begin
        duty[n]  <= '0;
        t_on[n]  <= W'(HALF);
        t_off[n] <= WO'(HALF);
      end
    end else begin
      t_valid <= v_valid;
      if (v_valid) begin
        for (int n = 0; n < 3; n++) begin
          duty[n]  <= d_c[n];
          t_on[n]  <= on_c[n];
          t_off[n] <= WO'(2*HALF) - WO'(on_c[n]);
        end
      end
    end
  end
endmodule

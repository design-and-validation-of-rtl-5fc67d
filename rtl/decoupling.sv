// decoupling: state-feedback decoupling of the d and q axes.
//
// With the magnetising flux lambda_d = L_d i_d + lambda_m and
// lambda_q = L_q i_q, the cross-coupling terms of the voltage equations are
// cancelled by
//   v_d = v_d* - ((Rs + Rc)/Rc) w_r lambda_q
//   v_q = v_q* + ((Rs + Rc)/Rc) w_r lambda_d
// so the two current loops can be tuned as independent first-order systems.
// These equations are the design's; the constants are motor parameters
// (example values from hil_pkg), the factor (Rs+Rc)/Rc is formed at
// elaboration. v_d*, v_q* come from the current PIs; i_d, i_q are the measured
// currents and w_r is the electrical speed in rad/s. All values are Q16.16.
// Timing: one register stage, in_valid -> out_valid one clock later.
module decoupling
  import hil_pkg::*;
#(
  parameter q16_t RS  = MOTOR_RS,
  parameter q16_t RC  = MOTOR_RC,
  parameter q16_t LD  = MOTOR_LD,
  parameter q16_t LQ  = MOTOR_LQ,
  parameter q16_t LM  = MOTOR_LM
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  dq_t  v_star,
  input  dq_t  i_dq,
  input  q16_t w_r,
  output logic out_valid,
  output dq_t  v_dq
);
  localparam q16_t KC = q_div(q_add(RS, RC), RC);

  q16_t lam_d, lam_q;
  dq_t  v_c;

  always_comb begin
    lam_d  = q_add(q_mul(LD, i_dq.d), LM);
    lam_q  = q_mul(LQ, i_dq.q);
    v_c.d  = q_sub(v_star.d, q_mul(KC, q_mul(w_r, lam_q)));
    v_c.q  = q_add(v_star.q, q_mul(KC, q_mul(w_r, lam_d)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      v_dq      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) v_dq <= v_c;
    end
  end
endmodule

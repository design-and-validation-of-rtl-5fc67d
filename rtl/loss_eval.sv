// loss_eval: evaluates the total electrical losses W of the PMSM (copper
// losses in Rs plus iron losses in the equivalent resistance Rc) at a trial
// d-axis current, for the loss-minimisation search:
//   W(i_d, i_q, w) = 3/2 Rs [ (i_d - w Lq i_q / Rc)^2
//                            + (i_q - w (lambda_m + Ld i_d) / Rc)^2 ]
//                  + 3 w^2 / (2 Rc) [ (Lq i_q)^2 + (lambda_m + Ld i_d)^2 ]
// The expression is the design's. How it is evaluated is this design's choice:
// the back-EMF terms e_d = w Lq i_q and e_q = w (lambda_m + Ld i_d) are formed
// first, so w^2 is never formed on its own (it would overflow Q16.16 at
// speed), and division by Rc is a multiplication by a 32-fractional-bit
// reciprocal constant. Inputs and W are Q16.16 (W in watts, saturated);
// intermediate values are kept at 128 bits with 32 fractional bits. That
// extra precision matters: the search compares W at currents 2 mA apart,
// and with 16 fractional bits the rounding of the flux L_d i_d, multiplied
// by the speed, would swamp that difference near the optimum.
// Timing: a two-stage pipeline; a new operand set may enter every clock and
// w_valid follows in_valid two clocks later.
module loss_eval
  import hil_pkg::*;
#(
  parameter q16_t RS = MOTOR_RS,
  parameter q16_t RC = MOTOR_RC,
  parameter q16_t LD = MOTOR_LD,
  parameter q16_t LQ = MOTOR_LQ,
  parameter q16_t LM = MOTOR_LM
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q16_t i_d,
  input  q16_t i_q,
  input  q16_t w_r,
  output logic w_valid,
  output q16_t w_loss
);
  localparam int unsigned WF = 32;         // fractional bits inside
  typedef logic signed [127:0] wide_t;

  localparam wide_t INV_RC = 128'(q_recip32(RC));  // 1/Rc, 32 fractional bits

  function automatic wide_t wmul(input wide_t a, input wide_t b);
    return (a * b) >>> WF;
  endfunction

  // Q16.16 input to the internal format
  function automatic wide_t wide(input q16_t v);
    return 128'(v) <<< (WF - QF);
  endfunction

  // stage 1: currents corrected by the iron-loss branch, and back-EMFs
  wide_t e_d, e_q, a_c, b_c;
  wide_t e_d_r, e_q_r, a_r, b_r;
  logic  v1;

  always_comb begin
    e_d = wmul(wide(w_r), wmul(wide(LQ), wide(i_q)));
    e_q = wmul(wide(w_r), wmul(wide(LD), wide(i_d)) + wide(LM));
    a_c = wide(i_d) - wmul(e_d, INV_RC);
    b_c = wide(i_q) - wmul(e_q, INV_RC);
  end

  // stage 2: the loss itself
  wide_t cu, fe, w_c;
  localparam wide_t RS_3_2  = (wide(RS) * 3) >>> 1;

  always_comb begin
    cu  = wmul(RS_3_2, wmul(a_r, a_r) + wmul(b_r, b_r));
    fe  = wmul(((wmul(e_d_r, e_d_r) + wmul(e_q_r, e_q_r)) * 3) >>> 1, INV_RC);
    w_c = cu + fe;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1      <= 1'b0;
      w_valid <= 1'b0;
      e_d_r   <= '0;
      e_q_r   <= '0;
      a_r     <= '0;
      b_r     <= '0;
      w_loss  <= '0;
    end else begin
      v1      <= in_valid;
      w_valid <= v1;
      e_d_r   <= e_d;
      e_q_r   <= e_q;
      a_r     <= a_c;
      b_r     <= b_c;
      if (v1) w_loss <= q_sat(96'(w_c >>> (WF - QF)));
    end
  end
endmodule

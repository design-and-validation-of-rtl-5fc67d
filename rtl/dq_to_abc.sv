// dq_to_abc: transforms the d-q voltage commands back to the stator frame
// (inverse Park then inverse Clarke transform) for the modulator.
//
//   v_alpha = v_d cos(theta) - v_q sin(theta)
//   v_beta  = v_d sin(theta) + v_q cos(theta)
//   v_a = v_alpha
//   v_b = -v_alpha/2 + (sqrt(3)/2) v_beta
//   v_c = -v_alpha/2 - (sqrt(3)/2) v_beta
// Both the alpha-beta pair and the three phase references are brought out,
// as the block diagram of the controller shows both leaving this block; the
// modulator uses the phase references. Amplitude-invariant scaling, the
// inverse of abc_to_dq, is this design's choice. All values are Q16.16.
// Timing: one register stage, in_valid -> out_valid one clock later.
module dq_to_abc
  import hil_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  dq_t  v_dq,
  input  q16_t sin_t,
  input  q16_t cos_t,
  output logic out_valid,
  output q16_t v_alpha,
  output q16_t v_beta,
  output abc_t v_abc
);
  localparam q16_t SQRT3_2 = 32'sd56756;  // sqrt(3)/2

  q16_t al_c, be_c, half_al, be_s;
  abc_t abc_c;

  always_comb begin
    al_c    = q_sub(q_mul(v_dq.d, cos_t), q_mul(v_dq.q, sin_t));
    be_c    = q_add(q_mul(v_dq.d, sin_t), q_mul(v_dq.q, cos_t));
    half_al = al_c >>> 1;
    be_s    = q_mul(be_c, SQRT3_2);
    abc_c.a = al_c;
    abc_c.b = q_sub(be_s, half_al);
    abc_c.c = q_sub(-half_al, be_s);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      v_alpha   <= '0;
      v_beta    <= '0;
      v_abc     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_alpha <= al_c;
        v_beta  <= be_c;
        v_abc   <= abc_c;
      end
    end
  end
endmodule

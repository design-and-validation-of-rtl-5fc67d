// abc_to_dq: transforms the measured phase currents into the rotating d-q
// frame (Clarke then Park transform).
//
// Only i_a and i_b are measured, as in the controller's block diagram; with
// no neutral connection i_c = -i_a - i_b, so the amplitude-invariant Clarke
// transform is i_alpha = i_a, i_beta = (i_a + 2 i_b)/sqrt(3). The Park
// rotation by the electrical angle theta then gives
//   i_d =  i_alpha cos(theta) + i_beta sin(theta)
//   i_q = -i_alpha sin(theta) + i_beta cos(theta).
// The amplitude-invariant scaling (matching the 3/2 factor of the torque
// expression) and the sign convention are this design's choices. sin and cos
// come from a shared sincos_cordic. All values are Q16.16.
// Timing: one register stage, in_valid -> out_valid one clock later.
module abc_to_dq
  import hil_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q16_t i_a,
  input  q16_t i_b,
  input  q16_t sin_t,
  input  q16_t cos_t,
  output logic out_valid,
  output dq_t  i_dq
);
  localparam q16_t INV_SQRT3 = 32'sd37837;  // 1/sqrt(3)

  q16_t i_al, i_be;
  dq_t  dq_c;

  always_comb begin
    i_al   = i_a;
    i_be   = q_mul(q_add(i_a, q_add(i_b, i_b)), INV_SQRT3);
    dq_c.d = q_add(q_mul(i_al, cos_t), q_mul(i_be, sin_t));
    dq_c.q = q_sub(q_mul(i_be, cos_t), q_mul(i_al, sin_t));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_dq      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) i_dq <= dq_c;
    end
  end
endmodule

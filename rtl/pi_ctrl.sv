// pi_ctrl: discrete proportional-integral regulator, used for the d and q
// current loops and, inside the loss-minimisation block, for the speed loop.
//
// Each sample k (in_valid pulse, 100 kHz in the controller) it forms the error
// e(k) = ref - meas and updates its output in incremental form
//   y(k) = y(k-1) + Kp (e(k) - e(k-1)) + Ki Ts e(k),
// which is the velocity form of a PI with proportional gain Kp and integral
// gain Ki sampled every Ts. The design states the same recursion with a bare
// Kp e(k) term; read literally that is a pure integrator, so the difference
// of errors is used here to keep the proportional action. The output is
// clamped to [Y_MIN, Y_MAX], which also stops integrator wind-up; the limits
// and the gains are this design's values. All values are Q16.16; KI_TS is the
// product Ki*Ts. Reset clears y and the stored error.
// Timing: out_valid and y follow in_valid by one clock.
module pi_ctrl
  import hil_pkg::*;
#(
  parameter q16_t KP    = 32'sd327680,    // 5.0
  parameter q16_t KI_TS = 32'sd655,       // 0.01 (Ki = 1000 /s, Ts = 10 us)
  parameter q16_t Y_MAX = 32'sd11337728,  // 173 (about V_cc/sqrt(3))
  parameter q16_t Y_MIN = -32'sd11337728
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q16_t ref_i,
  input  q16_t meas,
  output logic out_valid,
  output q16_t y
);
  q16_t e, e_prev, y_next;

  always_comb begin
    e      = q_sub(ref_i, meas);
    y_next = q_add(y, q_add(q_mul(KP, q_sub(e, e_prev)), q_mul(KI_TS, e)));
    if (y_next > Y_MAX) y_next = Y_MAX;
    if (y_next < Y_MIN) y_next = Y_MIN;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '0;
      e_prev    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y      <= y_next;
        e_prev <= e;
      end
    end
  end

  initial assert (Y_MIN < Y_MAX) else $error("pi_ctrl: Y_MIN must be below Y_MAX");
endmodule

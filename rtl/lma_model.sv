// lma_model: model-based (open-loop) loss-minimisation algorithm. From the
// machine model it computes directly the d-axis current that minimises the
// loss W(i_d, i_q, w) of the loss model used by the whole controller.
//
// W is a quadratic in i_d, so its minimum is where dW/di_d = 0. With
// k = w/Rc this gives, solved once off line and evaluated here,
//   i_d* = [Rs k i_q (Ld + Lq) - Ld lambda_m k (Rs k + w)]
//          / [Rs + Ld^2 k (Rs k + w)].
// That the reference is a model-based closed form is the design's; the
// closed form above is derived here from the loss expression the controller
// uses, because the design does not print it. As in the design this block
// alone works in 64-bit Q32.32 and the result is truncated to Q16.16. It is
// also clamped to the +-10 A search range of the bisection LMA (own choice).
// The single division is done by div_seq, one bit per clock.
// Interface: start (when not busy) latches i_q and w_r (Q16.16, electrical
// rad/s); done pulses when id_ref holds the new result, 99 clocks later.
module lma_model
  import hil_pkg::*;
#(
  parameter q16_t ID_LIM = 32'sd655360,  // 10 A
  parameter q16_t RS = MOTOR_RS,
  parameter q16_t RC = MOTOR_RC,
  parameter q16_t LD = MOTOR_LD,
  parameter q16_t LQ = MOTOR_LQ,
  parameter q16_t LM = MOTOR_LM
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  q16_t i_q,
  input  q16_t w_r,
  output logic busy,
  output logic done,
  output q16_t id_ref
);
  // Q32.32 multiply
  function automatic q32_t m32(input q32_t a, input q32_t b);
    logic signed [127:0] p;
    p = 128'(a) * 128'(b);
    return q32_t'(p >>> 32);
  endfunction

  localparam q32_t RS32   = q32_t'(RS) <<< 16;
  localparam q32_t LD32   = q32_t'(LD) <<< 16;
  localparam q32_t LM32   = q32_t'(LM) <<< 16;
  localparam q32_t LDQ32  = (q32_t'(LD) + q32_t'(LQ)) <<< 16;
  localparam q32_t INV_RC = q_recip32(RC);  // 1/Rc in Q32.32

  q32_t iq32, w32, k, rkw, num, den;
  logic neg_r;
  logic [63:0] abs_num, abs_den;

  always_comb begin
    k       = m32(w32, INV_RC);
    rkw     = m32(RS32, k) + w32;
    num     = m32(m32(RS32, k), m32(iq32, LDQ32)) - m32(m32(LD32, LM32), m32(k, rkw));
    den     = RS32 + m32(m32(LD32, LD32), m32(k, rkw));
    abs_num = num[63] ? 64'(-num) : 64'(num);
    abs_den = den[63] ? 64'(-den) : 64'(den);
  end

  typedef enum logic [1:0] {IDLE, CALC, DIV} state_t;
  state_t state;

  logic        dv_start, dv_busy, dv_done;
  logic [95:0] dv_q;

  assign dv_start = (state == CALC);

  div_seq #(.WN(96), .WD(64)) u_div (
    .clk, .rst,
    .start(dv_start), .dividend({abs_num, 32'b0}), .divisor(abs_den),
    .busy(dv_busy), .done(dv_done), .quot(dv_q)
  );

  // signed Q32.32 quotient, clamped, truncated to Q16.16
  logic signed [96:0] qs;
  q16_t id_c;
  always_comb begin
    qs = neg_r ? -$signed({1'b0, dv_q}) : $signed({1'b0, dv_q});
    if (qs > 97'(q32_t'(ID_LIM) <<< 16))        id_c = ID_LIM;
    else if (qs < -97'(q32_t'(ID_LIM) <<< 16))  id_c = -ID_LIM;
    else                                        id_c = q16_t'(qs >>> 16);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      iq32   <= '0;
      w32    <= '0;
      neg_r  <= 1'b0;
      done   <= 1'b0;
      id_ref <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          iq32  <= q32_t'(i_q) <<< 16;
          w32   <= q32_t'(w_r) <<< 16;
          state <= CALC;
        end
        CALC: begin
          neg_r <= num[63] ^ den[63];
          state <= DIV;
        end
        DIV: if (dv_done) begin
          id_ref <= id_c;
          done   <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // the divider is working for as long as the block waits on it
  a_div: assert property (@(posedge clk) disable iff (rst)
                          (state == DIV) |-> (dv_busy || dv_done));
endmodule

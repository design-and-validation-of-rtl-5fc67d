// lma_binary: closed-loop loss-minimisation algorithm (LMA) that finds the
// d-axis current reference i_d* giving minimum losses by bisection.
//
// Starting from the interval [i_dmin, i_dmax] = [-10 A, 10 A] and a search
// step d = 1 mA, each pass takes the midpoint x = (i_dmin + i_dmax)/2 and the
// losses W at x - d, x + d and at both ends of the interval, then
//   - if W(i_dmin) = W(i_dmax) the minimum is at the midpoint: i_d* = x;
//   - if |i_dmin - i_dmax| < 2d the interval is resolved:      i_d* = x;
//   - else if W(x - d) < W(x + d) the minimum lies left:       i_dmax = x;
//   - else                                                     i_dmin = x;
// and the next pass starts. Interval, step, update rule and the four states
// Idle, Status 1 (evaluate), Status 2 (equal-ends test) and Status 3
// (resolution test and update) follow the design. The losses are evaluated
// by one pipelined loss_eval, fed the four trial currents on consecutive
// clocks (this design's choice). W is convex in i_d, so the search converges
// to within d of the true minimum after about 14 passes.
// Interface: start (in Idle) latches i_q and w_r and begins a search; done
// pulses for one clock when id_ref holds the new result, which is kept until
// the next search ends. passes counts the passes of the last search.
// Each pass takes 8 clocks; a whole search at most 15 passes, 120 clocks.
// Q16.16 values.
module lma_binary
  import hil_pkg::*;
#(
  parameter q16_t ID_MIN0 = -32'sd655360,  // -10 A
  parameter q16_t ID_MAX0 = 32'sd655360,   //  10 A
  parameter q16_t STEP_D  = 32'sd66,       //  1 mA (1.007 mA in Q16.16)
  parameter q16_t RS = MOTOR_RS,
  parameter q16_t RC = MOTOR_RC,
  parameter q16_t LD = MOTOR_LD,
  parameter q16_t LQ = MOTOR_LQ,
  parameter q16_t LM = MOTOR_LM
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  q16_t       i_q,
  input  q16_t       w_r,
  output logic       busy,
  output logic       done,
  output q16_t       id_ref,
  output logic [5:0] passes
);
  typedef enum logic [1:0] {IDLE, STATUS1, STATUS2, STATUS3} state_t;
  state_t state;

  q16_t id_min, id_max, x, iq_l, w_l;
  q16_t w_xm, w_xp, w_min, w_max;     // W(x-d), W(x+d), W(i_dmin), W(i_dmax)
  logic [2:0] issued, got;

  // loss evaluator, fed from Status 1
  logic ev_valid, ev_done;
  q16_t ev_id, ev_w;

  always_comb begin
    ev_valid = (state == STATUS1) && (issued < 3'd4);
    case (issued)
      3'd0:    ev_id = q_sub(x, STEP_D);
      3'd1:    ev_id = q_add(x, STEP_D);
      3'd2:    ev_id = id_min;
      default: ev_id = id_max;
    endcase
  end

  loss_eval #(.RS(RS), .RC(RC), .LD(LD), .LQ(LQ), .LM(LM)) u_loss (
    .clk, .rst,
    .in_valid(ev_valid), .i_d(ev_id), .i_q(iq_l), .w_r(w_l),
    .w_valid(ev_done), .w_loss(ev_w)
  );

  q16_t width;
  assign width = q_sub(id_max, id_min);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      id_min <= ID_MIN0;
      id_max <= ID_MAX0;
      x      <= '0;
      iq_l   <= '0;
      w_l    <= '0;
      w_xm   <= '0;
      w_xp   <= '0;
      w_min  <= '0;
      w_max  <= '0;
      issued <= '0;
      got    <= '0;
      done   <= 1'b0;
      id_ref <= '0;
      passes <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          id_min <= ID_MIN0;
          id_max <= ID_MAX0;
          if (start) begin
            iq_l   <= i_q;
            w_l    <= w_r;
            x      <= q16_t'((33'(ID_MIN0) + 33'(ID_MAX0)) >>> 1);
            issued <= '0;
            got    <= '0;
            passes <= '0;
            state  <= STATUS1;
          end
        end
        STATUS1: begin
          if (ev_valid) issued <= issued + 1'b1;
          if (ev_done) begin
            got <= got + 1'b1;
            case (got)
              3'd0:    w_xm  <= ev_w;
              3'd1:    w_xp  <= ev_w;
              3'd2:    w_min <= ev_w;
              default: w_max <= ev_w;
            endcase
            if (got == 3'd3) begin
              passes <= passes + 1'b1;
              state  <= STATUS2;
            end
          end
        end
        STATUS2: begin
          if (w_min == w_max) begin
            id_ref <= x;
            done   <= 1'b1;
            state  <= IDLE;
          end else begin
            state <= STATUS3;
          end
        end
        STATUS3: begin
          if (width < (STEP_D <<< 1)) begin
            id_ref <= x;
            done   <= 1'b1;
            state  <= IDLE;
          end else begin
            if (w_xm < w_xp) begin
              id_max <= x;
              x      <= q16_t'((33'(id_min) + 33'(x)) >>> 1);
            end else begin
              id_min <= x;
              x      <= q16_t'((33'(x) + 33'(id_max)) >>> 1);
            end
            issued <= '0;
            got    <= '0;
            state  <= STATUS1;
          end
        end
      endcase
    end
  end

  assign busy = (state != IDLE);

  // the search interval never turns over
  a_interval: assert property (@(posedge clk) disable iff (rst) id_min <= id_max);
endmodule

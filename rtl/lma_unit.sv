// lma_unit: the loss-minimisation block of the controller. It produces both
// current references from the speed reference and the measured state:
//   i_q* - from a speed PI regulator (w_ref - w), so the torque demanded by
//          the speed loop is met;
//   i_d* - chosen by lma_mode:
//            0: classical field-oriented control, i_d* = 0;
//            1: model-based LMA (lma_model, closed form in Q32.32);
//            2: bisection LMA (lma_binary, search on the loss W).
// The block diagram of the design shows one LMA block with inputs w_ref and w
// and outputs i_q* and i_d*; the three i_d* policies are the three cases the
// design compares. Putting the speed PI inside this block and choosing the
// policy at run time (instead of building three bitstreams) are this
// design's choices.
// Timing: on each sample pulse the speed PI updates (i_q* one clock later)
// and, if the selected LMA is idle, a new i_d* search starts from the
// measured i_q and w; i_d* changes when that search ends (about 100 clocks
// for either LMA, at most 120) and is held in between. All values Q16.16.
module lma_unit
  import hil_pkg::*;
#(
  parameter q16_t KP_W    = 32'sd3277,     // 0.05 A/(rad/s)
  parameter q16_t KI_TS_W = 32'sd13,       // Ki = 20 A/rad, Ts = 10 us
  parameter q16_t IQ_MAX  = 32'sd655360    // 10 A
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sample,
  input  logic [1:0] lma_mode,
  input  q16_t       w_ref,
  input  q16_t       w_r,
  input  q16_t       i_q,
  output logic       iq_valid,
  output q16_t       iq_ref,
  output q16_t       id_ref,
  output logic       lma_done      // an LMA search has just finished
);
  pi_ctrl #(.KP(KP_W), .KI_TS(KI_TS_W), .Y_MAX(IQ_MAX), .Y_MIN(-IQ_MAX)) u_speed_pi (
    .clk, .rst, .in_valid(sample), .ref_i(w_ref), .meas(w_r),
    .out_valid(iq_valid), .y(iq_ref)
  );

  logic mb_busy, mb_done, bs_busy, bs_done;
  q16_t mb_id, bs_id;
  logic [5:0] bs_passes;

  lma_model u_model (
    .clk, .rst, .start(sample && lma_mode == 2'd1), .i_q, .w_r,
    .busy(mb_busy), .done(mb_done), .id_ref(mb_id)
  );

  lma_binary u_binary (
    .clk, .rst, .start(sample && lma_mode == 2'd2), .i_q, .w_r,
    .busy(bs_busy), .done(bs_done), .id_ref(bs_id), .passes(bs_passes)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      id_ref   <= '0;
      lma_done <= 1'b0;
    end else begin
      lma_done <= 1'b0;
      unique case (lma_mode)
        2'd1: if (mb_done) begin id_ref <= mb_id; lma_done <= 1'b1; end
        2'd2: if (bs_done) begin id_ref <= bs_id; lma_done <= 1'b1; end
        default: id_ref <= '0;
      endcase
    end
  end

  logic unused;
  assign unused = ^{mb_busy, bs_busy, bs_passes};
endmodule

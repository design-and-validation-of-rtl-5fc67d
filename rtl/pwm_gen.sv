// pwm_gen: triangular up/down counter and comparators that fire the six
// inverter switches (upper switch commands S_A, S_B, S_C; the lower switch of
// each leg is the complement).
//
// The counter steps once per cnt_en pulse (1 MHz) and counts 0,1,...,HALF,
// HALF-1,...,1,0,1,... so one triangle lasts 2*HALF steps = T_PWM = 100 us
// (10 kHz) with HALF = T_PWM/2 = 50, the figures the design gives. A phase
// switch is on while the counter is at or above its switch-on instant
// T_ON,n = T_PWM/2 (1 - d_n): on the rising slope it turns on at t = T_ON,n,
// on the falling slope it turns off at t = T_OFF,n = T_PWM/2 (1 + d_n), which
// gives the centred pulses of the SVM switching pattern (all switches off at
// the start and end of the period, all on in its middle when d is large).
// New instants t_on_i are taken into shadow registers and applied when the
// counter is at 0 (start of a modulation period) so a pulse never changes
// in mid-period; that double buffering is this design's choice.
// period_start pulses for one cycle when a new modulation period begins.
module pwm_gen #(
  parameter int unsigned HALF = 50
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          cnt_en,
  input  logic [$clog2(HALF+1)-1:0]     t_on_i [3],  // switch-on instants, counter units
  input  logic                          load,        // new t_on_i valid
  output logic [$clog2(HALF+1)-1:0]     count,
  output logic                          up,          // counting up
  output logic [2:0]                    s,           // S_A, S_B, S_C (bit 0 = A)
  output logic                          period_start
);
  localparam int unsigned W = $clog2(HALF+1);

  logic [W-1:0] shadow [3];
  logic [W-1:0] active [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      count        <= '0;
      up           <= 1'b1;
      period_start <= 1'b0;
      for (int n = 0; n < 3; n++) begin
        shadow[n] <= W'(HALF);
        active[n] <= W'(HALF);
      end
    end else begin
      period_start <= 1'b0;
      if (load) shadow <= t_on_i;
      if (cnt_en) begin
        if (up) begin
          if (count == W'(HALF - 1)) up <= 1'b0;
          count <= count + 1'b1;
        end else begin
          if (count == W'(1)) begin
            up <= 1'b1;
          end
          count <= count - 1'b1;
        end
      end
      // start of a period: counter sits at 0
      if (cnt_en && !up && count == W'(1)) begin
        active       <= load ? t_on_i : shadow;
        period_start <= 1'b1;
      end
    end
  end

  always_comb begin
    // up slope: on from count == T_ON; down slope: on while count > T_ON, so
    // the pulse lasts exactly 2*(HALF - T_ON) counter steps
    for (int n = 0; n < 3; n++) s[n] = up ? (count >= active[n]) : (count > active[n]);
  end
endmodule

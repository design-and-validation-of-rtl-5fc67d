// clk_div: frequency divider that derives the timing of the controller from
// the system clock.
//
// The PWM up/down counter advances at 1 MHz and the regulators sample at
// 100 kHz (10 us). Both rates come from the system clock by division, as the
// design calls for. Instead of generating new clocks this divider emits
// one-cycle enable pulses in the system clock domain (this design's choice:
// it keeps the whole controller on one clock):
//   cnt_en    - one pulse every CLK_HZ/CNT_HZ cycles   (1 MHz counter step)
//   sample_en - one pulse every CNT_HZ/SAMPLE_HZ cnt_en (100 kHz sampling),
//               coincident with a cnt_en pulse.
// The system clock frequency (100 MHz) is an assumed value. Reset is
// synchronous, active high; the first cnt_en comes CLK_HZ/CNT_HZ cycles after
// reset is released.
module clk_div #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned CNT_HZ    = 1_000_000,
  parameter int unsigned SAMPLE_HZ = 100_000
) (
  input  logic clk,
  input  logic rst,
  output logic cnt_en,
  output logic sample_en
);
  localparam int unsigned DIV1 = CLK_HZ / CNT_HZ;
  localparam int unsigned DIV2 = CNT_HZ / SAMPLE_HZ;

  logic [$clog2(DIV1+1)-1:0] c1;
  logic [$clog2(DIV2+1)-1:0] c2;

  always_ff @(posedge clk) begin
    if (rst) begin
      c1        <= '0;
      c2        <= '0;
      cnt_en    <= 1'b0;
      sample_en <= 1'b0;
    end else begin
      cnt_en    <= 1'b0;
      sample_en <= 1'b0;
      if (c1 == ($bits(c1))'(DIV1 - 1)) begin
        c1     <= '0;
        cnt_en <= 1'b1;
        if (c2 == ($bits(c2))'(DIV2 - 1)) begin
          c2        <= '0;
          sample_en <= 1'b1;
        end else begin
          c2 <= c2 + 1'b1;
        end
      end else begin
        c1 <= c1 + 1'b1;
      end
    end
  end
endmodule

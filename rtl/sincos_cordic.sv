// sincos_cordic: sine and cosine of the electrical rotor angle, needed by both
// reference-frame transforms of the controller.
//
// The design only shows the angle theta entering the two dq/abc transform
// boxes; how sin and cos are produced is this design's choice: an iterative
// rotation-mode CORDIC, one micro-rotation per clock, with no look-up table
// beyond the ITER arctangent constants atan(2^-i) * 2^16.
// The angle is Q16.16 radians in [-pi, pi]. Angles beyond +-pi/2 are folded by
// pi (theta -/+ pi) and the result negated, so the CORDIC itself only covers
// [-pi/2, pi/2]. The start vector is (K, 0) with K = prod 1/sqrt(1+2^-2i) =
// 0.60725, so no gain correction is needed afterwards.
// Interface: pulse start with theta valid; done pulses ITER+1 cycles later
// with sin_o / cos_o valid (held until the next start). Accuracy is about
// 2^-14 over the whole circle.
module sincos_cordic
  import hil_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  q16_t theta,
  output logic busy,
  output logic done,
  output q16_t sin_o,
  output q16_t cos_o
);
  localparam q16_t K_INV = 32'sd39797;  // 0.6072529 in Q16.16

  function automatic q16_t atan_tab(input int unsigned i);
    case (i)
      0: return 32'sd51472;  1: return 32'sd30386;  2: return 32'sd16055;
      3: return 32'sd8150;   4: return 32'sd4091;   5: return 32'sd2047;
      6: return 32'sd1024;   7: return 32'sd512;    8: return 32'sd256;
      9: return 32'sd128;   10: return 32'sd64;    11: return 32'sd32;
     12: return 32'sd16;    13: return 32'sd8;     14: return 32'sd4;
     15: return 32'sd2;     16: return 32'sd1;
      default: return '0;
    endcase
  endfunction

  q16_t x, y, z;
  logic neg;
  logic [$clog2(ITER+1)-1:0] it;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      neg   <= 1'b0;
      it    <= '0;
      sin_o <= '0;
      cos_o <= Q_ONE;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        it   <= '0;
        x    <= K_INV;
        y    <= '0;
        if (theta > Q_PI_2) begin
          z   <= theta - Q_PI;
          neg <= 1'b1;
        end else if (theta < -Q_PI_2) begin
          z   <= theta + Q_PI;
          neg <= 1'b1;
        end else begin
          z   <= theta;
          neg <= 1'b0;
        end
      end else if (busy) begin
        if (it == ($bits(it))'(ITER)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          sin_o <= neg ? -y : y;
          cos_o <= neg ? -x : x;
        end else begin
          if (!z[31]) begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_tab(32'(it));
          end else begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_tab(32'(it));
          end
          it <= it + 1'b1;
        end
      end
    end
  end
endmodule

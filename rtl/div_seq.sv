// div_seq: unsigned restoring divider, one quotient bit per clock.
//
// Computes quot = dividend / divisor (integer quotient) for WN-bit dividend
// and WD-bit divisor. Pulse start with the operands; done pulses WN+1 clocks
// later with quot valid (held until the next start). A zero divisor gives an
// all-ones quotient. Used by the model-based loss-minimisation block for its
// single division.
module div_seq #(
  parameter int unsigned WN = 96,
  parameter int unsigned WD = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [WN-1:0] dividend,
  input  logic [WD-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [WN-1:0] quot
);
  logic [WN-1:0] q;
  logic [WD-1:0] rem;
  logic [WD-1:0] dv;
  logic [$clog2(WN+1)-1:0] n;
  logic [WD:0]   trial;

  assign trial = {rem, q[WN-1]} - {1'b0, dv};

  always_ff @(posedge clk) begin
    if (rst) begin
      q    <= '0;
      rem  <= '0;
      dv   <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= dividend;
        rem  <= '0;
        dv   <= divisor;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[WD]) begin
          rem <= trial[WD-1:0];
          q   <= {q[WN-2:0], 1'b1};
        end else begin
          rem <= {rem[WD-2:0], q[WN-1]};  // top bit is 0 when no subtract
          q   <= {q[WN-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($bits(n))'(WN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= trial[WD] ? {q[WN-2:0], 1'b0} : {q[WN-2:0], 1'b1};
        end
      end
    end
  end
endmodule

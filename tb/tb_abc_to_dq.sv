// tb_abc_to_dq: balanced three-phase currents of random amplitude and phase,
// with sin/cos supplied from $sin/$cos, must come out as the expected d-q
// pair i_d = I cos(phi), i_q = I sin(phi) where the currents are
// I cos(theta + phi - 2 pi k/3); also random unbalanced pairs against the
// Clarke/Park formulas. Tolerance 2e-3 A. One-clock latency is checked.
module tb_abc_to_dq;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  q16_t i_a, i_b, sin_t, cos_t;
  dq_t  i_dq;
  int checks = 0, failures = 0;

  abc_to_dq dut (.clk, .rst, .in_valid, .i_a, .i_b, .sin_t, .cos_t, .out_valid, .i_dq);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q16_t r2q(real r);
    return q16_t'($rtoi(r * 65536.0));
  endfunction

  function automatic real absr(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  initial begin
    real th, phi, amp, ia, ib, ed, eq, al, be;
    i_a = '0; i_b = '0; sin_t = '0; cos_t = Q_ONE;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      th  = 6.2831853 * $urandom_range(0, 100000) / 100000.0 - 3.14159265;
      if (t % 2 == 0) begin
        amp = 20.0 * $urandom_range(0, 1000) / 1000.0;
        phi = 6.2831853 * $urandom_range(0, 100000) / 100000.0;
        ia  = amp * $cos(th + phi);
        ib  = amp * $cos(th + phi - 2.0943951);
        ed  = amp * $cos(phi);
        eq  = amp * $sin(phi);
      end else begin
        ia = 40.0 * $urandom_range(0, 1000) / 1000.0 - 20.0;
        ib = 40.0 * $urandom_range(0, 1000) / 1000.0 - 20.0;
        al = ia;
        be = (ia + 2.0 * ib) / $sqrt(3.0);
        ed = al * $cos(th) + be * $sin(th);
        eq = -al * $sin(th) + be * $cos(th);
      end
      @(negedge clk);
      i_a = r2q(ia); i_b = r2q(ib); sin_t = r2q($sin(th)); cos_t = r2q($cos(th));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("latency"); end
      checks++;
      if (absr($itor(i_dq.d) / 65536.0 - ed) > 2e-3 || absr($itor(i_dq.q) / 65536.0 - eq) > 2e-3) begin
        failures++;
        $display("i_dq %f %f expected %f %f", $itor(i_dq.d) / 65536.0, $itor(i_dq.q) / 65536.0, ed, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pwm_gen: checks the triangular counter and the centred switch pulses.
// The counter is stepped every 2 clocks. For each modulation period of
// 2*HALF = 100 steps the expected state of switch n at step k (k = 0 at the
// period start) is on exactly for T_ON,n <= k < 100 - T_ON,n, i.e. it turns
// on at T_ON = 50(1-d) and off at T_OFF = 50(1+d). New instants loaded in
// mid-period must not act before the next period start.
module tb_pwm_gen;
  localparam int HALF = 50;
  logic clk = 1'b0, rst = 1'b1;
  logic cnt_en = 1'b0, load = 1'b0;
  logic [5:0] t_on_i [3];
  logic [5:0] count;
  logic up, period_start;
  logic [2:0] s;
  int checks = 0, failures = 0;

  pwm_gen dut (.clk, .rst, .cnt_en, .t_on_i, .load, .count, .up, .s, .period_start);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one counter step; returns after the state for the new step is visible
  task automatic step();
    @(posedge clk); cnt_en <= 1'b1;
    @(posedge clk); cnt_en <= 1'b0;
    #1;
  endtask

  int cur [3];
  int nxt [3];
  int k;

  initial begin
    for (int n = 0; n < 3; n++) t_on_i[n] = 6'd0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // wait for a period start with the reset instants (HALF: all off)
    while (!(count == 0 && up)) step();
    for (int n = 0; n < 3; n++) cur[n] = HALF;
    for (int p = 0; p < 12; p++) begin
      // choose the next instants, load them at a random step of this period
      for (int n = 0; n < 3; n++) nxt[n] = (p == 1) ? 0 : $urandom_range(0, HALF);
      for (k = 0; k < 2*HALF; k++) begin
        checks++;
        if (count != ((k <= HALF) ? k : 2*HALF - k)) begin
          failures++; $display("count %0d at step %0d", count, k);
        end
        for (int n = 0; n < 3; n++) begin
          logic exp_s;
          exp_s = (k >= cur[n]) && (k < 2*HALF - cur[n]);
          checks++;
          if (s[n] !== exp_s) begin
            failures++;
            $display("period %0d step %0d phase %0d: s=%0b expected %0b (T_ON=%0d)", p, k, n, s[n], exp_s, cur[n]);
          end
        end
        if (k == 20) begin
          @(posedge clk);
          for (int n = 0; n < 3; n++) t_on_i[n] <= 6'(nxt[n]);
          load <= 1'b1;
          @(posedge clk); load <= 1'b0;
          #1;
        end
        step();
      end
      checks++;
      if (!(count == 0 && up)) begin failures++; $display("period is not 100 steps"); end
      for (int n = 0; n < 3; n++) cur[n] = nxt[n];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

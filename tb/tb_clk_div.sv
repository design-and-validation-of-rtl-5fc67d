// tb_clk_div: checks the divider at its default 100 MHz -> 1 MHz / 100 kHz
// ratios: spacing of the cnt_en pulses (100 clocks) and of the sample_en
// pulses (1000 clocks), and that every sample_en falls on a cnt_en.
module tb_clk_div;
  logic clk = 1'b0, rst = 1'b1;
  logic cnt_en, sample_en;
  int checks = 0, failures = 0;

  clk_div dut (.clk, .rst, .cnt_en, .sample_en);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_c, last_s, n_c, n_s;
    last_c = -1; last_s = -1; n_c = 0; n_s = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (cyc = 0; cyc < 20500; cyc++) begin
      @(posedge clk); #1;
      if (cnt_en) begin
        if (last_c >= 0) begin
          checks++;
          if (cyc - last_c != 100) begin
            failures++;
            $display("cnt_en spacing %0d", cyc - last_c);
          end
        end
        last_c = cyc;
        n_c++;
      end
      if (sample_en) begin
        checks++;
        if (!cnt_en) begin failures++; $display("sample_en without cnt_en"); end
        if (last_s >= 0) begin
          checks++;
          if (cyc - last_s != 1000) begin
            failures++;
            $display("sample_en spacing %0d", cyc - last_s);
          end
        end
        last_s = cyc;
        n_s++;
      end
    end
    checks++;
    if (n_c < 200 || n_s < 20) begin failures++; $display("too few pulses %0d %0d", n_c, n_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

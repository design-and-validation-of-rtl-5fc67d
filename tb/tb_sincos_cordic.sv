// tb_sincos_cordic: random angles over [-pi, pi] plus the edge angles, against
// $sin/$cos; tolerance 3e-4. Checks that done rises ITER+1 = 17 clocks after
// the clock edge that takes start (the 18th edge counting that one).
module tb_sincos_cordic;
  import hil_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, done;
  q16_t theta, sin_o, cos_o;
  int checks = 0, failures = 0;

  sincos_cordic dut (.clk, .rst, .start, .theta, .busy, .done, .sin_o, .cos_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, es, ec;
    int lat;
    theta = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: theta = Q_PI;
        1: theta = -Q_PI;
        2: theta = Q_PI_2;
        3: theta = -Q_PI_2;
        4: theta = '0;
        default: theta = q16_t'($urandom_range(0, 2 * 205887)) - Q_PI;
      endcase
      th = $itor(theta) / 65536.0;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 18) begin failures++; $display("latency %0d", lat); end
      es = $sin(th); ec = $cos(th);
      checks++;
      if ($itor(sin_o) / 65536.0 - es > 3e-4 || es - $itor(sin_o) / 65536.0 > 3e-4 ||
          $itor(cos_o) / 65536.0 - ec > 3e-4 || ec - $itor(cos_o) / 65536.0 > 3e-4) begin
        failures++;
        $display("theta %f: sin %f cos %f expected %f %f", th, $itor(sin_o) / 65536.0,
                 $itor(cos_o) / 65536.0, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

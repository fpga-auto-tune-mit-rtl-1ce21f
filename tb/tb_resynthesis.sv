// tb_resynthesis: checks the corrected-tone output and the three effects.
//
// The bench models both phase accumulators itself (fcw, 2 fcw, fcw/2 and
// 5/4 fcw) and computes the expected sample from the sine formula: the main
// tone alone, or the average of main tone and major third for harmony. Each
// effect runs for 600 steps; one LSB of tolerance is allowed per tone. Phases
// start from zero after a reset before each effect.
module tb_resynthesis;
  import autotune_pkg::*;
  logic clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic [31:0] fcw = 32'd120946279;
  effect_e     effect = FX_NONE;
  logic [11:0] sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  resynthesis dut (.clk(clk), .rst(rst), .step(step), .fcw(fcw), .effect(effect), .sample(sample));

  function automatic real sine_of(logic [31:0] ph);
    return 2047.5 + 2047.5 * $sin(2.0 * 3.141592653589793 * real'(ph[31:23]) / 512.0);
  endfunction

  initial begin
    for (int fx = 0; fx < 4; fx++) begin
      logic [31:0] p_main, p_third, inc_main, inc_third;
      @(posedge clk) rst <= 1'b1; effect <= effect_e'(fx);
      fcw <= 32'(30000000 + $urandom % 200000000);
      @(posedge clk) rst <= 1'b0;
      #1;
      inc_main  = (fx == 2) ? fcw * 2 : (fx == 3) ? fcw / 2 : fcw;
      inc_third = fcw + fcw / 4;
      p_main = 0; p_third = 0;
      for (int s = 0; s < 600; s++) begin
        real e;
        @(posedge clk) step <= 1'b1;
        @(posedge clk) step <= 1'b0;
        p_main  = p_main + inc_main;
        p_third = p_third + inc_third;
        @(posedge clk);
        @(posedge clk); #1;
        e = (fx == 1) ? (sine_of(p_main) + sine_of(p_third)) / 2.0 : sine_of(p_main);
        checks++;
        if (real'(sample) > e + 1.5 || real'(sample) + 1.5 < e) begin
          failures++; $display("effect %0d step %0d: %0d expected %f", fx, s, sample, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

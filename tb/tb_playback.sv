// tb_playback: checks the PWM audio output.
//
// For several 12-bit sample values held over three PWM periods of 4096
// clocks, the number of clocks with pwm_out high in each complete period
// must equal the sample value.
module tb_playback;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] sample = '0;
  logic        pwm_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  playback dut (.*);

  initial begin
    int vals [6] = '{0, 1, 2048, 4095, 1234, 3000};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    foreach (vals[i]) begin
      sample <= 12'(vals[i]);
      // align to the start of a period plus the output register
      wait (dut.count == 12'hFFF);
      @(posedge clk);
      @(posedge clk);
      for (int p = 0; p < 2; p++) begin
        int high;
        high = 0;
        for (int t = 0; t < 4096; t++) begin
          #1 if (pwm_out) high++;
          @(posedge clk);
        end
        checks++;
        if (high != vals[i]) begin failures++; $display("sample %0d: high for %0d clocks", vals[i], high); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sine_generator: checks the phase accumulator and sine table.
//
// The bench keeps its own 32-bit phase, advances it by the same increment on
// every step, and one clock after each step compares amp with
// round(2047.5 + 2047.5 * sin(2*pi*k/512)) for k = top 9 phase bits (one LSB
// tolerance). Several increments are used, and the number of wraps of the
// phase over 4000 steps is compared with the expected tone frequency.
module tb_sine_generator;
  logic clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic [31:0] incr = '0;
  logic [11:0] amp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_generator dut (.clk(clk), .rst(rst), .step(step), .phase_incr(incr), .amp(amp));

  initial begin
    logic [31:0] phase;
    int rising;
    logic [11:0] prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    phase = 0;
    for (int r = 0; r < 4; r++) begin
      incr <= (r == 0) ? 32'd120946279 : 32'($urandom % 400000000);
      rising = 0; prev = 12'd2048;
      for (int s = 0; s < 4000; s++) begin
        real e;
        @(posedge clk) step <= 1'b1;
        @(posedge clk) step <= 1'b0;
        phase = phase + incr;
        @(posedge clk); #1;
        e = 2047.5 + 2047.5 * $sin(2.0 * 3.141592653589793 * real'(phase[31:23]) / 512.0);
        checks++;
        if (real'(amp) > e + 1.0 || real'(amp) + 1.0 < e) begin
          failures++; $display("phase %h amp %0d expected %f", phase, amp, e);
        end
        if (prev < 12'd2048 && amp >= 12'd2048) rising++;
        prev = amp;
      end
      if (r == 0) begin
        // 440 Hz at 15625 Hz: 4000 steps hold 112.6 periods
        checks++;
        if (rising < 111 || rising > 114) begin failures++; $display("rising crossings %0d", rising); end
      end
    end
    @(posedge clk) rst <= 1'b1;
    @(posedge clk) rst <= 1'b0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (amp != 12'd2048 && amp != 12'd2047) begin failures++; $display("reset phase amp %0d", amp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

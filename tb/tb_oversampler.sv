// tb_oversampler: checks the 64x and 16x averaging oversamplers.
//
// Random 12-bit samples arrive on a trigger every third clock. The bench
// keeps its own running sums and, at each done_osample, compares osample
// with sum >> (LOG2_RATIO - 3) and checks that exactly 2^LOG2_RATIO triggers
// passed since the previous output (the decimation rate).
module tb_oversampler;
  logic clk = 1'b0, rst = 1'b1, trig = 1'b0;
  logic [11:0] din = '0;
  logic [14:0] os64, os16;
  logic        done64, done16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oversampler #(.LOG2_RATIO(6)) dut64 (.clk(clk), .rst(rst), .sample_trig(trig), .din(din),
                                        .osample(os64), .done_osample(done64));
  oversampler #(.LOG2_RATIO(4)) dut16 (.clk(clk), .rst(rst), .sample_trig(trig), .din(din),
                                        .osample(os16), .done_osample(done16));

  longint sum64 = 0, sum16 = 0, exp64 = 0, exp16 = 0;
  int     n64 = 0, n16 = 0, outs64 = 0, outs16 = 0;

  always @(posedge clk) begin
    if (!rst && done64) begin
      checks++;
      if (os64 != 15'(exp64)) begin failures++; $display("64x: got %0d expected %0d", os64, exp64); end
      outs64++;
    end
    if (!rst && done16) begin
      checks++;
      if (os16 != 15'(exp16)) begin failures++; $display("16x: got %0d expected %0d", os16, exp16); end
      outs16++;
    end
    if (!rst && trig) begin
      sum64 += din; n64++;
      sum16 += din; n16++;
      if (n64 == 64) begin exp64 = sum64 >> 3; sum64 = 0; n64 = 0; end
      if (n16 == 16) begin exp16 = sum16 >> 1; sum16 = 0; n16 = 0; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 64 * 40; t++) begin
      @(posedge clk);
      trig <= 1'b1;
      din  <= (t < 64) ? 12'hFFF : 12'($urandom);
      @(posedge clk) trig <= 1'b0;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (outs64 != 40) begin failures++; $display("64x: %0d outputs for 2560 triggers", outs64); end
    checks++;
    if (outs16 != 160) begin failures++; $display("16x: %0d outputs for 2560 triggers", outs16); end
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

// tb_bram_sdp: checks the simple dual-port RAM.
//
// Fills the 2048 x 16 RAM with random words, reads every address back and
// compares one clock later, checks that dout holds while re is low, and
// that a read of the address being written returns the old word.
module tb_bram_sdp;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [10:0] waddr = '0, raddr = '0;
  logic [15:0] din = '0, dout;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_sdp #(.DEPTH(2048), .WIDTH(16)) dut (.*);

  initial begin
    for (int a = 0; a < 2048; a++) begin
      @(posedge clk);
      we <= 1'b1; waddr <= 11'(a); din <= 16'($urandom); model[a] = din;
      #1 model[a] = din;
    end
    @(posedge clk) we <= 1'b0;
    for (int a = 0; a < 2048; a++) begin
      @(posedge clk); re <= 1'b1; raddr <= 11'(a);
      @(posedge clk); re <= 1'b0;
      #1;
      checks++;
      if (dout != model[a]) begin failures++; $display("addr %0d: %h vs %h", a, dout, model[a]); end
    end
    // hold while re is low
    @(posedge clk); raddr <= 11'd5;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout != model[2047]) begin failures++; $display("dout did not hold"); end
    // read during write of the same address returns the old word
    @(posedge clk); we <= 1'b1; waddr <= 11'd7; din <= ~model[7]; re <= 1'b1; raddr <= 11'd7;
    @(posedge clk); we <= 1'b0; re <= 1'b0;
    #1 checks++;
    if (dout != model[7]) begin failures++; $display("read-during-write returned new word"); end
    @(posedge clk); re <= 1'b1;
    @(posedge clk); re <= 1'b0;
    #1 checks++;
    if (dout != ~model[7]) begin failures++; $display("write did not land"); end
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

// tb_xvga: checks the 1024 x 768 VGA timing over three frames (the first one partly).
//
// Counts, per frame, the clocks with blank low (must be 1024 * 768), the
// lines (806) and clocks (1344 per line), the length of each hsync pulse
// (136) and of each vsync pulse (6 lines = 8064 clocks), and checks that
// hcount and vcount step by one and wrap at the totals.
module tb_xvga;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xvga dut (.*);

  initial begin
    int visible, hs_len, vs_len, frames;
    logic [10:0] ph;
    logic [9:0]  pv;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    wait (hcount == 0 && vcount == 0);
    @(posedge clk);
    #1;
    visible = 0; hs_len = 0; vs_len = 0; frames = 0;
    ph = hcount; pv = vcount;
    for (int t = 0; t < 3 * 1344 * 806; t++) begin
      @(posedge clk); #1;
      if (!blank) visible++;
      if (!hsync) hs_len++;
      else if (hs_len != 0) begin
        checks++;
        if (hs_len != 136) begin failures++; $display("hsync length %0d", hs_len); end
        hs_len = 0;
      end
      if (!vsync) vs_len++;
      else if (vs_len != 0) begin
        checks++;
        if (vs_len != 6 * 1344) begin failures++; $display("vsync length %0d", vs_len); end
        vs_len = 0;
      end
      if (!((hcount == ph + 1 && vcount == pv) ||
            (ph == 1343 && hcount == 0 && (vcount == pv + 1 || (pv == 805 && vcount == 0))))) begin
        failures++; $display("count step %0d,%0d -> %0d,%0d", ph, pv, hcount, vcount);
      end
      ph = hcount; pv = vcount;
      if (hcount == 0 && vcount == 0) begin
        frames++;
        checks++;
        if (frames > 1 && visible != 1024 * 768) begin failures++; $display("visible pixels %0d", visible); end
        visible = 0;
      end
    end
    checks++;
    if (frames != 3) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 1344 * 806) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spectrogram: checks the pixel-to-address mapping and colour output.
//
// The memory is modelled as rdata = f(address) with one clock of read
// latency. For 3000 random screen positions, held for four clocks each,
// the bench checks the request address (c+1)*512 - (r+1) for positions in
// the image, and that the pixel three clocks later is the low 12 bits of
// f(address) inside the 512 x 512 image at (256, 128) and black outside.
// The syncs and blank must come out delayed by exactly three clocks.
module tb_spectrogram;
  logic clk = 1'b0;
  logic [10:0] hcount = '0;
  logic [9:0]  vcount = '0;
  logic        hs = 1'b1, vs = 1'b1, bl = 1'b0;
  logic [17:0] addr;
  logic [15:0] rdata = '0;
  logic [11:0] pixel;
  logic        hs_o, vs_o, bl_o;
  int checks = 0, failures = 0;
  logic [2:0]  hs_h = '0;

  always #5 clk = ~clk;

  spectrogram dut (.clk(clk), .hcount_in(hcount), .vcount_in(vcount), .hsync_in(hs),
    .vsync_in(vs), .blank_in(bl), .x_in(11'd256), .y_in(10'd128),
    .specgram_request_address(addr), .rdata(rdata), .pixel_out(pixel),
    .hsync_out(hs_o), .vsync_out(vs_o), .blank_out(bl_o));

  function automatic logic [15:0] f(logic [17:0] a);
    return 16'(a * 40503) ^ 16'(a >> 2);
  endfunction

  always @(posedge clk) begin
    rdata <= f(addr);
    hs    <= 1'($urandom);
    hs_h  <= {hs_h[1:0], hs};
    checks++;
    if (checks > 4 && hs_o != hs_h[2]) begin failures++; $display("hsync not delayed by 3"); end
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int h, v, c, r;
      bit in_img;
      h = (i % 4 == 0) ? $urandom % 1024 : 256 + $urandom % 512;
      v = (i % 4 == 1) ? $urandom % 768 : 128 + $urandom % 512;
      if (v > 767) v = 767;
      c = h - 256; r = v - 128;
      in_img = (c >= 0) && (c < 512) && (r >= 0) && (r < 512);
      @(posedge clk) hcount <= 11'(h); vcount <= 10'(v);
      repeat (4) @(posedge clk);
      #1;
      if (in_img) begin
        logic [17:0] ea;
        ea = 18'((c + 1) * 512 - (r + 1));
        checks++;
        if (addr != ea) begin failures++; $display("h %0d v %0d: addr %0d expected %0d", h, v, addr, ea); end
        checks++;
        if (pixel != f(ea)[11:0]) begin failures++; $display("h %0d v %0d: pixel %h", h, v, pixel); end
      end else begin
        checks++;
        if (pixel != 12'h000) begin failures++; $display("h %0d v %0d: pixel outside image %h", h, v, pixel); end
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

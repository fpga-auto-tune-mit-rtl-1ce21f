// tb_fft_magnitude: checks the |X| pipeline behind the FFT core.
//
// Random complex words (including the extreme -32768 values) are sent with
// random gaps in tvalid. Each output word must equal floor(sqrt(re^2+im^2)),
// found here by a search on 64-bit integers, and must appear after the 18
// pipeline registers (the bench sees it 19 of its clock counts after it
// queued the word); tlast must travel with its word.
module tb_fft_magnitude;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] tdata = '0;
  logic        tvalid = 1'b0, tlast = 1'b0, tready;
  logic [23:0] mag;
  logic        mvalid, mlast;
  int checks = 0, failures = 0;
  int cycle = 0;
  int exp_q[$], time_q[$];
  bit last_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  fft_magnitude dut (.clk(clk), .rst(rst), .s_axis_tdata(tdata), .s_axis_tvalid(tvalid),
    .s_axis_tlast(tlast), .s_axis_tready(tready), .magnitude_tdata(mag),
    .magnitude_tvalid(mvalid), .magnitude_tlast(mlast));

  function automatic int isqrt(longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return int'(r);
  endfunction

  always @(posedge clk) begin
    if (!rst && mvalid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int e, t;
        bit l;
        e = exp_q.pop_front(); t = time_q.pop_front(); l = last_q.pop_front();
        if (mag != 24'(e) || mlast != l || cycle - t != 19) begin
          failures++; $display("got %0d last %0b after %0d, expected %0d last %0b", mag, mlast, cycle - t, e, l);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    checks++;
    if (!tready) begin failures++; $display("not ready"); end
    for (int i = 0; i < 3000; i++) begin
      logic signed [15:0] re, im;
      @(posedge clk);
      if (i < 4) begin re = (i & 1) ? 16'sh8000 : 16'sh7fff; im = (i & 2) ? 16'sh8000 : 16'sh7fff; end
      else begin re = 16'($urandom); im = 16'($urandom); end
      tvalid <= ($urandom % 4) != 0;
      tdata  <= {im, re};
      tlast  <= (i % 7) == 0;
      #1;
      if (tvalid) begin
        exp_q.push_back(isqrt(longint'(re) * re + longint'(im) * im));
        time_q.push_back(cycle);
        last_q.push_back(tlast);
      end
    end
    @(posedge clk) tvalid <= 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

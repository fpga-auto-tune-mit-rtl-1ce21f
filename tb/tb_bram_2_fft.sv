// tb_bram_2_fft: checks the windowed frame streamer.
//
// A behavioural frame RAM (one-clock read latency, output held while re is
// low) holds random 15-bit samples. Frame 1 runs with tready always high:
// every sample must come out as (sample * round(65535 * sin^2(pi*n/N))) >> 16
// in natural order, tlast only on the last one, and the whole frame must
// take N + 3 clocks from the clock start is raised (3 clocks of latency, then one sample per clock). Frame 2 runs with tready toggled at random:
// the same data must come out, none lost or repeated. A start while busy is
// ignored.
module tb_bram_2_fft;
  localparam int N = 2048;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic        ram_re;
  logic [10:0] ram_addr;
  logic [15:0] ram_dout;
  logic [31:0] frame_tdata;
  logic        frame_tvalid, frame_tlast, tready = 1'b1;
  logic        sending;
  logic [11:0] send_count;
  logic [15:0] mem [N];
  int checks = 0, failures = 0;
  int idx = 0, frame = 0;
  bit random_ready = 0;

  always #5 clk = ~clk;

  bram_2_fft #(.N(N)) dut (.clk(clk), .rst(rst), .start(start), .ram_re(ram_re), .ram_addr(ram_addr),
    .ram_dout(ram_dout), .frame_tdata(frame_tdata), .frame_tvalid(frame_tvalid),
    .frame_tlast(frame_tlast), .m_axis_data_tready(tready), .sending(sending), .send_count(send_count));

  always @(posedge clk) if (ram_re) ram_dout <= mem[ram_addr];

  function automatic logic [15:0] expected(int n);
    real s;
    longint c;
    s = $sin(3.141592653589793 * n / N);
    c = longint'($rtoi(s * s * 65535.0 + 0.5));
    return 16'((longint'(mem[n]) * c) >> 16);
  endfunction

  always @(posedge clk) begin
    if (random_ready) tready <= ($urandom % 3) != 0;
    if (!rst && frame_tvalid && tready) begin
      logic [15:0] e;
      e = expected(idx);
      checks++;
      if (frame_tdata[15:0] > e + 1 || frame_tdata[15:0] + 1 < e || frame_tdata[31:16] != 0) begin
        failures++; $display("frame %0d sample %0d: got %0d expected %0d", frame, idx, frame_tdata[15:0], e);
      end
      checks++;
      if (frame_tlast != (idx == N - 1)) begin failures++; $display("tlast wrong at %0d", idx); end
      idx++;
    end
  end

  initial begin
    int t0, t1;
    for (int n = 0; n < N; n++) mem[n] = 16'($urandom % 32768);
    ram_dout = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    start <= 1'b1; t0 = $time;
    @(posedge clk) start <= 1'b0;
    repeat (100) @(posedge clk);
    start <= 1'b1;                      // ignored while sending
    @(posedge clk) start <= 1'b0;
    wait (idx == N);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != N + 3) begin failures++; $display("frame took %0d clocks", (t1 - t0) / 10); end
    repeat (10) @(posedge clk);
    checks++;
    if (idx != N || send_count != 12'(N)) begin failures++; $display("extra samples: %0d", idx); end
    // frame 2 with backpressure
    frame = 1; idx = 0; random_ready = 1;
    for (int n = 0; n < N; n++) mem[n] = 16'($urandom % 32768);
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    wait (idx == N);
    repeat (20) @(posedge clk);
    checks++;
    if (idx != N) begin failures++; $display("frame 2 count %0d", idx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stft_fsm: checks frame construction, windowing and the magnitude path.
//
// Runs with a 64-sample frame to stay short. The FFT core is replaced by a
// loop-back (its output equals its input), so each magnitude must equal the
// windowed sample itself. Every oversampling group of the source carries a
// constant value v(g), so oversampled sample g is 8 * v(g) for both the 64x
// microphone path and the 16x test-tone path, and magnitude k of a frame
// must be (8 * v(k) * round(65535 * sin^2(pi*k/64))) >> 16. Two frames are
// checked on the microphone path with random backpressure from the "FFT",
// then, after a reset, two on the test-tone path. Also checked: the frame
// period (64 groups * 64 triggers * 2 clocks), the forward-FFT configuration
// word and its handshake.
module tb_stft_fsm;
  localparam int N = 64;
  logic clk = 1'b0, rst = 1'b1, is_sine = 1'b0;
  logic adc_trig = 1'b0, sine_trig = 1'b0;
  logic [11:0] adc_data = '0, sine_data = '0;
  logic [7:0]  cfg_tdata;
  logic        cfg_tvalid, cfg_tready = 1'b0;
  logic [31:0] frame_tdata;
  logic        frame_tvalid, frame_tlast, tready = 1'b1;
  logic        fft_tready;
  logic [23:0] mag;
  logic        mag_valid, mag_last, audio_strobe, frame_done;
  logic [14:0] osample;
  int checks = 0, failures = 0;
  int bin = 0, frames_seen = 0, cycle = 0, last_done = -1, done_count = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  stft_fsm #(.N(N)) dut (
    .clk(clk), .rst(rst), .is_sine(is_sine),
    .adc_trig(adc_trig), .adc_data(adc_data), .sine_trig(sine_trig), .sine_data(sine_data),
    .s_axis_config_tdata(cfg_tdata), .s_axis_config_tvalid(cfg_tvalid), .s_axis_config_tready(cfg_tready),
    .frame_tdata(frame_tdata), .frame_tvalid(frame_tvalid), .frame_tlast(frame_tlast),
    .m_axis_data_tready(tready),
    .fft_tdata(frame_tdata), .fft_tvalid(frame_tvalid && tready), .fft_tlast(frame_tlast),
    .fft_tready(fft_tready),
    .magnitude_tdata(mag), .magnitude_tvalid(mag_valid), .magnitude_tlast(mag_last),
    .audio_strobe(audio_strobe), .osample(osample), .frame_done(frame_done));

  function automatic int v(int g);
    return (g * 997 + 123) % 4096;
  endfunction

  function automatic int expected(int k, int frame);
    real s;
    longint c;
    s = $sin(3.141592653589793 * k / N);
    c = longint'($rtoi(s * s * 65535.0 + 0.5));
    return int'((longint'(8 * v(frame * N + k)) * c) >> 16);
  endfunction

  always @(posedge clk) begin
    tready <= ($urandom % 4) != 0;
    if (!rst && frame_done) begin
      done_count++;
      if (last_done >= 0) begin
        checks++;
        if (cycle - last_done != N * (is_sine ? 16 : 64) * 2) begin
          failures++; $display("frame period %0d", cycle - last_done);
        end
      end
      last_done = cycle;
    end
    if (!rst && mag_valid) begin
      int e;
      e = expected(bin, frames_seen);
      checks++;
      if (mag > 24'(e + 1) || mag + 1 < 24'(e)) begin
        failures++; $display("frame %0d bin %0d: got %0d expected %0d", frames_seen, bin, mag, e);
      end
      checks++;
      if (mag_last != (bin == N - 1)) begin failures++; $display("tlast wrong at bin %0d", bin); end
      bin++;
      if (bin == N) begin bin = 0; frames_seen++; end
    end
  end

  // source: a trigger every second clock, value constant per group
  int trig_count = 0;
  always @(posedge clk) begin
    if (rst) begin
      adc_trig <= 1'b0; sine_trig <= 1'b0; trig_count = 0;
    end else begin
      logic t;
      t = (cycle % 2) == 0;
      adc_trig  <= t && !is_sine;
      sine_trig <= t && is_sine;
      if (t) begin
        adc_data  <= 12'(v(trig_count / 64));
        sine_data <= 12'(v(trig_count / 16));
        trig_count++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (!cfg_tvalid || cfg_tdata != 8'h01) begin failures++; $display("config word not offered"); end
    cfg_tready <= 1'b1;
    @(posedge clk) cfg_tready <= 1'b0;
    @(posedge clk);
    checks++;
    if (cfg_tvalid) begin failures++; $display("config still valid after handshake"); end
    wait (frames_seen == 2);
    // test-tone path
    @(posedge clk) rst <= 1'b1; is_sine <= 1'b1;
    repeat (3) @(posedge clk);
    frames_seen = 0; bin = 0; last_done = -1;
    rst <= 1'b0;
    wait (frames_seen == 2);
    checks++;
    if (done_count != 4) begin failures++; $display("frame_done count %0d", done_count); end
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

// tb_autotune_top: end-to-end run of the auto-tune system.
//
// The top runs with a 4-clock test-tone trigger and a 4-column spectrogram
// memory; every other size is the real one (2048-point frames, 64x / 16x
// oversampling, 512-bin columns, 1024 x 768 display). The ADC trigger comes
// every second clock. The FFT core is the behavioural DFT model, with
// random input stalls. The run:
//   1. microphone path, 440 Hz tone (bin 57.7): fcw must become A4 for the
//      15.625 kHz rate; while it plays, each effect is selected in turn and
//      the rising zero crossings of the output over 1000 audio samples are
//      compared with 440, 880 and 220 Hz, and about 495 Hz for the harmony;
//   2. silence: windows without a peak must keep A4;
//   3. test tone of 277.7 Hz (exactly bin 35 at 16.25 kHz) through the 16x
//      path: the detector settles on bin 34 or 35, which the note table
//      (built with the 7.63 Hz microphone bin width for both rates) maps to
//      C4, so fcw must become C4 for the 16.25 kHz rate.
// Also checked: the frame period on both paths, the FFT configuration word,
// that the spectrogram column pointer wrapped, and that every VGA pixel
// shows the low 12 bits of the memory word its position maps to (black
// outside the 4-column image), compared while no magnitudes are written. Each mechanism (mic frames, test-tone frames, FFT stalls,
// peaks found, peaks kept, the four effects, column wrap, lit pixels) is
// counted, and one that never happened is a failure.
module tb_autotune_top;
  logic clk = 1'b0, rst = 1'b1;
  logic is_sine = 1'b0;
  logic [1:0]  effect_sw = 2'd0;
  logic [31:0] test_fcw = '0;
  logic        adc_trig = 1'b0;
  logic [11:0] adc_data = 12'd2048;
  logic [7:0]  cfg_tdata;
  logic        cfg_tvalid, cfg_tready;
  logic [31:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;
  logic        audio_pwm;
  logic [11:0] audio_sample;
  logic [31:0] fcw;
  logic [10:0] best_index;
  logic        frame_done, window_done, peak_found, audio_strobe;
  logic [3:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs;
  int          stalls, fft_frames;
  logic [7:0]  config_word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  autotune_top #(.SINE_TRIG_DIV(4), .SPEC_WINDOWS(4)) dut (
    .clk(clk), .rst(rst), .is_sine(is_sine), .effect_sw(effect_sw), .test_fcw(test_fcw),
    .adc_trig(adc_trig), .adc_data(adc_data),
    .s_axis_config_tdata(cfg_tdata), .s_axis_config_tvalid(cfg_tvalid), .s_axis_config_tready(cfg_tready),
    .s_axis_data_tdata(s_tdata), .s_axis_data_tvalid(s_tvalid), .s_axis_data_tlast(s_tlast),
    .s_axis_data_tready(s_tready),
    .m_axis_data_tdata(m_tdata), .m_axis_data_tvalid(m_tvalid), .m_axis_data_tlast(m_tlast),
    .m_axis_data_tready(m_tready),
    .audio_pwm(audio_pwm), .audio_sample(audio_sample), .fcw(fcw), .best_index(best_index),
    .frame_done(frame_done), .window_done(window_done), .peak_found(peak_found),
    .audio_strobe(audio_strobe),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_hs(vga_hs), .vga_vs(vga_vs));

  fft_core_model #(.N(2048)) u_fft (
    .clk(clk), .rst(rst),
    .s_axis_config_tdata(cfg_tdata), .s_axis_config_tvalid(cfg_tvalid), .s_axis_config_tready(cfg_tready),
    .s_axis_data_tdata(s_tdata), .s_axis_data_tvalid(s_tvalid), .s_axis_data_tlast(s_tlast),
    .s_axis_data_tready(s_tready),
    .m_axis_data_tdata(m_tdata), .m_axis_data_tvalid(m_tvalid), .m_axis_data_tlast(m_tlast),
    .m_axis_data_tready(m_tready),
    .stalls(stalls), .frames(fft_frames), .config_word(config_word));

  // ---- microphone: ADC trigger every second clock, tone of adc_hz ----
  real adc_hz = 440.0, adc_amp = 1500.0;
  real adc_phase = 0.0;
  always @(posedge clk) begin
    adc_trig <= !adc_trig && !rst;
    if (!adc_trig && !rst) begin
      adc_phase += adc_hz / (15625.0 * 64.0);
      if (adc_phase >= 1.0) adc_phase -= 1.0;
      adc_data <= 12'($rtoi(2048.0 + adc_amp * $sin(2.0 * 3.141592653589793 * adc_phase)));
    end
  end

  // ---- counters of what happened ----
  int cycle = 0, mic_frames = 0, sine_frames = 0, peaks = 0, kept = 0, wraps = 0, lit = 0;
  int last_frame = -1;
  int fx_done [4] = '{0, 0, 0, 0};
  logic [1:0] prev_col = '0;
  always @(posedge clk) begin
    cycle++;
    if (!rst && frame_done) begin
      if (is_sine) sine_frames++; else mic_frames++;
      if (last_frame >= 0 && (mic_frames + sine_frames) > 2) begin
        checks++;
        if (cycle - last_frame != 2048 * (is_sine ? 16 * 4 : 64 * 2)) begin
          failures++; $display("frame period %0d clocks", cycle - last_frame);
        end
      end
      last_frame = cycle;
    end
    if (!rst && window_done) begin
      if (peak_found) peaks++; else kept++;
      $display("window: found %0b best bin %0d fcw %0d", peak_found, best_index, fcw);
    end
    if (dut.u_stft_bram.col == 2'd0 && prev_col == 2'd3) wraps++;
    prev_col <= dut.u_stft_bram.col;
  end

  // ---- display: each visible pixel must show its memory word ----
  localparam int PIX_DELAY = 4;
  logic [10:0] h_hist [PIX_DELAY];
  logic [9:0]  v_hist [PIX_DELAY];
  int quiet = 0, pix_checked = 0;
  always @(posedge clk) begin
    h_hist[0] <= dut.hcount;
    v_hist[0] <= dut.vcount;
    for (int i = 1; i < PIX_DELAY; i++) begin
      h_hist[i] <= h_hist[i-1];
      v_hist[i] <= v_hist[i-1];
    end
    quiet = dut.magnitude_tvalid ? 0 : quiet + 1;
    if (!rst && cycle > 10 && quiet > 10) begin
      int c, r;
      logic [11:0] e;
      c = int'(h_hist[PIX_DELAY-1]) - 256;
      r = int'(v_hist[PIX_DELAY-1]) - 128;
      if (c >= 0 && c < 4 && r >= 0 && r < 512)
        e = dut.u_stft_bram.u_mem.mem[(c + 1) * 512 - (r + 1)][11:0];
      else
        e = 12'h000;
      pix_checked++;
      if ({vga_r, vga_g, vga_b} != e) begin
        failures++;
        if (failures < 10) $display("pixel at %0d,%0d: %h expected %h", h_hist[PIX_DELAY-1], v_hist[PIX_DELAY-1], {vga_r, vga_g, vga_b}, e);
      end
      else if (e != 12'h000) lit++;
    end
  end

  function automatic longint fcw_of(real f, real fs);
    return longint'($rtoi(4294967296.0 * f / fs + 0.5));
  endfunction

  task automatic wait_windows(int n);
    repeat (n) begin
      @(posedge clk);
      while (!window_done) @(posedge clk);
    end
    repeat (3) @(posedge clk);
  endtask

  task automatic measure_effect(int fx, int lo, int hi);
    int rising;
    logic [11:0] prev;
    effect_sw <= 2'(fx);
    repeat (50) @(posedge audio_strobe);
    rising = 0; prev = audio_sample;
    for (int s = 0; s < 1000; s++) begin
      @(posedge audio_strobe);
      repeat (3) @(posedge clk);
      if (prev < 12'd2048 && audio_sample >= 12'd2048) rising++;
      prev = audio_sample;
    end
    checks++;
    if (rising < lo || rising > hi) begin
      failures++; $display("effect %0d: %0d rising crossings, expected %0d..%0d", fx, rising, lo, hi);
    end else fx_done[fx]++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // 1. microphone, 440 Hz
    wait_windows(2);
    checks++;
    if (longint'(fcw) != fcw_of(440.0, 15625.0)) begin
      failures++; $display("mic A4: fcw %0d expected %0d", fcw, fcw_of(440.0, 15625.0));
    end
    // 1000 samples at 15625 Hz: 28.2 periods of 440 Hz
    measure_effect(0, 27, 30);
    measure_effect(2, 55, 58);
    measure_effect(3, 13, 15);
    measure_effect(1, 24, 40);
    effect_sw <= 2'd0;
    // 2. silence: the note is kept
    adc_amp = 0.0;
    wait_windows(3);
    checks++;
    if (longint'(fcw) != fcw_of(440.0, 15625.0)) begin failures++; $display("note not kept: fcw %0d", fcw); end
    // 3. test tone, C4, through the 16x path
    test_fcw <= 32'(fcw_of(35.0 * 16250.0 / 2048.0, 16250.0 * 16.0));
    is_sine  <= 1'b1;
    last_frame = -1;
    wait_windows(3);
    checks++;
    if (longint'(fcw) != fcw_of(261.6255653, 16250.0)) begin
      failures++; $display("sine C4: fcw %0d expected %0d", fcw, fcw_of(261.6255653, 16250.0));
    end
    // let the display scan a whole frame
    repeat (1344 * 806) @(posedge clk);
    checks++;
    if (config_word != 8'h01) begin failures++; $display("FFT configuration word %h", config_word); end
    $display("mic frames %0d, tone frames %0d, FFT stalls %0d, peaks %0d, kept %0d, wraps %0d, lit pixels %0d, effects %0d %0d %0d %0d",
             mic_frames, sine_frames, stalls, peaks, kept, wraps, lit, fx_done[0], fx_done[1], fx_done[2], fx_done[3]);
    checks++; if (mic_frames == 0)  begin failures++; $display("no microphone frame"); end
    checks++; if (sine_frames == 0) begin failures++; $display("no test-tone frame"); end
    checks++; if (stalls == 0)      begin failures++; $display("no FFT stall"); end
    checks++; if (peaks == 0)       begin failures++; $display("no peak found"); end
    checks++; if (kept == 0)        begin failures++; $display("no window kept its note"); end
    checks++; if (wraps == 0)       begin failures++; $display("spectrogram never wrapped"); end
    checks++; if (lit == 0)         begin failures++; $display("no lit pixel"); end
    checks += pix_checked;
    for (int i = 0; i < 4; i++) begin
      checks++; if (fx_done[i] == 0) begin failures++; $display("effect %0d never verified", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sweep: a rising then falling tone sweep through the whole system.
//
// The microphone input glides linearly from 300 Hz to 600 Hz over eight
// frames and back down over eight more (ADC trigger every second clock, so a
// frame is 262,144 clocks). After every window the bench looks at the
// spectrogram column that window wrote: the strongest stored bin between 11
// and 140 must lie within 3 bins of the sweep frequency at the middle of
// the frame, divided by the 7.63 Hz bin width. Whenever the peak detector
// accepts a window, its best bin must also lie within 3 bins of that value.
// Across the sweep the detected bin must rise while the tone rises and fall
// while it falls. The top runs with a 16-column spectrogram (enough for the
// sweep) and a 4-clock test-tone trigger; all other sizes are the real ones.
module tb_sweep;
  logic clk = 1'b0, rst = 1'b1;
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

  localparam int  FRAMES_EACH_WAY = 8;
  localparam int  TRIGS_PER_FRAME = 2048 * 64;
  localparam real F_LO = 300.0, F_HI = 600.0;
  localparam real BIN_HZ = 15625.0 / 2048.0;

  always #5 clk = ~clk;

  autotune_top #(.SINE_TRIG_DIV(4), .SPEC_WINDOWS(16)) dut (
    .clk(clk), .rst(rst), .is_sine(1'b0), .effect_sw(2'd0), .test_fcw(32'd0),
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

  // sweep frequency as a function of the trigger count
  function automatic real sweep_hz(real trig);
    real pos;
    pos = trig / real'(TRIGS_PER_FRAME * FRAMES_EACH_WAY);
    if (pos <= 1.0) return F_LO + (F_HI - F_LO) * pos;
    if (pos <= 2.0) return F_HI - (F_HI - F_LO) * (pos - 1.0);
    return F_LO;
  endfunction

  real    phase = 0.0;
  longint trigs = 0;
  always @(posedge clk) begin
    adc_trig <= !adc_trig && !rst;
    if (!adc_trig && !rst) begin
      phase += sweep_hz(real'(trigs)) / (15625.0 * 64.0);
      if (phase >= 1.0) phase -= 1.0;
      trigs++;
      adc_data <= 12'($rtoi(2048.0 + 1900.0 * $sin(2.0 * 3.141592653589793 * phase)));
    end
  end

  initial begin
    int found_up = 0, found_down = 0, rises = 0, falls = 0, prev_found = -1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    for (int w = 0; w < 2 * FRAMES_EACH_WAY; w++) begin
      real exp_bin;
      int  arg, best, col;
      bit  found;
      @(posedge window_done);
      #1 found = peak_found;
      // frame w holds triggers [w*T + 2, (w+1)*T + 2)
      exp_bin = sweep_hz(real'(w) * TRIGS_PER_FRAME + TRIGS_PER_FRAME / 2) / BIN_HZ;
      col = w % 16;
      arg = 11; best = -1;
      for (int b = 11; b < 141; b++) begin
        int m;
        m = int'(dut.u_stft_bram.u_mem.mem[col * 512 + b]);
        if (m > best) begin best = m; arg = b; end
      end
      checks++;
      if (real'(arg) < exp_bin - 3.0 || real'(arg) > exp_bin + 3.0) begin
        failures++; $display("window %0d: spectrogram peak at bin %0d, sweep at %f", w, arg, exp_bin);
      end
      repeat (3) @(posedge clk);
      if (found) begin
        checks++;
        if (real'(best_index) < exp_bin - 3.0 || real'(best_index) > exp_bin + 3.0) begin
          failures++; $display("window %0d: detected bin %0d, sweep at %f", w, best_index, exp_bin);
        end
        if (w < FRAMES_EACH_WAY) found_up++; else found_down++;
        if (prev_found >= 0) begin
          if (w < FRAMES_EACH_WAY && int'(best_index) > prev_found) rises++;
          if (w > FRAMES_EACH_WAY && int'(best_index) < prev_found) falls++;
        end
        prev_found = int'(best_index);
      end
      $display("window %0d: sweep bin %0.1f, spectrogram peak %0d, detector %0s %0d",
               w, exp_bin, arg, found ? "found" : "kept", best_index);
    end
    checks++;
    if (found_up < 2 || found_down < 2) begin failures++; $display("detector accepted %0d up, %0d down", found_up, found_down); end
    checks++;
    if (rises == 0 || falls == 0) begin failures++; $display("detected note did not follow the sweep: %0d rises, %0d falls", rises, falls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * FRAMES_EACH_WAY * TRIGS_PER_FRAME * 2 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

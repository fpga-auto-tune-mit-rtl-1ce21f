// tb_autotune_full: one complete operation of the auto-tune system with
// every parameter at its default.
//
// A 440 Hz microphone tone is sampled by the ADC every 100 clocks (1 Msps
// at a 100 MHz clock), so one 2048-sample frame takes 2048 * 64 * 100 =
// 13,107,200 clocks. After the first frame has gone through the FFT model
// and the peak detector, fcw must be A4 at 15.625 kHz, the frame period must
// be exact, and over the next 300 audio samples the output tone must show
// 8 or 9 rising zero crossings (440 Hz * 300 / 15625 = 8.4). The second
// frame must follow exactly one frame period after the first and give the
// same note.
module tb_autotune_full;
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

  always #5 clk = ~clk;

  autotune_top dut (
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

  int  cycle = 0, trig_div = 0, frames = 0, first_frame = 0;
  real phase = 0.0;
  always @(posedge clk) begin
    cycle++;
    adc_trig <= 1'b0;
    if (!rst) begin
      trig_div = (trig_div == 99) ? 0 : trig_div + 1;
      if (trig_div == 0) begin
        adc_trig <= 1'b1;
        phase += 440.0 / 1.0e6;
        if (phase >= 1.0) phase -= 1.0;
        adc_data <= 12'($rtoi(2048.0 + 1500.0 * $sin(2.0 * 3.141592653589793 * phase)));
      end
      if (frame_done) begin
        frames++;
        if (frames == 1) first_frame = cycle;
        else begin
          checks++;
          if (cycle - first_frame != 2048 * 64 * 100) begin failures++; $display("frame period %0d", cycle - first_frame); end
        end
      end
    end
  end

  initial begin
    int rising;
    logic [11:0] prev;
    bit found;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge window_done);
    #1 found = peak_found;
    repeat (3) @(posedge clk);
    checks++;
    if (!found || longint'(fcw) != longint'($rtoi(4294967296.0 * 440.0 / 15625.0 + 0.5))) begin
      failures++; $display("fcw %0d (bin %0d, found %0b), expected A4", fcw, best_index, found);
    end
    rising = 0; prev = audio_sample;
    repeat (300) begin
      @(posedge audio_strobe);
      repeat (3) @(posedge clk);
      if (prev < 12'd2048 && audio_sample >= 12'd2048) rising++;
      prev = audio_sample;
    end
    checks++;
    if (rising < 8 || rising > 9) begin failures++; $display("%0d rising crossings in 300 samples", rising); end
    // second frame: same note, exact frame period (checked where it closes)
    @(posedge window_done);
    #1 found = peak_found;
    repeat (3) @(posedge clk);
    checks++;
    if (!found || longint'(fcw) != longint'($rtoi(4294967296.0 * 440.0 / 15625.0 + 0.5))) begin
      failures++; $display("second window: fcw %0d (bin %0d)", fcw, best_index);
    end
    checks++;
    if (frames != 2) begin failures++; $display("%0d frames", frames); end
    $display("best bin %0d, %0d frames, %0d FFT stalls", best_index, frames, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

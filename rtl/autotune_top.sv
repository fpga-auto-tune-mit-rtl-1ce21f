// autotune_top: frequency-domain auto-tune with spectrogram display.
//
// Audio comes either from the microphone ADC (adc_trig / adc_data, 12 bits
// at 1 Msps) or, with is_sine set, from an on-chip test tone whose pitch is
// test_fcw (phase step per test-tone trigger; the trigger runs every
// SINE_TRIG_DIV clocks). stft_fsm oversamples the source (64x or 16x),
// builds 2048-sample frames, windows each with a Hann window and streams it
// to the external FFT core, and turns the core's output into one 24-bit
// magnitude per bin. The magnitudes go to two places:
//   * peak_detector finds the dominant bin of each window and looks up the
//     frequency control word of the nearest note (B2 .. C6);
//     resynthesis plays a sine at that note, with the effect chosen by
//     effect_sw (none, major-third harmony, octave up, octave down), one
//     sample per oversampled input sample; playback turns it into PWM.
//   * stft_bram keeps the first 512 bins of the last SPEC_WINDOWS windows;
//     spectrogram reads it in step with the xvga timing and draws it at
//     (SPEC_X, SPEC_Y) on a 1024 x 768 screen.
// The FFT core itself (2048-point forward, pipelined streaming, natural
// order, 16-bit real and imaginary) and the ADC are outside this module;
// their AXI-Stream and sample ports are ports here. One clock drives
// everything, including the VGA timing, which therefore assumes the clock
// is the pixel clock. Reset is synchronous and active high.
module autotune_top
  import autotune_pkg::*;
#(
  parameter int unsigned SINE_TRIG_DIV = 400,
  parameter int unsigned SPEC_WINDOWS  = 512,
  parameter int unsigned SPEC_X        = 256,
  parameter int unsigned SPEC_Y        = 128
) (
  input  logic                clk,
  input  logic                rst,
  // switches
  input  logic                is_sine,
  input  logic [1:0]          effect_sw,
  input  logic [FCW_W-1:0]    test_fcw,
  // microphone ADC
  input  logic                adc_trig,
  input  logic [ADC_W-1:0]    adc_data,
  // FFT core: configuration, input frame, output spectrum
  output logic [7:0]          s_axis_config_tdata,
  output logic                s_axis_config_tvalid,
  input  logic                s_axis_config_tready,
  output logic [31:0]         s_axis_data_tdata,
  output logic                s_axis_data_tvalid,
  output logic                s_axis_data_tlast,
  input  logic                s_axis_data_tready,
  input  logic [31:0]         m_axis_data_tdata,
  input  logic                m_axis_data_tvalid,
  input  logic                m_axis_data_tlast,
  output logic                m_axis_data_tready,
  // audio out
  output logic                audio_pwm,
  output logic [AUDIO_W-1:0]  audio_sample,
  // status
  output logic [FCW_W-1:0]    fcw,
  output logic [FRAME_AW-1:0] best_index,
  output logic                frame_done,
  output logic                window_done,
  output logic                peak_found,
  output logic                audio_strobe,
  // VGA
  output logic [3:0]          vga_r,
  output logic [3:0]          vga_g,
  output logic [3:0]          vga_b,
  output logic                vga_hs,
  output logic                vga_vs
);
  localparam int unsigned SPEC_BINS = 512;
  localparam int unsigned SPEC_AW   = $clog2(SPEC_BINS * SPEC_WINDOWS);

  // ---------------- test tone source ----------------
  logic [$clog2(SINE_TRIG_DIV)-1:0] trig_cnt;
  logic                             sine_trig;
  logic [ADC_W-1:0]                 sine_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_cnt  <= '0;
      sine_trig <= 1'b0;
    end else begin
      sine_trig <= trig_cnt == '0;
      trig_cnt  <= (trig_cnt == $bits(trig_cnt)'(SINE_TRIG_DIV - 1)) ? '0 : trig_cnt + 1'b1;
    end
  end

  sine_generator #(.PHASE_W(FCW_W), .AMP_W(ADC_W)) u_test_tone (
    .clk(clk), .rst(rst), .step(sine_trig), .phase_incr(test_fcw), .amp(sine_data));

  // ---------------- STFT ----------------
  logic [MAG_W-1:0]     magnitude_tdata;
  logic                 magnitude_tvalid, magnitude_tlast;
  logic [OSAMPLE_W-1:0] osample;

  stft_fsm u_stft (
    .clk(clk), .rst(rst), .is_sine(is_sine),
    .adc_trig(adc_trig), .adc_data(adc_data),
    .sine_trig(sine_trig), .sine_data(sine_data),
    .s_axis_config_tdata(s_axis_config_tdata), .s_axis_config_tvalid(s_axis_config_tvalid),
    .s_axis_config_tready(s_axis_config_tready),
    .frame_tdata(s_axis_data_tdata), .frame_tvalid(s_axis_data_tvalid),
    .frame_tlast(s_axis_data_tlast), .m_axis_data_tready(s_axis_data_tready),
    .fft_tdata(m_axis_data_tdata), .fft_tvalid(m_axis_data_tvalid),
    .fft_tlast(m_axis_data_tlast), .fft_tready(m_axis_data_tready),
    .magnitude_tdata(magnitude_tdata), .magnitude_tvalid(magnitude_tvalid),
    .magnitude_tlast(magnitude_tlast),
    .audio_strobe(audio_strobe), .osample(osample), .frame_done(frame_done));

  // ---------------- pitch detection and resynthesis ----------------
  peak_detector u_peak (
    .clk(clk), .rst(rst), .is_sine(is_sine),
    .magnitude_tdata(magnitude_tdata), .magnitude_tvalid(magnitude_tvalid),
    .best_index(best_index), .fcw(fcw),
    .window_done(window_done), .peak_found(peak_found));

  resynthesis u_resynth (
    .clk(clk), .rst(rst), .step(audio_strobe), .fcw(fcw),
    .effect(effect_e'(effect_sw)), .sample(audio_sample));

  playback #(.W(AUDIO_W)) u_playback (
    .clk(clk), .rst(rst), .sample(audio_sample), .pwm_out(audio_pwm));

  // ---------------- spectrogram display ----------------
  logic [SPEC_AW-1:0]              spec_raddr;
  logic [15:0]                     spec_rdata;
  logic [$clog2(SPEC_WINDOWS)-1:0] spec_col;
  logic [10:0]                     hcount;
  logic [9:0]                      vcount;
  logic                            hsync, vsync, blank;
  logic                            hsync_d, vsync_d, blank_d;
  logic [11:0]                     pixel;

  stft_bram #(.BINS(SPEC_BINS), .WINDOWS(SPEC_WINDOWS)) u_stft_bram (
    .clk(clk), .rst(rst),
    .magnitude_tdata(magnitude_tdata), .magnitude_tvalid(magnitude_tvalid),
    .raddr(spec_raddr), .rdata(spec_rdata), .col(spec_col));

  xvga u_xvga (
    .clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync(hsync), .vsync(vsync), .blank(blank));

  spectrogram #(.BINS(SPEC_BINS), .WINDOWS(SPEC_WINDOWS)) u_spec (
    .clk(clk), .hcount_in(hcount), .vcount_in(vcount),
    .hsync_in(hsync), .vsync_in(vsync), .blank_in(blank),
    .x_in(11'(SPEC_X)), .y_in(10'(SPEC_Y)),
    .specgram_request_address(spec_raddr), .rdata(spec_rdata),
    .pixel_out(pixel), .hsync_out(hsync_d), .vsync_out(vsync_d), .blank_out(blank_d));

  always_ff @(posedge clk) begin
    {vga_r, vga_g, vga_b} <= blank_d ? 12'h000 : pixel;
    vga_hs                <= hsync_d;
    vga_vs                <= vsync_d;
  end
endmodule

// stft_fsm: turns the incoming audio into a stream of FFT magnitudes, one
// 2048-bin spectrum per 2048-sample frame.
//
// Two sources feed it: the microphone ADC (12-bit samples on adc_trig, 1 Msps)
// through a 64x oversampler, and the on-chip test tone (sine_trig) through a
// 16x oversampler; is_sine selects which one is in use. Each completed
// oversampled value is written, with a 0 prepended to make 16 bits, into
// the frame RAM at sample_counter. The write is made two sample triggers
// after done_osample (a two-stage shift register clocked by the triggers);
// osample is held for a whole oversampling group, so the delayed write
// stores the right value. When the last address of the frame is written,
// frame_done pulses for one clock and starts bram_2_fft, which streams the
// Hann-windowed frame to the external FFT core while the next frame fills
// (the FFT's streaming architecture overlaps the two). The FFT output comes
// back through fft_magnitude and leaves as magnitude_tdata/tvalid/tlast.
// The configuration word of the FFT core is 1 (forward transform); it is
// offered once after reset until the core accepts it.
//
// audio_strobe is the done_osample pulse of the selected source: one pulse
// per audio sample (15.625 kHz or 16.25 kHz), used to pace the tone output.
// Everything here follows the document except the single-clock frame_done
// pulse width and the configuration handshake, which are this design's.
module stft_fsm
  import autotune_pkg::*;
#(
  parameter int unsigned N          = FRAME_LEN,
  parameter int unsigned MIC_LOG2   = 6,
  parameter int unsigned SINE_LOG2  = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               is_sine,
  // sources
  input  logic               adc_trig,
  input  logic [ADC_W-1:0]   adc_data,
  input  logic               sine_trig,
  input  logic [ADC_W-1:0]   sine_data,
  // FFT core configuration channel
  output logic [7:0]         s_axis_config_tdata,
  output logic               s_axis_config_tvalid,
  input  logic               s_axis_config_tready,
  // frame stream into the FFT core
  output logic [31:0]        frame_tdata,
  output logic               frame_tvalid,
  output logic               frame_tlast,
  input  logic               m_axis_data_tready,
  // FFT core output stream
  input  logic [31:0]        fft_tdata,
  input  logic               fft_tvalid,
  input  logic               fft_tlast,
  output logic               fft_tready,
  // magnitudes
  output logic [MAG_W-1:0]   magnitude_tdata,
  output logic               magnitude_tvalid,
  output logic               magnitude_tlast,
  // status
  output logic               audio_strobe,
  output logic [OSAMPLE_W-1:0] osample,
  output logic               frame_done
);
  localparam int unsigned AW = $clog2(N);

  // oversamplers
  logic [OSAMPLE_W-1:0] os_mic, os_sine;
  logic                 done_mic, done_sine;

  oversampler #(.LOG2_RATIO(MIC_LOG2), .IN_W(ADC_W), .OUT_W(OSAMPLE_W)) u_os_mic (
    .clk(clk), .rst(rst), .sample_trig(adc_trig), .din(adc_data),
    .osample(os_mic), .done_osample(done_mic));

  oversampler #(.LOG2_RATIO(SINE_LOG2), .IN_W(ADC_W), .OUT_W(OSAMPLE_W)) u_os_sine (
    .clk(clk), .rst(rst), .sample_trig(sine_trig), .din(sine_data),
    .osample(os_sine), .done_osample(done_sine));

  logic trig, done_osample;
  assign trig         = is_sine ? sine_trig : adc_trig;
  assign done_osample = is_sine ? done_sine : done_mic;
  assign osample      = is_sine ? os_sine   : os_mic;
  assign audio_strobe = done_osample;

  // two-trigger delay of done_osample -> frame RAM write enable
  logic seen, dly1, wr_en;
  always_ff @(posedge clk) begin
    if (rst) begin
      seen <= 1'b0;
      dly1 <= 1'b0;
    end else begin
      if (done_osample)  seen <= 1'b1;
      else if (trig)     seen <= 1'b0;
      if (trig)          dly1 <= seen;
    end
  end
  assign wr_en = trig && dly1;

  // frame construction
  logic [AW-1:0] sample_counter;
  always_ff @(posedge clk) begin
    if (rst) begin
      sample_counter <= '0;
      frame_done     <= 1'b0;
    end else begin
      frame_done <= wr_en && (sample_counter == AW'(N - 1));
      if (wr_en) sample_counter <= sample_counter + 1'b1;
    end
  end

  logic          ram_re;
  logic [AW-1:0] ram_addr;
  logic [15:0]   ram_dout;

  bram_sdp #(.DEPTH(N), .WIDTH(16)) u_frame_bram (
    .clk(clk), .we(wr_en), .waddr(sample_counter), .din({1'b0, osample}),
    .re(ram_re), .raddr(ram_addr), .dout(ram_dout));

  logic          sending;
  logic [AW:0]   send_count;

  bram_2_fft #(.N(N)) u_b2f (
    .clk(clk), .rst(rst), .start(frame_done),
    .ram_re(ram_re), .ram_addr(ram_addr), .ram_dout(ram_dout),
    .frame_tdata(frame_tdata), .frame_tvalid(frame_tvalid), .frame_tlast(frame_tlast),
    .m_axis_data_tready(m_axis_data_tready),
    .sending(sending), .send_count(send_count));

  // FFT configuration: forward transform
  assign s_axis_config_tdata = 8'h01;
  always_ff @(posedge clk) begin
    if (rst)                       s_axis_config_tvalid <= 1'b1;
    else if (s_axis_config_tready) s_axis_config_tvalid <= 1'b0;
  end

  fft_magnitude #(.MAG_W(MAG_W)) u_mag (
    .clk(clk), .rst(rst),
    .s_axis_tdata(fft_tdata), .s_axis_tvalid(fft_tvalid), .s_axis_tlast(fft_tlast),
    .s_axis_tready(fft_tready),
    .magnitude_tdata(magnitude_tdata), .magnitude_tvalid(magnitude_tvalid),
    .magnitude_tlast(magnitude_tlast));
endmodule

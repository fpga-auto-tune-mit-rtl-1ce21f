// fft_core_model: behavioural stand-in for the vendor FFT core (simulation
// only, not synthesizable).
//
// Accepts one configuration word, then frames of N complex samples on an
// AXI-Stream slave (imaginary in bits 31:16, real in 15:0). When a frame is
// complete it computes the forward DFT X[k] = sum x[n] exp(-j 2 pi k n / N)
// directly in floating point, divides by 2^SCALE_SHIFT, rounds, saturates to
// 16 bits and streams X[0] .. X[N-1] in natural order, one per clock while
// the consumer is ready, with tlast on the last bin. With STALL set, the
// input tready drops on random clocks to exercise the sender's backpressure
// handling; stalls counts those clocks. OUT_DELAY clocks pass between the
// last input and the first output.
module fft_core_model #(
  parameter int N           = 2048,
  parameter int SCALE_SHIFT = 8,
  parameter int OUT_DELAY   = 20,
  parameter bit STALL       = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  s_axis_config_tdata,
  input  logic        s_axis_config_tvalid,
  output logic        s_axis_config_tready,
  input  logic [31:0] s_axis_data_tdata,
  input  logic        s_axis_data_tvalid,
  input  logic        s_axis_data_tlast,
  output logic        s_axis_data_tready,
  output logic [31:0] m_axis_data_tdata,
  output logic        m_axis_data_tvalid,
  output logic        m_axis_data_tlast,
  input  logic        m_axis_data_tready,
  output int          stalls,
  output int          frames,
  output logic [7:0]  config_word
);
  real cos_t [N];
  real sin_t [N];
  real xr [N];
  real xi [N];
  logic [31:0] out_q [N];
  int in_cnt, out_idx, delay;
  bit out_busy;

  initial begin
    for (int i = 0; i < N; i++) begin
      cos_t[i] = $cos(2.0 * 3.141592653589793 * i / N);
      sin_t[i] = $sin(2.0 * 3.141592653589793 * i / N);
    end
  end

  function automatic logic [15:0] sat16(real v);
    longint r;
    r = longint'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return 16'(r);
  endfunction

  task automatic compute();
    for (int k = 0; k < N; k++) begin
      real re, im;
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        int idx;
        idx = (k * n) % N;
        re += xr[n] * cos_t[idx] + xi[n] * sin_t[idx];
        im += xi[n] * cos_t[idx] - xr[n] * sin_t[idx];
      end
      out_q[k] = {sat16(im / real'(1 << SCALE_SHIFT)), sat16(re / real'(1 << SCALE_SHIFT))};
    end
  endtask

  assign s_axis_config_tready = 1'b1;

  always @(posedge clk) begin
    if (rst) begin
      in_cnt <= 0; out_busy <= 0; out_idx <= 0; delay <= 0;
      m_axis_data_tvalid <= 1'b0; m_axis_data_tlast <= 1'b0; m_axis_data_tdata <= '0;
      s_axis_data_tready <= 1'b1; stalls <= 0; frames <= 0; config_word <= '0;
    end else begin
      if (s_axis_config_tvalid) config_word <= s_axis_config_tdata;
      if (s_axis_data_tvalid && s_axis_data_tready) begin
        xr[in_cnt] = real'($signed(s_axis_data_tdata[15:0]));
        xi[in_cnt] = real'($signed(s_axis_data_tdata[31:16]));
        if (in_cnt == N - 1) begin
          compute();
          in_cnt   <= 0;
          out_busy <= 1;
          out_idx  <= 0;
          delay    <= OUT_DELAY;
          frames   <= frames + 1;
        end else begin
          in_cnt <= in_cnt + 1;
        end
      end
      s_axis_data_tready <= STALL ? (($urandom % 8) != 0) : 1'b1;
      if (s_axis_data_tvalid && !s_axis_data_tready) stalls <= stalls + 1;
      // output side
      if (m_axis_data_tvalid && m_axis_data_tready) begin
        m_axis_data_tvalid <= 1'b0;
        m_axis_data_tlast  <= 1'b0;
      end
      if (out_busy) begin
        if (delay > 0) delay <= delay - 1;
        else if (!m_axis_data_tvalid || m_axis_data_tready) begin
          m_axis_data_tdata  <= out_q[out_idx];
          m_axis_data_tvalid <= 1'b1;
          m_axis_data_tlast  <= (out_idx == N - 1);
          if (out_idx == N - 1) out_busy <= 0;
          out_idx <= out_idx + 1;
        end
      end
    end
  end
endmodule

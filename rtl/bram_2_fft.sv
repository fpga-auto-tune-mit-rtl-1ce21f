// bram_2_fft: streams one frame from the frame RAM, Hann-windowed, into the
// FFT core over AXI-Stream.
//
// The module idles (not sending) until start pulses. It then reads addresses
// 0 .. N-1 of the frame RAM and, in parallel, the Hann table; each sample is
// multiplied by its coefficient and sent as a 32-bit complex word with the
// imaginary half zero (real part in bits 15:0). frame_tlast marks sample N-1.
// The pipeline is two stages deep (RAM/ROM read, then multiply into the
// output register) and advances only when the output register is empty or
// the FFT accepts it (m_axis_data_tready), so backpressure never loses or
// repeats a sample. send_count counts accepted samples of the current frame.
// A start while a frame is still being sent is ignored; the document resets
// addr and send_count on start, which is what happens here from idle.
//
// Windowing: product = sample (16-bit, top bit zero) * coef (unsigned Q0.16);
// the real part is product >> 16. The scaling is this design's choice.
module bram_2_fft #(
  parameter int unsigned N      = 2048,
  parameter int unsigned AW     = $clog2(N),
  parameter int unsigned COEF_W = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  // frame RAM read port
  output logic          ram_re,
  output logic [AW-1:0] ram_addr,
  input  logic [15:0]   ram_dout,
  // AXI-Stream master towards the FFT core
  output logic [31:0]   frame_tdata,
  output logic          frame_tvalid,
  output logic          frame_tlast,
  input  logic          m_axis_data_tready,
  // status
  output logic          sending,
  output logic [AW:0]   send_count
);
  logic              advance;
  logic              s1_valid, s1_last;
  logic [AW-1:0]     addr;
  logic [COEF_W-1:0] coef;
  logic [15+COEF_W:0] product;

  assign advance  = !frame_tvalid || m_axis_data_tready;
  assign ram_re   = advance && sending;
  assign ram_addr = addr;

  hann_rom #(.N(N), .COEF_W(COEF_W)) u_hann (
    .clk  (clk),
    .re   (ram_re),
    .addr (addr),
    .coef (coef)
  );

  assign product = ram_dout * coef;

  always_ff @(posedge clk) begin
    if (rst) begin
      sending      <= 1'b0;
      addr         <= '0;
      send_count   <= '0;
      s1_valid     <= 1'b0;
      s1_last      <= 1'b0;
      frame_tvalid <= 1'b0;
      frame_tlast  <= 1'b0;
      frame_tdata  <= '0;
    end else begin
      if (frame_tvalid && m_axis_data_tready) send_count <= send_count + 1'b1;
      if (start && !sending) begin
        sending    <= 1'b1;
        addr       <= '0;
        send_count <= '0;
      end
      if (advance) begin
        frame_tvalid <= s1_valid;
        frame_tlast  <= s1_last;
        frame_tdata  <= {16'h0000, product[COEF_W +: 16]};
        s1_valid     <= sending;
        s1_last      <= sending && (addr == AW'(N - 1));
        if (sending) begin
          addr <= addr + 1'b1;
          if (addr == AW'(N - 1)) sending <= 1'b0;
        end
      end
    end
  end

  // AXI-Stream rule: a presented word stays stable until it is accepted.
  property p_hold;
    @(posedge clk) disable iff (rst)
      frame_tvalid && !m_axis_data_tready |=> frame_tvalid && $stable(frame_tdata) && $stable(frame_tlast);
  endproperty
  a_hold: assert property (p_hold) else $error("bram_2_fft: stream word changed before it was accepted");
endmodule

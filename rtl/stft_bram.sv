// stft_bram: spectrogram memory, one column per FFT window.
//
// The memory holds WINDOWS columns of BINS words (512 x 512 x 16 bits =
// 262,144 words by default). While magnitude_tvalid is high a bin counter
// numbers the incoming magnitudes 0 .. N-1; bins below BINS are written at
// address col * BINS + bin, i.e. consecutively, as the low 16 bits of the
// magnitude. After bin N-1 the column pointer advances, and after WINDOWS
// windows it wraps to 0 and overwrites the oldest column, so the picture
// scrolls in place. The read port serves the display: rdata is the word at
// raddr one clock after (reads every clock). Sizes and layout follow the
// document; storing the low 16 bits of the magnitude is this design's
// reading of its 16-bit memory word. col is the column written next.
module stft_bram
  import autotune_pkg::*;
#(
  parameter int unsigned N       = FRAME_LEN,
  parameter int unsigned BINS    = 512,
  parameter int unsigned WINDOWS = 512,
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned DEPTH   = BINS * WINDOWS,
  parameter int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [MAG_W-1:0]           magnitude_tdata,
  input  logic                       magnitude_tvalid,
  input  logic [AW-1:0]              raddr,
  output logic [WIDTH-1:0]           rdata,
  output logic [$clog2(WINDOWS)-1:0] col
);
  localparam int unsigned BIN_W = $clog2(N);
  localparam int unsigned COL_W = $clog2(WINDOWS);

  logic [BIN_W-1:0] bin;
  logic             we;
  logic [AW-1:0]    waddr;

  assign we    = magnitude_tvalid && (bin < BIN_W'(BINS));
  assign waddr = AW'(col) * AW'(BINS) + AW'(bin);

  always_ff @(posedge clk) begin
    if (rst) begin
      bin <= '0;
      col <= '0;
    end else if (magnitude_tvalid) begin
      if (bin == BIN_W'(N - 1)) begin
        bin <= '0;
        col <= (col == COL_W'(WINDOWS - 1)) ? '0 : col + 1'b1;
      end else begin
        bin <= bin + 1'b1;
      end
    end
  end

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk(clk), .we(we), .waddr(waddr), .din(magnitude_tdata[WIDTH-1:0]),
    .re(1'b1), .raddr(raddr), .dout(rdata));
endmodule

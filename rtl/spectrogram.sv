// spectrogram: draws the spectrogram memory as a 512 x 512 pixel image.
//
// For a pixel at column c = hcount - x_in and row r = vcount - y_in in_image
// the image, the memory word wanted is bin (BINS-1-r) of window c:
//   addr = (c + 1) * BINS - (r + 1)
// so low frequencies are at the bottom and time runs left to right. The
// document's display also added (hcount - 270) to this address to hide a
// misalignment in its own pipeline; here the pipeline is aligned instead
// (the syncs are delayed with the pixel), and that term is only added when
// SKEW_FIX is set, with SKEW_OFFSET = 270. The pixel colour is the low 12 bits
// of the word split into 4-bit red, green and blue, as in the document;
// outside the image the pixel is black.
//
// Timing: three clocks from hcount/vcount to pixel (address register,
// memory read, colour register); hsync, vsync and blank are delayed by the
// same three clocks.
module spectrogram #(
  parameter int unsigned BINS        = 512,
  parameter int unsigned WINDOWS     = 512,
  parameter int unsigned AW          = $clog2(BINS * WINDOWS),
  parameter bit          SKEW_FIX    = 1'b0,
  parameter int unsigned SKEW_OFFSET = 270
) (
  input  logic          clk,
  input  logic [10:0]   hcount_in,
  input  logic [9:0]    vcount_in,
  input  logic          hsync_in,
  input  logic          vsync_in,
  input  logic          blank_in,
  input  logic [10:0]   x_in,
  input  logic [9:0]    y_in,
  output logic [AW-1:0] specgram_request_address,
  input  logic [15:0]   rdata,
  output logic [11:0]   pixel_out,
  output logic          hsync_out,
  output logic          vsync_out,
  output logic          blank_out
);
  logic [11:0] c;
  logic [10:0] r;
  logic        in_image;
  logic [31:0] addr_full;

  assign c      = {1'b0, hcount_in} - {1'b0, x_in};
  assign r      = {1'b0, vcount_in} - {1'b0, y_in};
  assign in_image = (hcount_in >= x_in) && (vcount_in >= y_in)
               && (c < 12'(WINDOWS)) && (r < 11'(BINS));

  always_comb begin
    addr_full = (32'(c) + 32'd1) * 32'(BINS) - (32'(r) + 32'd1);
    if (SKEW_FIX) addr_full = addr_full + 32'(hcount_in) - 32'(SKEW_OFFSET);
  end

  logic [2:0] hs_d, vs_d, bl_d;
  logic [1:0] in_d;

  always_ff @(posedge clk) begin
    specgram_request_address <= addr_full[AW-1:0];
    in_d      <= {in_d[0], in_image};
    hs_d      <= {hs_d[1:0], hsync_in};
    vs_d      <= {vs_d[1:0], vsync_in};
    bl_d      <= {bl_d[1:0], blank_in};
    pixel_out <= in_d[1] ? rdata[11:0] : 12'h000;
  end

  assign hsync_out = hs_d[2];
  assign vsync_out = vs_d[2];
  assign blank_out = bl_d[2];
endmodule

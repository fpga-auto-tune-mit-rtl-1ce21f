// fft_magnitude: magnitude of each complex FFT output bin.
//
// This is the chain that follows the FFT core: the 32-bit output word is
// sliced into real (bits 15:0) and imaginary (bits 31:16) parts, each part
// is squared, the squares are added, and the integer square root of the sum
// is taken. The document uses vendor multiplier, adder and square-root
// CORDIC cores plus an AXI register slice that delays the valid signals to
// line up with the CORDIC; here the same job is one fixed pipeline:
//   stage 1  re^2 and im^2 registered
//   stage 2  sum registered (32 bits)
//   stages 3..18  one restoring square-root step each (two radicand bits
//            per stage), giving floor(sqrt(sum)) in 16 bits
// tvalid and tlast travel down the same pipeline, so the output stream is
// the input stream delayed by LATENCY = 18 clocks. The pipeline never
// stalls: s_axis_tready is always high, and the consumers (peak detector,
// spectrogram memory) always accept. The magnitude is zero-extended to the
// 24-bit word the peak detector takes.
module fft_magnitude #(
  parameter int unsigned MAG_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      s_axis_tdata,
  input  logic             s_axis_tvalid,
  input  logic             s_axis_tlast,
  output logic             s_axis_tready,
  output logic [MAG_W-1:0] magnitude_tdata,
  output logic             magnitude_tvalid,
  output logic             magnitude_tlast
);
  localparam int unsigned ROOT_W = 16;          // sqrt of a 32-bit value
  localparam int unsigned REM_W  = ROOT_W + 2;

  initial assert (MAG_W >= ROOT_W) else $error("fft_magnitude: MAG_W too narrow");

  assign s_axis_tready = 1'b1;

  // stage 1: squares
  logic signed [15:0] re_in, im_in;
  logic [31:0]        re_sq, im_sq;
  logic               v1, l1;
  assign re_in = s_axis_tdata[15:0];
  assign im_in = s_axis_tdata[31:16];

  always_ff @(posedge clk) begin
    re_sq <= 32'(re_in * re_in);
    im_sq <= 32'(im_in * im_in);
  end

  // stage 2: sum of squares (at most 2^31, fits 32 bits)
  logic [31:0] sum_sq;
  logic        v2, l2;
  always_ff @(posedge clk) sum_sq <= re_sq + im_sq;

  // square-root pipeline: stage k holds the radicand still to consume,
  // the partial remainder and the partial root.
  logic [31:0]       rad  [ROOT_W+1];
  logic [REM_W-1:0]  rem  [ROOT_W+1];
  logic [ROOT_W-1:0] root [ROOT_W+1];
  logic              vs   [ROOT_W+1];
  logic              ls   [ROOT_W+1];

  assign rad[0]  = sum_sq;
  assign rem[0]  = '0;
  assign root[0] = '0;
  assign vs[0]   = v2;
  assign ls[0]   = l2;

  for (genvar k = 0; k < ROOT_W; k++) begin : g_sqrt
    logic [REM_W-1:0] r_shift, trial;
    assign r_shift = {rem[k][REM_W-3:0], rad[k][31:30]};
    assign trial   = {root[k], 2'b01};
    always_ff @(posedge clk) begin
      rad[k+1] <= {rad[k][29:0], 2'b00};
      if (r_shift >= trial) begin
        rem[k+1]  <= r_shift - trial;
        root[k+1] <= {root[k][ROOT_W-2:0], 1'b1};
      end else begin
        rem[k+1]  <= r_shift;
        root[k+1] <= {root[k][ROOT_W-2:0], 1'b0};
      end
    end
  end

  // valid / last shift register (the register-slice role)
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      for (int k = 1; k <= ROOT_W; k++) vs[k] <= 1'b0;
    end else begin
      v1 <= s_axis_tvalid;
      v2 <= v1;
      for (int k = 1; k <= ROOT_W; k++) vs[k] <= vs[k-1];
    end
    l1 <= s_axis_tlast;
    l2 <= l1;
    for (int k = 1; k <= ROOT_W; k++) ls[k] <= ls[k-1];
  end

  assign magnitude_tdata  = MAG_W'(root[ROOT_W]);
  assign magnitude_tvalid = vs[ROOT_W];
  assign magnitude_tlast  = ls[ROOT_W];
endmodule

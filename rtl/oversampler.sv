// oversampler: averages 2^LOG2_RATIO consecutive input samples into one.
//
// Each sample_trig adds din to an accumulator. On the 2^LOG2_RATIO-th trigger
// the completed sum, scaled to OUT_W bits, is registered on osample and
// done_osample pulses for one clock. osample then holds until the next group
// completes. The microphone path uses 64x (1 Msps -> 15.625 kHz, 12 -> 15
// bits) and the test-tone path 16x, as in the document. Keeping the top
// OUT_W bits of the sum is this design's choice of scaling; for 64x it is
// the full 18-bit sum divided by 8, i.e. the average with 3 extra bits.
//
// Timing: done_osample is high in the clock after the trigger that closes a
// group. Reset (synchronous, active high) clears the group.
module oversampler #(
  parameter int unsigned LOG2_RATIO = 6,
  parameter int unsigned IN_W       = 12,
  parameter int unsigned OUT_W      = 15
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample_trig,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] osample,
  output logic             done_osample
);
  localparam int unsigned SUM_W = IN_W + LOG2_RATIO;

  initial assert (SUM_W >= OUT_W) else $error("oversampler: OUT_W wider than the sum");

  logic [SUM_W-1:0]      acc;
  logic [LOG2_RATIO-1:0] count;
  logic [SUM_W-1:0]      sum_next;

  assign sum_next = acc + SUM_W'(din);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc          <= '0;
      count        <= '0;
      osample      <= '0;
      done_osample <= 1'b0;
    end else begin
      done_osample <= 1'b0;
      if (sample_trig) begin
        count <= count + 1'b1;
        if (count == {LOG2_RATIO{1'b1}}) begin
          acc          <= '0;
          osample      <= sum_next[SUM_W-1 -: OUT_W];
          done_osample <= 1'b1;
        end else begin
          acc <= sum_next;
        end
      end
    end
  end
endmodule

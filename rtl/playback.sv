// playback: drives the speaker from the resynthesised samples.
//
// A free-running W-bit counter sets the PWM period of 2^W clocks. The input
// sample is captured at the start of each period and pwm_out is high while
// the counter is below it, so the average output level is
// sample / 2^W of full scale; an external low-pass filter on the board
// recovers the audio. The document names the playback stage but does not
// describe it; pulse-width modulation is this design's choice.
module playback #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] sample,
  output logic         pwm_out
);
  logic [W-1:0] count, level;

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      level   <= '0;
      pwm_out <= 1'b0;
    end else begin
      count <= count + 1'b1;
      if (count == '1) level <= sample;
      pwm_out <= (count < level);
    end
  end
endmodule

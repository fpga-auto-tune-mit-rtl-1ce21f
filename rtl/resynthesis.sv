// resynthesis: plays a sine tone at the corrected pitch, with three effects.
//
// Two sine generators step once per audio sample (step = the oversampler's
// done pulse, 15.625 kHz or 16.25 kHz). The main one advances by
//   fcw        effect FX_NONE and FX_HARMONY
//   2 * fcw    FX_CHIPMUNK (one octave up)
//   fcw / 2    FX_VADER    (one octave down)
// and the second by fcw + fcw/4 = 5/4 fcw, a major third above. With
// FX_HARMONY the output is the average of the two tones, otherwise the main
// tone alone. The effect set and the frequency ratios follow the document;
// mixing by averaging (to stay within 12 bits) is this design's choice.
// sample is registered: it follows the generators by one clock, two clocks
// after a step.
module resynthesis
  import autotune_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               step,
  input  logic [FCW_W-1:0]   fcw,
  input  effect_e            effect,
  output logic [AUDIO_W-1:0] sample
);
  logic [FCW_W-1:0]   incr_main, incr_third;
  logic [AUDIO_W-1:0] amp_main, amp_third;

  always_comb begin
    unique case (effect)
      FX_CHIPMUNK: incr_main = fcw << 1;
      FX_VADER:    incr_main = fcw >> 1;
      default:     incr_main = fcw;
    endcase
  end
  assign incr_third = fcw + (fcw >> 2);

  sine_generator #(.PHASE_W(FCW_W), .AMP_W(AUDIO_W)) u_main (
    .clk(clk), .rst(rst), .step(step), .phase_incr(incr_main), .amp(amp_main));

  sine_generator #(.PHASE_W(FCW_W), .AMP_W(AUDIO_W)) u_third (
    .clk(clk), .rst(rst), .step(step), .phase_incr(incr_third), .amp(amp_third));

  logic [AUDIO_W:0] mix;
  assign mix = {1'b0, amp_main} + {1'b0, amp_third};

  always_ff @(posedge clk) begin
    if (rst)                      sample <= '0;
    else if (effect == FX_HARMONY) sample <= mix[AUDIO_W:1];
    else                          sample <= amp_main;
  end
endmodule

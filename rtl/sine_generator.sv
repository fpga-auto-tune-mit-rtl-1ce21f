// sine_generator: direct digital synthesis of an all-positive sine wave.
//
// A 32-bit phase register advances by phase_incr on every step pulse; its
// top 9 bits index a 512-entry, 12-bit sine table holding
// round(2047.5 + 2047.5 * sin(2*pi*k/512)), i.e. values 0 .. 4095. The output
// frequency is phase_incr * f_step / 2^32, so phase_incr is the frequency
// control word fcw = 2^32 * f / f_step. The table size and depth follow the
// document; the table is computed at elaboration. amp is registered and
// reflects the phase one clock earlier. Reset clears the phase.
module sine_generator #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned LUT_AW  = 9,
  parameter int unsigned AMP_W   = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               step,
  input  logic [PHASE_W-1:0] phase_incr,
  output logic [AMP_W-1:0]   amp
);
  localparam int unsigned ENTRIES = 1 << LUT_AW;
  typedef logic [AMP_W-1:0] table_t [ENTRIES];

  function automatic table_t make_table();
    table_t t;
    real    half;
    half = real'((1 << AMP_W) - 1) / 2.0;
    for (int k = 0; k < int'(ENTRIES); k++)
      t[k] = AMP_W'($rtoi(half + half * $sin(2.0 * 3.141592653589793 * real'(k) / real'(ENTRIES)) + 0.5));
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)       phase <= '0;
    else if (step) phase <= phase + phase_incr;
    amp <= SINE[phase[PHASE_W-1 -: LUT_AW]];
  end
endmodule

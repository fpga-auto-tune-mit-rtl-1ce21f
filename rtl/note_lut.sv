// note_lut: FFT bin number -> frequency control word of the nearest note.
//
// For bin b the bin's centre frequency is b * 15625 / 2048 Hz (bin width
// 7.63 Hz). It is snapped to the nearest equal-tempered note (A4 = 440 Hz)
// between B2 (123.47 Hz) and C6 (1046.50 Hz); lower bins give B2 and higher
// bins give C6. The word returned is fcw = round(2^32 * f_note / fs), with
// fs = 15625 Hz for the microphone path and 16250 Hz when is_sine is set,
// because the tone generator then runs at the test-tone sample rate. The
// bin-to-note rule and both rates follow the document; "nearest" is taken
// as the smallest difference in Hz. Both 512-entry tables are computed at
// elaboration by a constant function. The read is registered: fcw is valid
// one clock after index and is_sine.
module note_lut
  import autotune_pkg::*;
#(
  parameter int unsigned N_FFT      = FRAME_LEN,
  parameter int unsigned ENTRIES    = 512,
  parameter int unsigned MIDI_LOW   = 47,        // B2
  parameter int unsigned MIDI_HIGH  = 84,        // C6
  parameter int unsigned FS_BIN_HZ  = FS_MIC_HZ  // rate that sets the bin width
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] index,
  input  logic                       is_sine,
  output logic [FCW_W-1:0]           fcw
);
  typedef logic [FCW_W-1:0] table_t [ENTRIES];

  function automatic real note_hz(int unsigned midi);
    return 440.0 * $pow(2.0, (real'(midi) - 69.0) / 12.0);
  endfunction

  function automatic table_t make_table(int unsigned fs_out);
    table_t t;
    for (int b = 0; b < int'(ENTRIES); b++) begin
      real f, best_f, best_d;
      f      = real'(b) * real'(FS_BIN_HZ) / real'(N_FFT);
      best_f = note_hz(MIDI_LOW);
      best_d = (f > best_f) ? f - best_f : best_f - f;
      for (int unsigned m = MIDI_LOW + 1; m <= MIDI_HIGH; m++) begin
        real fm, d;
        fm = note_hz(m);
        d  = (f > fm) ? f - fm : fm - f;
        if (d < best_d) begin
          best_d = d;
          best_f = fm;
        end
      end
      t[b] = FCW_W'($rtoi(4294967296.0 * best_f / real'(fs_out) + 0.5));
    end
    return t;
  endfunction

  localparam table_t FCW_MIC  = make_table(FS_MIC_HZ);
  localparam table_t FCW_SINE = make_table(FS_SINE_HZ);

  always_ff @(posedge clk) fcw <= is_sine ? FCW_SINE[index] : FCW_MIC[index];
endmodule

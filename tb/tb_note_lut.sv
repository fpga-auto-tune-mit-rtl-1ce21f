// tb_note_lut: checks the bin -> note -> fcw table for both sample rates.
//
// For every bin the bench finds the note independently: it rounds the
// semitone distance 12*log2(f/440) down and up, keeps whichever of the two
// notes is closer in Hz, clamps to B2 .. C6, and forms
// round(2^32 * f_note / fs). A difference of one LSB is allowed. Spot
// checks: bin 58 (442 Hz) gives A4 = 120946279 at 15625 Hz, bin 0 gives B2,
// bin 511 gives C6, and the read latency is one clock.
module tb_note_lut;
  logic clk = 1'b0, is_sine = 1'b0;
  logic [8:0]  index = '0;
  logic [31:0] fcw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  note_lut dut (.clk(clk), .index(index), .is_sine(is_sine), .fcw(fcw));

  function automatic real note(int m);
    return 440.0 * (2.0 ** ((m - 69) / 12.0));
  endfunction

  function automatic longint expected(int b, bit sine);
    real f, semis, f_lo, f_hi, fn;
    int  m;
    f = b * 15625.0 / 2048.0;
    if (f < 1.0) m = 47;
    else begin
      semis = 12.0 * $ln(f / 440.0) / $ln(2.0);
      m     = 69 + $rtoi($floor(semis));
      f_lo  = note(m);
      f_hi  = note(m + 1);
      if (f - f_lo > f_hi - f) m = m + 1;
    end
    if (m < 47) m = 47;
    if (m > 84) m = 84;
    fn = note(m);
    return longint'($rtoi(4294967296.0 * fn / (sine ? 16250.0 : 15625.0) + 0.5));
  endfunction

  task automatic check(int b, bit sine, longint e);
    @(posedge clk); index <= 9'(b); is_sine <= sine;
    @(posedge clk); #1;
    checks++;
    if (longint'(fcw) > e + 1 || longint'(fcw) + 1 < e) begin
      failures++; $display("bin %0d sine %0b: fcw %0d expected %0d", b, sine, fcw, e);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 512; b++) check(b, 1'(s), expected(b, 1'(s)));
    check(58, 1'b0, 64'd120946279);
    check(58, 1'b1, 64'd116294499);
    check(0, 1'b0, longint'($rtoi(4294967296.0 * 123.470825576 / 15625.0 + 0.5)));
    check(511, 1'b0, longint'($rtoi(4294967296.0 * 1046.502261 / 15625.0 + 0.5)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_peak_detector: drives hand-built spectra through the peak detector.
//
// Each window is 2048 magnitudes of low noise (0 .. 500) with a few bins set
// by the scenario, streamed with random gaps in tvalid. The expected best
// bin of each window is worked out by hand from the eight rules:
//   W1 peak at 58 (30000, neighbours 16000)            -> 58
//   W2 noise only                                      -> keeps 58
//   W3 big peaks at bins 5 and 150 (outside 10..141)   -> keeps 58
//   W4 peak at 34, plus a higher spike at 80 whose
//      neighbours are tiny (neighbour-sum rule)        -> 34
//   W5 peak at 90 of 20000 < previous highest - 2000    -> keeps 34
//   W6 same as W5, previous window found nothing        -> 90
//   W7 same, test-tone rate selected                   -> 90, other fcw
//   W8 peak of 14000 (< 15000)                         -> keeps 90
// fcw is compared, two clocks after the last bin, with
// round(2^32 * f_note / fs) for the note the bench expects (A4, C4, F5).
module tb_peak_detector;
  localparam int N = 2048;
  logic clk = 1'b0, rst = 1'b1, is_sine = 1'b0;
  logic [23:0] mag = '0;
  logic        mag_valid = 1'b0;
  logic [10:0] best_index;
  logic [31:0] fcw;
  logic        window_done, peak_found;
  int checks = 0, failures = 0;
  int spec [N];

  always #5 clk = ~clk;

  peak_detector dut (.clk(clk), .rst(rst), .is_sine(is_sine), .magnitude_tdata(mag),
    .magnitude_tvalid(mag_valid), .best_index(best_index), .fcw(fcw),
    .window_done(window_done), .peak_found(peak_found));

  function automatic longint fcw_of(real f, bit sine);
    return longint'($rtoi(4294967296.0 * f / (sine ? 16250.0 : 15625.0) + 0.5));
  endfunction

  task automatic noise();
    foreach (spec[i]) spec[i] = $urandom % 501;
  endtask

  task automatic put_peak(int b, int v, int side);
    spec[b] = v; spec[b-1] = side; spec[b+1] = side;
  endtask

  task automatic run_window(int exp_bin, bit exp_found, real f_note);
    bit saw_done;
    saw_done = 0;
    for (int i = 0; i < N; i++) begin
      while (($urandom % 5) == 0) begin
        @(posedge clk) mag_valid <= 1'b0;
      end
      @(posedge clk);
      mag <= 24'(spec[i]); mag_valid <= 1'b1;
    end
    @(posedge clk) mag_valid <= 1'b0;
    #1;
    checks++;
    if (!window_done || peak_found != exp_found) begin
      failures++; $display("window_done %0b peak_found %0b, expected found %0b", window_done, peak_found, exp_found);
    end
    @(posedge clk); #1;
    checks++;
    if (best_index != 11'(exp_bin) || longint'(fcw) != fcw_of(f_note, is_sine)) begin
      failures++; $display("best %0d fcw %0d, expected %0d fcw %0d", best_index, fcw, exp_bin, fcw_of(f_note, is_sine));
    end
  endtask

  localparam real A4 = 440.0, C4 = 261.6255653, F5 = 698.4564629;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    noise(); put_peak(58, 30000, 16000);                        run_window(58, 1, A4);
    noise();                                                    run_window(58, 0, A4);
    noise(); put_peak(5, 40000, 30000); put_peak(150, 40000, 30000); run_window(58, 0, A4);
    noise(); put_peak(34, 30000, 16000); put_peak(80, 32000, 100);  run_window(34, 1, C4);
    noise(); put_peak(90, 20000, 10000);                        run_window(34, 0, C4);
    noise(); put_peak(90, 20000, 10000);                        run_window(90, 1, F5);
    is_sine <= 1'b1;
    noise(); put_peak(90, 20000, 10000);                        run_window(90, 1, F5);
    noise(); put_peak(60, 14000, 10000);                        run_window(90, 0, F5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

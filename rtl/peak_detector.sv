// peak_detector: picks the dominant frequency bin of each FFT window and
// turns it into a frequency control word.
//
// Magnitudes arrive one bin per clock while magnitude_tvalid is high; a
// counter numbers them 0 .. N-1. When bin b arrives, it is current_val and
// the two registers hold prev_val1 (bin b-1) and prev_val2 (bin b-2). Bin
// b-1 is a peak candidate, and becomes the window's best bin, when all eight
// conditions of the document hold:
//   1. b-1 >  LOW_BIN (10)            2. b-1 < HIGH_BIN (141)
//   3. prev_val1 > highest_val - 5000 4. prev_val1 > prev_highest_val - 2000
//   5. prev_val1 > 15000
//   6. current_sum > 30               7. current_sum > highest_sum
//   8. current_sum > prev_highest_sum - 5
// where current_sum = prev_val2 + current_val (the two neighbours of the
// candidate), highest_val / highest_sum belong to the best bin so far in
// this window and prev_highest_val / prev_highest_sum to the previous
// window. The comparisons with a subtraction are done as additions on the
// other side, so nothing wraps below zero.
//
// When bin N-1 arrives the window closes: prev_highest_* take this window's
// highest_*, and highest_*, prev_val1 and prev_val2 are cleared. If the
// window produced a candidate, best_index is replaced by it; otherwise the
// previous window's note is kept. The published best_index goes through
// note_lut, so fcw is valid two clocks after the last bin (one clock to
// publish, one for the table). window_done and peak_found pulse at publish.
//
// This design's choices: the conditions are evaluated on the clock the
// current bin arrives rather than one clock later, highest_sum is cleared
// with highest_val at the end of a window, and the note is published once
// per window rather than whenever the running best bin changes.
module peak_detector
  import autotune_pkg::*;
#(
  parameter int unsigned N               = FRAME_LEN,
  parameter int unsigned LOW_BIN         = 10,
  parameter int unsigned HIGH_BIN        = 141,
  parameter int unsigned VAL_MARGIN      = 5000,
  parameter int unsigned PREV_VAL_MARGIN = 2000,
  parameter int unsigned MIN_VAL         = 15000,
  parameter int unsigned MIN_SUM         = 30,
  parameter int unsigned PREV_SUM_MARGIN = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               is_sine,
  input  logic [MAG_W-1:0]   magnitude_tdata,
  input  logic               magnitude_tvalid,
  output logic [$clog2(N)-1:0] best_index,
  output logic [FCW_W-1:0]   fcw,
  output logic               window_done,
  output logic               peak_found
);
  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned SUM_W = MAG_W + 1;
  localparam int unsigned CMP_W = MAG_W + 3;   // room for value + margin

  logic [AW-1:0]    counter;
  logic [MAG_W-1:0] current_val, prev_val1, prev_val2;
  logic [MAG_W-1:0] highest_val, prev_highest_val;
  logic [SUM_W-1:0] current_sum, highest_sum, prev_highest_sum;
  logic [AW-1:0]    win_best, cand_index;
  logic             win_found;
  logic             last_bin, is_peak;

  assign current_val = magnitude_tdata;
  assign current_sum = SUM_W'(prev_val2) + SUM_W'(current_val);
  assign cand_index  = counter - 1'b1;
  assign last_bin    = counter == AW'(N - 1);

  always_comb begin
    is_peak = magnitude_tvalid
           && (counter != '0)
           && (cand_index > AW'(LOW_BIN))
           && (cand_index < AW'(HIGH_BIN))
           && (CMP_W'(prev_val1) + CMP_W'(VAL_MARGIN)      > CMP_W'(highest_val))
           && (CMP_W'(prev_val1) + CMP_W'(PREV_VAL_MARGIN) > CMP_W'(prev_highest_val))
           && (CMP_W'(prev_val1)                           > CMP_W'(MIN_VAL))
           && (CMP_W'(current_sum)                         > CMP_W'(MIN_SUM))
           && (CMP_W'(current_sum)                         > CMP_W'(highest_sum))
           && (CMP_W'(current_sum) + CMP_W'(PREV_SUM_MARGIN) > CMP_W'(prev_highest_sum));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      counter          <= '0;
      prev_val1        <= '0;
      prev_val2        <= '0;
      highest_val      <= '0;
      highest_sum      <= '0;
      prev_highest_val <= '0;
      prev_highest_sum <= '0;
      win_best         <= '0;
      win_found        <= 1'b0;
      best_index       <= '0;
      window_done      <= 1'b0;
      peak_found       <= 1'b0;
    end else begin
      window_done <= 1'b0;
      peak_found  <= 1'b0;
      if (magnitude_tvalid) begin
        counter <= counter + 1'b1;
        if (last_bin) begin
          // close the window (a candidate at bin N-2 is outside HIGH_BIN)
          counter          <= '0;
          prev_val1        <= '0;
          prev_val2        <= '0;
          highest_val      <= '0;
          highest_sum      <= '0;
          prev_highest_val <= highest_val;
          prev_highest_sum <= highest_sum;
          win_found        <= 1'b0;
          window_done      <= 1'b1;
          peak_found       <= win_found;
          if (win_found) best_index <= win_best;
        end else begin
          prev_val2 <= prev_val1;
          prev_val1 <= current_val;
          if (is_peak) begin
            highest_val <= prev_val1;
            highest_sum <= current_sum;
            win_best    <= cand_index;
            win_found   <= 1'b1;
          end
        end
      end
    end
  end

  note_lut #(.N_FFT(N)) u_note_lut (
    .clk     (clk),
    .index   (best_index[8:0]),
    .is_sine (is_sine),
    .fcw     (fcw)
  );
endmodule

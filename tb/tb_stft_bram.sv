// tb_stft_bram: checks column layout, bin cut-off and wrap-around of the
// spectrogram memory, at a reduced size (16-bin windows, 8 stored bins,
// 4 columns). Six windows are written with value 1000*w + bin + 65536
// (bit 16 set to show that only the low 16 bits are kept); afterwards
// column c must hold window c+4 for c < 2 (overwritten after the wrap) and
// window c otherwise, bins 8..15 must not have been stored, and the column
// pointer must have wrapped to 2.
module tb_stft_bram;
  localparam int N = 16, BINS = 8, WINDOWS = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] mag = '0;
  logic        mag_valid = 1'b0;
  logic [4:0]  raddr = '0;
  logic [15:0] rdata;
  logic [1:0]  col;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stft_bram #(.N(N), .BINS(BINS), .WINDOWS(WINDOWS)) dut (.clk(clk), .rst(rst),
    .magnitude_tdata(mag), .magnitude_tvalid(mag_valid), .raddr(raddr), .rdata(rdata), .col(col));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int w = 0; w < 6; w++)
      for (int b = 0; b < N; b++) begin
        if ($urandom % 3 == 0) begin @(posedge clk) mag_valid <= 1'b0; end
        @(posedge clk) mag <= 24'(1000 * w + b + 65536); mag_valid <= 1'b1;
      end
    @(posedge clk) mag_valid <= 1'b0;
    for (int c = 0; c < WINDOWS; c++)
      for (int b = 0; b < BINS; b++) begin
        int w;
        w = (c < 2) ? c + 4 : c;
        @(posedge clk) raddr <= 5'(c * BINS + b);
        @(posedge clk);
        #1 checks++;
        if (rdata != 16'(1000 * w + b)) begin
          failures++; $display("col %0d bin %0d: %0d expected %0d", c, b, rdata, 1000 * w + b);
        end
      end
    checks++;
    if (col != 2'd2) begin failures++; $display("column pointer %0d", col); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

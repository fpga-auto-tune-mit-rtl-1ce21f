// tb_hann_rom: checks all 2048 Hann coefficients.
//
// The expected value is computed with the identity w[n] = sin^2(pi*n/N)
// (equal to 0.5*(1 - cos(2*pi*n/N))) scaled to 65535; a difference of one
// LSB is allowed for rounding. Also checks the one-clock read latency and
// the symmetry w[n] = w[N-n].
module tb_hann_rom;
  localparam int N = 2048;
  logic clk = 1'b0, re = 1'b0;
  logic [10:0] addr = '0;
  logic [15:0] coef;
  logic [15:0] got [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hann_rom #(.N(N), .COEF_W(16)) dut (.*);

  initial begin
    for (int n = 0; n < N; n++) begin
      real s, e;
      @(posedge clk); re <= 1'b1; addr <= 11'(n);
      @(posedge clk); re <= 1'b0;
      #1 got[n] = coef;
      s = $sin(3.141592653589793 * n / N);
      e = s * s * 65535.0;
      checks++;
      if ((real'(coef) - e > 1.0) || (e - real'(coef) > 1.0)) begin
        failures++; $display("n=%0d coef=%0d expected %f", n, coef, e);
      end
    end
    for (int n = 1; n < N; n++) begin
      checks++;
      if (got[n] > got[N-n] + 1 || got[n] + 1 < got[N-n]) begin failures++; $display("asymmetric at %0d", n); end
    end
    checks++;
    if (got[0] != 0 || got[N/2] != 16'hFFFF) begin failures++; $display("end points wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

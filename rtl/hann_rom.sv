// hann_rom: Hann window coefficients for an N-sample frame.
//
// w[n] = 0.5 * (1 - cos(2*pi*n/N)), stored as unsigned fixed point with
// COEF_W fractional bits (full scale 2^COEF_W - 1). The table is computed at
// elaboration by a constant function, so no data file is needed. The read
// is registered with an enable, matching the frame RAM it is read beside:
// coef is valid one clock after a read with re high and holds while re is
// low. Using a Hann window follows the document; the coefficient width is
// this design's choice.
module hann_rom #(
  parameter int unsigned N      = 2048,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [AW-1:0]     addr,
  output logic [COEF_W-1:0] coef
);
  typedef logic [COEF_W-1:0] table_t [N];

  function automatic table_t make_table();
    table_t t;
    real    scale;
    scale = real'((64'd1 << COEF_W) - 64'd1);
    for (int n = 0; n < int'(N); n++) begin
      real w;
      w    = 0.5 * (1.0 - $cos(2.0 * 3.141592653589793 * real'(n) / real'(N)));
      t[n] = COEF_W'($rtoi(w * scale + 0.5));
    end
    return t;
  endfunction

  localparam table_t HANN = make_table();

  always_ff @(posedge clk) begin
    if (re) coef <= HANN[addr];
  end
endmodule

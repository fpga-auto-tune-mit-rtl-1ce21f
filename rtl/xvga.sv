// xvga: 1024 x 768 at 60 Hz VGA timing generator.
//
// hcount runs 0 .. H_TOTAL-1 and vcount 0 .. V_TOTAL-1; pixels with
// hcount < H_ACTIVE and vcount < V_ACTIVE are visible. hsync and vsync are
// active low during their sync pulses; blank is high outside the visible
// area. All outputs are registered and change together. The defaults are
// the standard VESA 1024x768@60 timings (65 MHz pixel clock); the sizes
// are parameters so a testbench can shrink the frame.
module xvga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic        h_end, v_end;
  logic [10:0] h_next;
  logic [9:0]  v_next;

  assign h_end  = hcount == 11'(H_TOTAL - 1);
  assign v_end  = vcount == 10'(V_TOTAL - 1);
  assign h_next = h_end ? '0 : hcount + 1'b1;
  assign v_next = h_end ? (v_end ? '0 : vcount + 1'b1) : vcount;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !((h_next >= 11'(H_ACTIVE + H_FP)) && (h_next < 11'(H_ACTIVE + H_FP + H_SYNC)));
      vsync  <= !((v_next >= 10'(V_ACTIVE + V_FP)) && (v_next < 10'(V_ACTIVE + V_FP + V_SYNC)));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end
endmodule

// bram_sdp: simple dual-port block RAM, one write port and one read port.
//
// Write: when we is high, din is stored at waddr on the rising edge.
// Read: when re is high, the word at raddr appears on dout one clock later
// and is held while re is low (the read register has an enable, as a block
// RAM output register does). A read of the address being written returns the
// old word. Contents are not reset; the module is used for the 2048 x 16
// frame buffer and, inside stft_bram, for the 512 x 512 spectrogram memory.
module bram_sdp #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] din,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    if (re) dout <= mem[raddr];
  end
endmodule

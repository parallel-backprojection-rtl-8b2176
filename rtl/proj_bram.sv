// Projection data BlockRAM: holds the 2^(R+9) complex samples p(t, u) of one projection u.
// Port A is written by the DMA receive controller, port B is read with the fast-time index
// from the distance-to-time calculator; both run on the PCI-side clock. Read data appears one
// cycle after the address (registered read, as a BlockRAM gives). R = 2 gives 2048 words of
// 32 bits, the default depth of the design.
module proj_bram #(
  parameter int R = 2,
  parameter int W = 32,
  localparam int AW = R + 9
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

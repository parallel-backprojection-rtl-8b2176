// Behavioural model of one off-chip target SRAM as seen through the board's memory
// controller: 2^AW words of 72 bits on the memory clock, one access per clock, a write takes
// effect at the clock edge, read data appears LAT clocks after the read request. Used only in
// simulation; the real part is a commercial DDR SRAM and its vendor controller.
module sram_model #(
  parameter int AW  = 18,
  parameter int LAT = 2
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [71:0]   wdata,
  output logic [71:0]   rdata
);
  logic [71:0] mem [2**AW];
  logic [71:0] pipe [LAT];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) pipe[i] = '0;
  end

  always @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
    pipe[0] <= rd ? mem[addr] : 72'h0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[LAT-1];

  // host-side access for testbenches
  function automatic logic [71:0] peek(input int a);
    return mem[a];
  endfunction
  function automatic void poke(input int a, input logic [71:0] d);
    mem[a] = d;
  endfunction
endmodule

// Single-clock FIFO with show-ahead output and an almost-full flag.
// Used as the projection-sample FIFO of each adder stage: the DIC/BlockRAM side pushes one
// sample per pixel, the adder pops it when the matching target pixel passes. `afull` rises
// when AF_LEVEL or more entries are held, early enough for the producer to stop while
// results are still in flight. `rd_data` is valid whenever `empty` is low.
// Depth and threshold are this design's own choices.
module sync_fifo #(
  parameter int W        = 32,
  parameter int DEPTH    = 64,      // power of two
  parameter int AF_LEVEL = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         afull
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp, cnt;

  assign cnt     = wp - rp;
  assign empty   = cnt == 0;
  assign full    = cnt == (AW+1)'(DEPTH);
  assign afull   = cnt >= (AW+1)'(AF_LEVEL);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  // a push into a full FIFO or a pop from an empty one is a design error
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule

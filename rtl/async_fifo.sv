// Dual-clock FIFO for crossing between the 50 MHz SRAM clock and the 133 MHz PCI clock.
// Write and read pointers are kept in binary and Gray code; each Gray pointer crosses into
// the other domain through two flip-flops. `full` and `afull` are computed in the write
// domain from the synchronised read pointer, `empty` in the read domain from the synchronised
// write pointer, so both flags are pessimistic and never late. The output is show-ahead:
// `rd_data` is valid whenever `empty` is low. `afull` (AF_LEVEL entries or more) lets a
// producer with reads in flight stop in time. Depth 2^AW is this design's own choice.
module async_fifo #(
  parameter int W        = 72,
  parameter int AW       = 4,
  parameter int AF_LEVEL = 10
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         afull,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  rbin_w, wbin_next, rbin_next;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);
  assign rbin_w    = g2b(rgray_w2);
  assign full      = (wbin - rbin_w) == (AW+1)'(2**AW);
  assign afull     = (wbin - rbin_w) >= (AW+1)'(AF_LEVEL);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= wbin_next ^ (wbin_next >> 1);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read domain
  assign empty     = rgray == wgray_r2;
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);
  assign rd_data   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rbin_next ^ (rbin_next >> 1);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty));
endmodule

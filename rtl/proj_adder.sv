// Projection adder stage: adds the contribution of one projection u to every target pixel.
// Projection side: the pixel index arriving on pix_* goes to this stage's distance-to-time
// calculator (dic); its fast-time index addresses the projection BlockRAM (proj_bram), and
// the sample read (forced to zero when the pixel is outside the beam or the stored window) is
// pushed into the projection FIFO (sync_fifo). The pixel index is also registered and passed
// to the next stage, so all stages compute their samples for the same pixel order.
// Target side: target pixels stream through the stages with a valid/ready handshake and one
// register per stage. A pixel is accepted only when this stage's FIFO holds its sample; the
// complex sum (16-bit sample parts sign-extended into the 18-bit pixel parts, wrapping on
// overflow) is registered and offered to the next stage. `pf_afull` tells the pixel address
// generator to pause; the FIFO threshold leaves room for every pixel already in the DIC.
// The DIC/BlockRAM/FIFO/adder structure follows the design; the handshake, the FIFO depth and
// the wrap-around on overflow are this design's own choices.
module proj_adder
  import bp_pkg::*;
#(
  parameter int X_W      = 9,
  parameter int Y_W      = 10,
  parameter int R        = 2,
  parameter int C_W      = 20,
  parameter int PF_DEPTH = 64,
  parameter int PF_AF    = 32,
  localparam int PW = X_W + Y_W,
  localparam int TW = R + 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flight_t            fp,
  input  logic signed [15:0] u,
  // BlockRAM load from the DMA receive controller
  input  logic               bram_we,
  input  logic [TW-1:0]      bram_waddr,
  input  smp_t               bram_wdata,
  // pixel index chain
  input  logic               pix_valid,
  input  logic [PW-1:0]      pix,
  output logic               pix_valid_o,
  output logic [PW-1:0]      pix_o,
  output logic               pf_afull,
  // target pixel stream
  input  logic               t_valid,
  input  pix_t               t_data,
  output logic               t_ready,
  output logic               o_valid,
  output pix_t               o_data,
  input  logic               o_ready
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid_o <= 1'b0; pix_o <= '0;
    end else begin
      pix_valid_o <= pix_valid;
      pix_o       <= pix;
    end
  end

  logic          d_valid, d_hit;
  logic [TW-1:0] d_t;
  dic #(.X_W(X_W), .Y_W(Y_W), .T_W(TW), .C_W(C_W)) u_dic (
    .clk, .rst_n, .fp, .u,
    .in_valid(pix_valid), .x(pix[X_W-1:0]), .y(pix[PW-1:X_W]),
    .out_valid(d_valid), .hit(d_hit), .t(d_t)
  );

  smp_t bram_q;
  proj_bram #(.R(R), .W($bits(smp_t))) u_bram (
    .clk, .we(bram_we), .waddr(bram_waddr), .wdata(bram_wdata),
    .re(d_valid), .raddr(d_t), .rdata(bram_q)
  );

  logic r_valid, r_hit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0; r_hit <= 1'b0;
    end else begin
      r_valid <= d_valid;
      r_hit   <= d_hit;
    end
  end

  smp_t pf_in, pf_q;
  logic pf_empty, pf_full, pf_pop;
  assign pf_in = r_hit ? bram_q : '0;
  sync_fifo #(.W($bits(smp_t)), .DEPTH(PF_DEPTH), .AF_LEVEL(PF_AF)) u_pf (
    .clk, .rst_n, .wr_en(r_valid), .wr_data(pf_in), .rd_en(pf_pop),
    .rd_data(pf_q), .empty(pf_empty), .full(pf_full), .afull(pf_afull)
  );

  assign t_ready = (!o_valid || o_ready) && !pf_empty;
  assign pf_pop  = t_valid && t_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_data <= '0;
    end else if (pf_pop) begin
      o_valid   <= 1'b1;
      o_data.re <= t_data.re + PIX_W'(pf_q.re);
      o_data.im <= t_data.im + PIX_W'(pf_q.im);
    end else if (o_ready) begin
      o_valid <= 1'b0;
    end
  end
endmodule

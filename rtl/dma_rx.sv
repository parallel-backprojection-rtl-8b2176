// DMA receive controller (DRC): fetches a batch of projection data and spreads it over the
// projection BlockRAMs of every adder stage of every pipeline.
// On `start` it requests the whole buffer from the host with a one-cycle `rx_req` and the
// word count PIPES*N*2^(R+9) on `rx_len`. The words then arrive on a valid/ready stream, one
// per clock (rx_ready is high while busy), in the order pipeline, adder stage, fast-time index
// (the last varies fastest); each is written to BlockRAM address t of stage k of pipeline p.
// `busy` falls after the last word. Everything runs on the PCI clock, like the BlockRAMs.
// Distributing the DMA data into the BlockRAMs follows the design; the buffer order and the
// handshake are this design's own choices.
module dma_rx
  import bp_pkg::*;
#(
  parameter int PIPES = 2,
  parameter int N     = 8,
  parameter int R     = 2,
  localparam int TW    = R + 9,
  localparam int SW    = (N > 1) ? $clog2(N) : 1,
  localparam int PPW   = (PIPES > 1) ? $clog2(PIPES) : 1,
  localparam int LEN_W = $clog2(PIPES * N * (2 ** TW) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             rx_req,
  output logic [LEN_W-1:0] rx_len,
  input  logic             rx_valid,
  input  logic [CSR_W-1:0] rx_data,
  output logic             rx_ready,
  output logic             bram_we    [PIPES],
  output logic [SW-1:0]    bram_stage,
  output logic [TW-1:0]    bram_waddr,
  output smp_t             bram_wdata
);
  logic [TW-1:0]  t;
  logic [SW-1:0]  k;
  logic [PPW-1:0] p;
  logic           take, last_t, last_k, last_p;

  assign rx_ready = busy;
  assign take     = rx_valid && busy;
  assign last_t   = t == '1;
  assign last_k   = k == SW'(N - 1);
  assign last_p   = p == PPW'(PIPES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; t <= '0; k <= '0; p <= '0; rx_req <= 1'b0; rx_len <= '0;
    end else begin
      rx_req <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        t      <= '0; k <= '0; p <= '0;
        rx_req <= 1'b1;
        rx_len <= LEN_W'(PIPES * N * (2 ** TW));
      end else if (take) begin
        t <= t + 1'b1;
        if (last_t) begin
          k <= last_k ? '0 : k + 1'b1;
          if (last_k) begin
            p <= last_p ? '0 : p + 1'b1;
            if (last_p) busy <= 1'b0;
          end
        end
      end
    end
  end

  // the write happens in the same cycle as the word is taken
  always_comb begin
    for (int i = 0; i < PIPES; i++) bram_we[i] = take && p == PPW'(i);
    bram_stage = k;
    bram_waddr = t;
    bram_wdata = smp_t'(rx_data);
  end
endmodule

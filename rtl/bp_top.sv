// Backprojection hardware unit: forms SAR target images by backprojection on an FPGA board.
// The host writes flight parameters and commands into the control/status registers (csr) over
// programmed I/O, pushes batches of filtered radar projections by DMA (dma_rx spreads them over
// the projection BlockRAMs), and each processing step then adds the contributions of N
// projections to every pixel of the target image held in off-chip SRAM. PIPES independent
// pipelines (bp_pipeline), each with its own SRAM pair and its own flight parameters, work at
// the same time. When all projections are in, a readout streams the selected pipeline's image
// through the complex magnitude unit (cmag) to the DMA transmit controller (dma_tx).
// Clocks: lclk is the 133 MHz PCI-side clock of almost everything; mclk is the 50 MHz SRAM
// clock of the target memories and their address generators. Each clock has its own reset.
// Ports: PIO register bus, DMA receive and transmit streams with their transfer requests, and
// the SRAM ports of PIPES x 2 target memories (72-bit words, SRAM_LAT cycles read latency).
// The block structure follows the design; the number of pipelines used together (two, each
// forming its own subimage) and all port protocols are this design's own reading.
module bp_top
  import bp_pkg::*;
#(
  parameter int PIPES    = 2,
  parameter int N        = 8,
  parameter int R        = 2,
  parameter int X_W      = 9,
  parameter int Y_W      = 10,
  parameter int C_W      = 20,
  parameter int SRAM_LAT = 2,
  localparam int PW    = X_W + Y_W,
  localparam int AW    = PW - 1,
  localparam int RXL_W = $clog2(PIPES * N * (2 ** (R + 9)) + 1),
  localparam int TXL_W = PW + 1
) (
  input  logic              lclk,
  input  logic              lrst_n,
  input  logic              mclk,
  input  logic              mrst_n,
  input  logic              clocks_ok,
  // programmed I/O
  input  logic              pio_wr,
  input  logic              pio_rd,
  input  logic [7:0]        pio_addr,
  input  logic [CSR_W-1:0]  pio_wdata,
  output logic [CSR_W-1:0]  pio_rdata,
  // DMA receive
  output logic              rx_req,
  output logic [RXL_W-1:0]  rx_len,
  input  logic              rx_valid,
  input  logic [CSR_W-1:0]  rx_data,
  output logic              rx_ready,
  // DMA transmit
  output logic              tx_req,
  output logic [TXL_W-1:0]  tx_len,
  output logic              tx_valid,
  output logic [CSR_W-1:0]  tx_data,
  output logic              tx_last,
  input  logic              tx_ready,
  // target SRAMs, [pipeline][0/1]
  output logic [AW-1:0]     sram_addr  [PIPES][2],
  output logic              sram_rd    [PIPES][2],
  output logic              sram_wr    [PIPES][2],
  output logic [WORD_W-1:0] sram_wdata [PIPES][2],
  input  logic [WORD_W-1:0] sram_rdata [PIPES][2]
);
  localparam int SW  = (N > 1) ? $clog2(N) : 1;
  localparam int PPW = (PIPES > 1) ? $clog2(PIPES) : 1;

  logic go_step, go_zero, go_read, go_rx;
  logic [PIPES-1:0] bank, p_busy, p_done, step_done;
  logic [PPW-1:0] rd_pipe;
  flight_t fp [PIPES];
  logic rx_busy, tx_busy;

  // which operation the pipelines are running, for the step counter
  mop_e cur_op;
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) cur_op <= OP_STEP;
    else if (go_step) cur_op <= OP_STEP;
    else if (go_zero) cur_op <= OP_ZERO;
    else if (go_read) cur_op <= OP_READ;
  end
  assign step_done = (cur_op == OP_STEP) ? p_done : '0;

  csr #(.PIPES(PIPES), .N(N), .R(R)) u_csr (
    .clk(lclk), .rst_n(lrst_n), .pio_wr, .pio_rd, .pio_addr, .pio_wdata, .pio_rdata,
    .clocks_ok, .pipes_busy(|p_busy), .rx_busy, .tx_busy, .step_done,
    .go_step, .go_zero, .go_read, .go_rx, .bank, .rd_pipe, .fp
  );

  logic            bram_we [PIPES];
  logic [SW-1:0]   bram_stage;
  logic [R+8:0]    bram_waddr;
  smp_t            bram_wdata;
  dma_rx #(.PIPES(PIPES), .N(N), .R(R)) u_drc (
    .clk(lclk), .rst_n(lrst_n), .start(go_rx), .busy(rx_busy),
    .rx_req, .rx_len, .rx_valid, .rx_data, .rx_ready,
    .bram_we, .bram_stage, .bram_waddr, .bram_wdata
  );

  logic p_rd_valid [PIPES];
  pix_t p_rd_data  [PIPES];
  logic p_rd_ready [PIPES];

  for (genvar p = 0; p < PIPES; p++) begin : g_pipe
    logic start_p;
    mop_e op_p;
    // a readout involves only the selected pipeline
    assign start_p = go_step || go_zero || (go_read && rd_pipe == PPW'(p));
    assign op_p    = go_zero ? OP_ZERO : (go_read ? OP_READ : OP_STEP);
    bp_pipeline #(.N(N), .R(R), .X_W(X_W), .Y_W(Y_W), .C_W(C_W), .SRAM_LAT(SRAM_LAT)) u_pipe (
      .lclk, .lrst_n, .mclk, .mrst_n,
      .fp(fp[p]), .start(start_p), .op(op_p), .bank(bank[p]), .busy(p_busy[p]), .done(p_done[p]),
      .bram_we(bram_we[p]), .bram_stage, .bram_waddr, .bram_wdata,
      .rd_valid(p_rd_valid[p]), .rd_data(p_rd_data[p]), .rd_ready(p_rd_ready[p]),
      .sram_addr(sram_addr[p]), .sram_rd(sram_rd[p]), .sram_wr(sram_wr[p]),
      .sram_wdata(sram_wdata[p]), .sram_rdata(sram_rdata[p])
    );
  end

  // readout: selected pipeline -> complex magnitude -> DMA transmit
  logic c_in_ready, m_valid, m_ready;
  logic [MAG_W-1:0] m_data;
  always_comb begin
    for (int p = 0; p < PIPES; p++) p_rd_ready[p] = c_in_ready && rd_pipe == PPW'(p);
  end

  cmag u_cmag (
    .clk(lclk), .rst_n(lrst_n),
    .in_valid(p_rd_valid[rd_pipe]), .in_data(p_rd_data[rd_pipe]), .in_ready(c_in_ready),
    .out_valid(m_valid), .out_mag(m_data), .out_ready(m_ready)
  );

  dma_tx #(.LEN_W(TXL_W)) u_dxc (
    .clk(lclk), .rst_n(lrst_n), .start(go_read), .len(TXL_W'(2 ** PW)), .busy(tx_busy),
    .m_valid, .m_data, .m_ready, .tx_req, .tx_len, .tx_valid, .tx_data, .tx_last, .tx_ready
  );
endmodule

// One backprojection pipeline: a pair of target SRAMs and a chain of N projection adders.
// In a processing step every pixel of the target image is read from the SRAM holding the
// latest image (Target Memory A role), crosses from the memory clock to the PCI clock in a
// dual-clock FIFO, is split from its 72-bit word into single 36-bit pixels, passes through the
// N adder stages (each adding the sample of its own projection) and is packed again and sent
// back through a second dual-clock FIFO to be written into the other SRAM (Target Memory B
// role). Meanwhile a pixel address generator drives the distance-to-time calculators of all
// stages with the same pixel sequence, pausing when any projection FIFO is nearly full.
// Ports: PCI-clock (lclk) control pulses step/zero/read with `bank` and the flight
// parameters, a BlockRAM load port (stage, address, sample), a readout pixel stream used by
// OP_READ, and the memory-clock (mclk) SRAM ports. `done` pulses (lclk) when an operation ends.
// Coarse narrowing: a step sweeps only a band of image rows. The beam reaches row y from
// projection u only if |y-u|*DY <= Xmax*tan(phi), Xmax being the range of the farthest column,
// so the rows UBASE-w .. UBASE+N-1+w with w = (Xmax*tan(phi)) >> floor(log2 DY) (never below
// the exact bound) hold every pixel the step can change. Rows outside the band are neither read
// nor written, so the two SRAMs must agree there: the band is widened to cover the band the
// previous step changed as well (its source still holds the older values), and a zero fill,
// which makes both SRAMs equal, clears that memory. The host must therefore zero the SRAMs
// before the first step and leave the bank bit to the hardware. The band is computed from the
// flight parameters in three register stages; a step command waits four cycles so that values
// written just before it are used.
// Timing: the adders take one pixel per PCI clock; the SRAMs move two pixels per memory clock,
// so a step over P pixels of the band takes about P/2 memory clocks plus the pipeline fill.
// The structure and the use of the beam test to narrow the pixels examined follow the design;
// the band formula and the widening rule are this design's own.
module bp_pipeline
  import bp_pkg::*;
#(
  parameter int N        = 8,
  parameter int R        = 2,
  parameter int X_W      = 9,
  parameter int Y_W      = 10,
  parameter int C_W      = 20,
  parameter int SRAM_LAT = 2,
  localparam int PW = X_W + Y_W,
  localparam int AW = PW - 1,
  localparam int TW = R + 9,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              lclk,
  input  logic              lrst_n,
  input  logic              mclk,
  input  logic              mrst_n,
  // control (lclk)
  input  flight_t           fp,
  input  logic              start,
  input  mop_e              op,
  input  logic              bank,
  output logic              busy,
  output logic              done,
  // projection BlockRAM load (lclk)
  input  logic              bram_we,
  input  logic [SW-1:0]     bram_stage,
  input  logic [TW-1:0]     bram_waddr,
  input  smp_t              bram_wdata,
  // readout stream (lclk)
  output logic              rd_valid,
  output pix_t              rd_data,
  input  logic              rd_ready,
  // SRAM pair (mclk)
  output logic [AW-1:0]     sram_addr  [2],
  output logic              sram_rd    [2],
  output logic              sram_wr    [2],
  output logic [WORD_W-1:0] sram_wdata [2],
  input  logic [WORD_W-1:0] sram_rdata [2]
);
  localparam int DIC_LAT = C_W + 6;
  localparam int PF_DEPTH = 2 ** $clog2(DIC_LAT + N + 40);
  localparam int PF_AF    = PF_DEPTH - (DIC_LAT + N + 6);

  // ---------------- control ----------------
  mop_e op_q;
  logic bank_q;
  logic m_start, m_done, l_mdone, m_busy;
  logic [PW:0] rd_cnt;

  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      op_q <= OP_STEP; bank_q <= 1'b0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        op_q   <= op;
        bank_q <= bank;
        busy   <= 1'b1;
      end else if (busy && ((op_q == OP_READ) ? rd_cnt == (PW+1)'(2**PW) : l_mdone)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // step command delayed by four cycles (flight-parameter pipeline below)
  logic [3:0] go_d;
  logic       l_go;
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) go_d <= '0;
    else         go_d <= {go_d[2:0], start && !busy};
  end
  assign l_go = go_d[3];

  // ---------------- row band of a step ----------------
  localparam int XM_W = ((16 > X_W + 8) ? 16 : X_W + 8) + 1;
  localparam int E_W  = XM_W + 2;
  localparam int YMAX = 2 ** Y_W - 1;
  localparam logic [E_W-1:0] EMAX = E_W'(2 ** C_W - 1);
  logic [XM_W-1:0]     xmax1;
  logic [E_W-1:0]      e2;
  logic [2:0]          sh2;
  logic                full2;
  logic signed [15:0]  ub1, ub2;
  logic                b_v;
  logic [Y_W-1:0]      b_lo, b_hi, p_lo, p_hi, s_lo, s_hi;
  logic                p_v;

  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      xmax1 <= '0; ub1 <= '0; e2 <= '0; sh2 <= '0; full2 <= 1'b1; ub2 <= '0;
      b_v <= 1'b0; b_lo <= '0; b_hi <= '0;
    end else begin
      // stage 1: range of the farthest column
      xmax1 <= XM_W'(fp.rmin) + XM_W'(XM_W'(2 ** X_W - 1) * XM_W'(fp.dx));
      ub1   <= fp.ubase;
      // stage 2: beam half-width in distance units, and the DY shift
      e2    <= E_W'((XM_W'(xmax1) * (XM_W + 18)'(fp.tanphi)) >> 16);
      full2 <= (fp.dy == 8'd0) || (ub1 > 16'(32767 - (N - 1)));
      sh2   <= 3'd0;
      for (int i = 1; i < 8; i++) if (fp.dy[i]) sh2 <= 3'(i);
      ub2   <= ub1;
      // stage 3: clipped band [UBASE - w, UBASE + N - 1 + w]
      begin
        logic signed [E_W+1:0] bw, blo, bhi;
        bw  = (E_W + 2)'(e2 >> sh2);
        blo = (E_W + 2)'(ub2) - bw;
        bhi = (E_W + 2)'(ub2) + (E_W + 2)'(N - 1) + bw;
        if (full2 || e2 >= EMAX) begin
          b_v <= 1'b1; b_lo <= '0; b_hi <= Y_W'(YMAX);
        end else begin
          b_v  <= !(bhi < 0 || blo > (E_W + 2)'(YMAX));
          b_lo <= (blo < 0) ? '0 : Y_W'(blo);
          b_hi <= (bhi > (E_W + 2)'(YMAX)) ? Y_W'(YMAX) : Y_W'(bhi);
        end
      end
    end
  end

  // band swept: this step's beam band joined with the band the previous step changed
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      p_v <= 1'b0; p_lo <= '0; p_hi <= '0; s_lo <= '0; s_hi <= '0;
    end else if (go_d[2]) begin
      if (op_q == OP_ZERO) p_v <= 1'b0;
      if (op_q == OP_STEP) begin
        if (b_v && p_v) begin
          s_lo <= (b_lo < p_lo) ? b_lo : p_lo;
          s_hi <= (b_hi > p_hi) ? b_hi : p_hi;
        end else if (b_v) begin
          s_lo <= b_lo; s_hi <= b_hi;
        end else if (p_v) begin
          s_lo <= p_lo; s_hi <= p_hi;
        end else begin
          s_lo <= '0; s_hi <= '0;
        end
        p_v <= b_v; p_lo <= b_lo; p_hi <= b_hi;
      end
    end
  end

  pulse_sync u_go_sync (.src_clk(lclk), .src_rst_n(lrst_n), .src_pulse(l_go),
                        .dst_clk(mclk), .dst_rst_n(mrst_n), .dst_pulse(m_start));
  pulse_sync u_done_sync (.src_clk(mclk), .src_rst_n(mrst_n), .src_pulse(m_done),
                          .dst_clk(lclk), .dst_rst_n(lrst_n), .dst_pulse(l_mdone));

  // ---------------- memory-clock side ----------------
  logic af_wr, af_afull, af_empty, af_rd;
  logic [WORD_W-1:0] af_wdata, af_rdata;
  logic bf_wr, bf_full, bf_afull, bf_empty, bf_rd;
  logic [WORD_W-1:0] bf_wdata, bf_rdata;

  tmem_ctrl #(.AW(AW), .SRAM_LAT(SRAM_LAT)) u_tmem (
    .clk(mclk), .rst_n(mrst_n), .start(m_start), .op(op_q), .bank(bank_q),
    .first({s_lo, (X_W-1)'(0)}), .last({s_hi, {(X_W-1){1'b1}}}),
    .busy(m_busy), .done(m_done),
    .sram_addr, .sram_rd, .sram_wr, .sram_wdata, .sram_rdata,
    .af_wr, .af_wdata, .af_afull, .bf_rd, .bf_rdata, .bf_empty
  );

  async_fifo #(.W(WORD_W), .AW(4), .AF_LEVEL(16 - SRAM_LAT - 3)) u_fifo_a (
    .wclk(mclk), .wrst_n(mrst_n), .wr_en(af_wr), .wr_data(af_wdata), .full(), .afull(af_afull),
    .rclk(lclk), .rrst_n(lrst_n), .rd_en(af_rd), .rd_data(af_rdata), .empty(af_empty)
  );

  async_fifo #(.W(WORD_W), .AW(4), .AF_LEVEL(14)) u_fifo_b (
    .wclk(lclk), .wrst_n(lrst_n), .wr_en(bf_wr), .wr_data(bf_wdata), .full(bf_full), .afull(bf_afull),
    .rclk(mclk), .rrst_n(mrst_n), .rd_en(bf_rd), .rd_data(bf_rdata), .empty(bf_empty)
  );

  // ---------------- unpack: one word -> two pixels ----------------
  logic half, u_valid, u_ready;
  pix_t u_data;
  assign u_valid = !af_empty;
  assign u_data  = half ? pix_t'(af_rdata[WORD_W-1:WORD_W/2]) : pix_t'(af_rdata[WORD_W/2-1:0]);
  assign af_rd   = u_valid && u_ready && half;
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) half <= 1'b0;
    else if (u_valid && u_ready) half <= !half;
  end

  // readout path
  assign rd_valid = u_valid && op_q == OP_READ && busy;
  assign rd_data  = u_data;
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) rd_cnt <= '0;
    else if (start && !busy) rd_cnt <= '0;
    else if (rd_valid && rd_ready) rd_cnt <= rd_cnt + 1'b1;
  end

  // ---------------- adder chain ----------------
  logic          pg_act, pg_fire, pg_done, any_afull;
  logic [PW-1:0] pg_pix;
  addr_gen #(.AW(PW)) u_ag_pix (
    .clk(lclk), .rst_n(lrst_n), .start(l_go && op_q == OP_STEP),
    .first({s_lo, X_W'(0)}), .last({s_hi, {X_W{1'b1}}}), .adv(!any_afull),
    .active(pg_act), .fire(pg_fire), .addr(pg_pix), .done(pg_done)
  );

  logic          c_valid [N+1];
  pix_t          c_data  [N+1];
  logic          c_ready [N+1];
  logic          p_valid [N+1];
  logic [PW-1:0] p_pix   [N+1];
  logic [N-1:0]  afull_v;

  assign any_afull  = |afull_v;
  assign p_valid[0] = pg_fire;
  assign p_pix[0]   = pg_pix;
  assign c_valid[0] = u_valid && op_q == OP_STEP && busy;
  assign c_data[0]  = u_data;
  assign u_ready    = (op_q == OP_READ) ? rd_ready : (c_ready[0] && busy);

  for (genvar k = 0; k < N; k++) begin : g_stage
    proj_adder #(.X_W(X_W), .Y_W(Y_W), .R(R), .C_W(C_W), .PF_DEPTH(PF_DEPTH), .PF_AF(PF_AF)) u_add (
      .clk(lclk), .rst_n(lrst_n), .fp,
      .u(fp.ubase + 16'(k)),
      .bram_we(bram_we && bram_stage == SW'(k)), .bram_waddr, .bram_wdata,
      .pix_valid(p_valid[k]), .pix(p_pix[k]), .pix_valid_o(p_valid[k+1]), .pix_o(p_pix[k+1]),
      .pf_afull(afull_v[k]),
      .t_valid(c_valid[k]), .t_data(c_data[k]), .t_ready(c_ready[k]),
      .o_valid(c_valid[k+1]), .o_data(c_data[k+1]), .o_ready(c_ready[k+1])
    );
  end

  // ---------------- pack: two pixels -> one word ----------------
  logic have_lo;
  pix_t lo;
  assign c_ready[N] = !have_lo || !bf_full;
  assign bf_wr      = c_valid[N] && have_lo && !bf_full;
  assign bf_wdata   = {c_data[N], lo};
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      have_lo <= 1'b0; lo <= '0;
    end else if (c_valid[N] && c_ready[N]) begin
      have_lo <= !have_lo;
      if (!have_lo) lo <= c_data[N];
    end
  end

  logic unused;
  assign unused = ^{pg_act, pg_done, bf_afull, m_busy, p_valid[N], p_pix[N]};
endmodule

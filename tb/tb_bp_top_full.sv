// End-to-end test of the backprojection unit at its full default size (two pipelines of
// eight adders, 2048-sample BlockRAMs, a 1024 x 512 pixel image per pipeline), one batch of
// projections. Otherwise the same as the reduced-size end-to-end test, playing the host: it programs the flight
// parameters of both pipelines, zeroes the target SRAMs, then for several batches fills a DMA
// buffer with random projection samples, starts the DMA fetch, sets the slow-time index of
// the batch and runs a processing step, polling the status register in between. An
// independent model accumulates the same contributions. Afterwards both pipelines' images
// are read out through the complex-magnitude/DMA-transmit path and compared word by word with
// the model, and the SRAM holding the latest image is compared pixel by pixel.
// It also counts, and requires at least once, each mechanism of the design: the SRAM read
// generator paused by its FIFO, the pixel generator paused by a full projection FIFO, an
// adder stage waiting for its sample, pixels inside and outside the beam, the bank swap,
// zeroing, readout, DMA streams that stall, a step narrowed to a band of rows; and it checks
// that a step takes about one memory clock per SRAM word swept (two pixels), the rate the
// memory clock allows. For the narrowing it checks that each step reads a contiguous band of
// whole rows, once each, that holds every row the model saw hit in this or the previous step.
module tb_bp_top_full;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int PIPES = 2, N = 8, R = 2, X_W = 9, Y_W = 10, C_W = 20, SRAM_LAT = 2;
  localparam int BATCHES = 1;
  localparam int PW = X_W + Y_W, AW = PW - 1, TW = R + 9, NPIX = 2 ** PW, WORDS = NPIX / 2;
  localparam int RXL_W = $clog2(PIPES * N * (2 ** (R + 9)) + 1), TXL_W = PW + 1;
  localparam int NSMP = PIPES * N * (2 ** TW);

  logic lclk = 0, mclk = 0, lrst_n = 0, mrst_n = 0, clocks_ok = 1;
  logic pio_wr = 0, pio_rd = 0;
  logic [7:0] pio_addr = '0;
  logic [CSR_W-1:0] pio_wdata = '0, pio_rdata;
  logic rx_req, rx_valid = 0, rx_ready;
  logic [RXL_W-1:0] rx_len;
  logic [CSR_W-1:0] rx_data = '0;
  logic tx_req, tx_valid, tx_last, tx_ready = 0;
  logic [TXL_W-1:0] tx_len;
  logic [CSR_W-1:0] tx_data;
  logic [AW-1:0] sram_addr [PIPES][2];
  logic sram_rd [PIPES][2], sram_wr [PIPES][2];
  logic [WORD_W-1:0] sram_wdata [PIPES][2], sram_rdata [PIPES][2];

  bp_top dut (.*);

  for (genvar p = 0; p < PIPES; p++) begin : g_p
    for (genvar i = 0; i < 2; i++) begin : g_m
      sram_model #(.AW(AW), .LAT(SRAM_LAT)) u_m (.clk(mclk), .addr(sram_addr[p][i]),
        .rd(sram_rd[p][i]), .wr(sram_wr[p][i]), .wdata(sram_wdata[p][i]), .rdata(sram_rdata[p][i]));
    end
  end

  always #3.75 lclk = !lclk;   // 133 MHz
  always #10   mclk = !mclk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- host: programmed I/O ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge lclk); pio_wr = 1; pio_addr = a; pio_wdata = d;
    @(negedge lclk); pio_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge lclk); pio_rd = 1; pio_addr = a;
    @(negedge lclk); pio_rd = 0; d = pio_rdata;
  endtask
  task automatic wait_idle(input int mask);
    logic [31:0] s;
    repeat (8) @(negedge lclk);
    do rd(A_STATUS, s); while ((s & mask) != 0);
  endtask

  // ---------------- host: DMA engine ----------------
  logic [CSR_W-1:0] dbuf [NSMP];
  int rx_idx = 0, rx_left = 0, rx_reqs = 0, rx_stalls = 0;
  always @(posedge lclk) if (lrst_n) begin
    if (rx_req) begin
      rx_reqs++;
      rx_left <= int'(rx_len);
      rx_idx  <= 0;
      chk(rx_len == RXL_W'(NSMP), "rx_len");
    end else if (rx_valid && rx_ready) begin
      rx_idx  <= rx_idx + 1;
      rx_left <= rx_left - 1;
    end
    if (rx_left > 0 && !rx_valid) rx_stalls++;
  end
  always @(negedge lclk) begin
    rx_valid <= rx_left > 0 && ($urandom_range(0, 9) != 0);
    rx_data  <= dbuf[rx_idx];
  end

  int txq[$];
  int tx_reqs = 0, tx_lasts = 0, tx_stalls = 0;
  // the host takes words at random and now and then not at all for a while
  int lcyc = 0;
  always @(posedge lclk) lcyc <= lcyc + 1;
  always @(negedge lclk) tx_ready <= ($urandom_range(0, 9) != 0) && (lcyc % 400 >= 60);
  always @(posedge lclk) if (lrst_n) begin
    if (tx_req) begin
      tx_reqs++;
      chk(tx_len == TXL_W'(NPIX), "tx_len");
    end
    if (tx_valid && tx_ready) begin
      txq.push_back(int'(tx_data));
      if (tx_last) tx_lasts++;
    end
    if (tx_valid && !tx_ready) tx_stalls++;
  end

  // ---------------- mechanism counters ----------------
  int n_apause = 0, n_ppause = 0, n_addwait = 0, n_hit = 0, n_miss = 0;
  int n_zero_wr = 0, n_swaps = 0;
  for (genvar p = 0; p < PIPES; p++) begin : g_cnt
    always @(posedge mclk) if (mrst_n) begin
      if (dut.g_pipe[p].u_pipe.u_tmem.busy && dut.g_pipe[p].u_pipe.u_tmem.a_act &&
          dut.g_pipe[p].u_pipe.af_afull) n_apause++;
      if (dut.g_pipe[p].u_pipe.u_tmem.op_q == OP_ZERO && sram_wr[p][0]) n_zero_wr++;
    end
    always @(posedge lclk) if (lrst_n) begin
      if (dut.g_pipe[p].u_pipe.pg_act && dut.g_pipe[p].u_pipe.any_afull) n_ppause++;
      for (int k = 0; k < N; k++)
        if (dut.g_pipe[p].u_pipe.c_valid[k] && !dut.g_pipe[p].u_pipe.c_ready[k]) n_addwait++;
    end
    for (genvar k = 0; k < N; k++) begin : g_k
      always @(posedge lclk) if (lrst_n && dut.g_pipe[p].u_pipe.g_stage[k].u_add.r_valid) begin
        if (dut.g_pipe[p].u_pipe.g_stage[k].u_add.r_hit) n_hit++; else n_miss++;
      end
    end
  end

  // source reads of each step, per pipeline
  int st_rd [PIPES], st_min [PIPES], st_max [PIPES];
  for (genvar p = 0; p < PIPES; p++) begin : g_rd
    always @(posedge mclk) if (mrst_n && dut.g_pipe[p].u_pipe.u_tmem.op_q == OP_STEP)
      for (int i = 0; i < 2; i++) if (sram_rd[p][i]) begin
        st_rd[p]++;
        if (int'(sram_addr[p][i]) < st_min[p]) st_min[p] = int'(sram_addr[p][i]);
        if (int'(sram_addr[p][i]) > st_max[p]) st_max[p] = int'(sram_addr[p][i]);
      end
  end

  // ---------------- reference model ----------------
  flight_t fpm [PIPES];
  int img_re [PIPES][NPIX], img_im [PIPES][NPIX];
  int mstep_cycles = 0;
  always @(posedge mclk) if (mrst_n && dut.g_pipe[0].u_pipe.u_tmem.busy && dut.g_pipe[0].u_pipe.u_tmem.op_q == OP_STEP)
    mstep_cycles++;

  initial begin
    logic [31:0] s;
    logic [PIPES-1:0] bank_before;
    int hlo [PIPES], hhi [PIPES], plo [PIPES], phi [PIPES];
    int n_narrow;
    n_narrow = 0;
    for (int p = 0; p < PIPES; p++) begin plo[p] = 2 ** Y_W; phi[p] = -1; end
    for (int p = 0; p < PIPES; p++) begin
      fpm[p] = '0;
      fpm[p].rmin   = 16'(10 + 30 * p);
      fpm[p].dx     = 8'(1 + p);
      fpm[p].dy     = 8'd1;
      fpm[p].tanphi = 18'(30000 + 20000 * p);
      fpm[p].t0     = 16'(5 + 20 * p);
      for (int i = 0; i < NPIX; i++) begin img_re[p][i] = 0; img_im[p][i] = 0; end
    end
    // some garbage in the SRAMs that zeroing must remove
    for (int p = 0; p < PIPES; p++) for (int a = 0; a < WORDS; a += 7) begin
      if (p == 0) begin g_p[0].g_m[0].u_m.poke(a, 72'({$urandom, $urandom, $urandom})); g_p[0].g_m[1].u_m.poke(a, '1); end
      else        begin g_p[1].g_m[0].u_m.poke(a, 72'({$urandom, $urandom, $urandom})); g_p[1].g_m[1].u_m.poke(a, '1); end
    end
    #100 lrst_n = 1; mrst_n = 1;
    rd(A_CONFIG, s);
    chk(s == {8'h0, 8'(PIPES), 8'(R), 8'(N)}, "config");
    for (int p = 0; p < PIPES; p++) begin
      logic [7:0] b;
      b = PIPE_BASE + 8'(8 * p);
      wr(b + 8'(O_RMIN), 32'(fpm[p].rmin));
      wr(b + 8'(O_DXDY), {16'h0, fpm[p].dy, fpm[p].dx});
      wr(b + 8'(O_TANPHI), 32'(fpm[p].tanphi));
      wr(b + 8'(O_T0), 32'(fpm[p].t0));
    end
    wr(A_CTRL, 32'h2);                       // zero the SRAMs
    wait_idle(1);
    for (int bt = 0; bt < BATCHES; bt++) begin
      for (int i = 0; i < NSMP; i++) begin
        logic [15:0] re, im;
        re = 16'($urandom_range(0, 4000) - 2000);
        im = 16'($urandom_range(0, 4000) - 2000);
        dbuf[i] = {im, re};
      end
      wr(A_CTRL, 32'h8);                     // DMA receive
      wait_idle(2);
      for (int p = 0; p < PIPES; p++) begin
        fpm[p].ubase = 16'(bt * N * 5 - 4 + 5 * p);
        wr(PIPE_BASE + 8'(8 * p) + 8'(O_UBASE), 32'(fpm[p].ubase));
      end
      rd(A_BANK, s);
      bank_before = PIPES'(s);
      mstep_cycles = 0;
      for (int p = 0; p < PIPES; p++) begin st_rd[p] = 0; st_min[p] = WORDS; st_max[p] = -1; end
      wr(A_CTRL, 32'h1);                     // processing step
      wait_idle(1);
      rd(A_BANK, s);
      chk(PIPES'(s) == ~bank_before, "bank swapped after step");
      if (PIPES'(s) == ~bank_before) n_swaps++;
      chk(mstep_cycles <= st_rd[0] + st_rd[0] / 10 + 60, $sformatf("step took %0d memory clocks for %0d words", mstep_cycles, st_rd[0]));
      $display("step %0d: %0d memory clocks for %0d SRAM words (pipeline 0)", bt, mstep_cycles, st_rd[0]);
      // model
      for (int p = 0; p < PIPES; p++) begin hlo[p] = 2 ** Y_W; hhi[p] = -1; end
      for (int p = 0; p < PIPES; p++)
        for (int pix = 0; pix < NPIX; pix++)
          for (int k = 0; k < N; k++) begin
            int t;
            if (dic_ref(fpm[p], int'(signed'(fpm[p].ubase)) + k, pix % (2 ** X_W), pix / (2 ** X_W), TW, C_W, t)) begin
              logic [31:0] w;
              if (pix / (2 ** X_W) < hlo[p]) hlo[p] = pix / (2 ** X_W);
              if (pix / (2 ** X_W) > hhi[p]) hhi[p] = pix / (2 ** X_W);
              w = dbuf[(p * N + k) * (2 ** TW) + t];
              img_re[p][pix] = wrap18(longint'(img_re[p][pix]) + longint'(signed'(w[15:0])));
              img_im[p][pix] = wrap18(longint'(img_im[p][pix]) + longint'(signed'(w[31:16])));
            end
          end
      // the band swept must be whole rows, each word once, covering this and the last step's hits
      for (int p = 0; p < PIPES; p++) begin
        int rlo, rhi;
        rlo = st_min[p] / (2 ** (X_W - 1));
        rhi = st_max[p] / (2 ** (X_W - 1));
        chk(st_rd[p] == st_max[p] - st_min[p] + 1 && st_min[p] % (2 ** (X_W - 1)) == 0 &&
            (st_max[p] + 1) % (2 ** (X_W - 1)) == 0, $sformatf("pipe %0d band reads %0d in %0d..%0d", p, st_rd[p], st_min[p], st_max[p]));
        chk((hhi[p] < 0 || (hlo[p] >= rlo && hhi[p] <= rhi)) && (phi[p] < 0 || (plo[p] >= rlo && phi[p] <= rhi)),
            $sformatf("pipe %0d band rows %0d..%0d miss hits %0d..%0d / %0d..%0d", p, rlo, rhi, hlo[p], hhi[p], plo[p], phi[p]));
        if (st_rd[p] < WORDS) n_narrow++;
        plo[p] = hlo[p]; phi[p] = hhi[p];
      end
    end
    rd(A_STEPS, s);
    chk(s == BATCHES, "step count");
    // compare the latest SRAM of each pipeline
    rd(A_BANK, s);
    for (int p = 0; p < PIPES; p++)
      for (int a = 0; a < WORDS; a++) begin
        logic [71:0] w;
        if (p == 0) w = s[0] ? g_p[0].g_m[1].u_m.peek(a) : g_p[0].g_m[0].u_m.peek(a);
        else        w = s[1] ? g_p[1].g_m[1].u_m.peek(a) : g_p[1].g_m[0].u_m.peek(a);
        chk(int'(signed'(w[17:0]))  == img_re[p][2*a]   && int'(signed'(w[35:18])) == img_im[p][2*a] &&
            int'(signed'(w[53:36])) == img_re[p][2*a+1] && int'(signed'(w[71:54])) == img_im[p][2*a+1],
            $sformatf("pipe %0d SRAM word %0d", p, a));
      end
    // read out both images through the magnitude / DMA transmit path
    for (int p = 0; p < PIPES; p++) begin
      txq.delete();
      wr(A_RDPIPE, 32'(p));
      wr(A_CTRL, 32'h4);
      wait_idle(5);
      chk(txq.size() == NPIX, $sformatf("readout of pipe %0d: %0d words", p, txq.size()));
      for (int i = 0; i < NPIX && i < txq.size(); i++)
        chk(txq[i] == mag_ref(img_re[p][i], img_im[p][i]), $sformatf("magnitude pipe %0d pixel %0d: %0d exp %0d",
            p, i, txq[i], mag_ref(img_re[p][i], img_im[p][i])));
    end
    // mechanisms
    $display("mechanisms: A-pause %0d, pixel-pause %0d, adder-wait %0d, in-beam %0d, out-of-beam %0d, zero writes %0d, swaps %0d, rx stalls %0d, tx stalls %0d",
             n_apause, n_ppause, n_addwait, n_hit, n_miss, n_zero_wr, n_swaps, rx_stalls, tx_stalls);
    $display("narrowed steps %0d", n_narrow);
    chk(n_narrow > 0, "no step was narrowed to a band of rows");
    chk(n_apause > 0, "SRAM read generator never paused by its FIFO");
    chk(n_ppause > 0, "pixel generator never paused by a projection FIFO");
    chk(n_addwait > 0, "no adder stage ever waited");
    chk(n_hit > 0 && n_miss > 0, "beam test never both ways");
    chk(n_zero_wr == PIPES * WORDS, "zero fill");
    chk(n_swaps == BATCHES, "bank swaps");
    chk(rx_reqs == BATCHES && rx_stalls > 0, "DMA receive requests/stalls");
    chk(tx_reqs == PIPES && tx_lasts == PIPES && tx_stalls > 0, "DMA transmit requests/last/stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge lclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

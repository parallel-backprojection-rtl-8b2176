// Self-checking test of one pipeline with three adder stages (a count that is not a power of
// two) and a 16 x 8 pixel image: zeroes both SRAMs, loads the projection BlockRAMs through the
// load port, runs two steps with the SRAM roles swapped in between, and reads the image back
// through the readout stream with a consumer that stalls at random. Every pixel must equal the
// sum of the contributions the reference model selects; every operation must end with `done`.
module tb_bp_pipeline;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int N = 3, R = 0, X_W = 4, Y_W = 3, C_W = 20, LAT = 2;
  localparam int PW = X_W + Y_W, AW = PW - 1, TW = R + 9, NPIX = 2 ** PW, SW = 2;
  logic lclk = 0, mclk = 0, lrst_n = 0, mrst_n = 0;
  flight_t fp;
  logic start = 0, bank = 0, busy, done;
  mop_e op = OP_STEP;
  logic bram_we = 0;
  logic [SW-1:0] bram_stage = '0;
  logic [TW-1:0] bram_waddr = '0;
  smp_t bram_wdata = '0;
  logic rd_valid, rd_ready = 0;
  pix_t rd_data;
  logic [AW-1:0] sram_addr [2];
  logic sram_rd [2], sram_wr [2];
  logic [WORD_W-1:0] sram_wdata [2], sram_rdata [2];
  int checks = 0, failures = 0, dones = 0;
  smp_t bmem [N][2**TW];
  int img_re [NPIX], img_im [NPIX];
  pix_t outq[$];

  bp_pipeline #(.N(N), .R(R), .X_W(X_W), .Y_W(Y_W), .C_W(C_W), .SRAM_LAT(LAT)) dut (.*);
  for (genvar i = 0; i < 2; i++) begin : g_m
    sram_model #(.AW(AW), .LAT(LAT)) u_m (.clk(mclk), .addr(sram_addr[i]), .rd(sram_rd[i]),
      .wr(sram_wr[i]), .wdata(sram_wdata[i]), .rdata(sram_rdata[i]));
  end
  always #3.75 lclk = !lclk;
  always #10   mclk = !mclk;

  always @(posedge lclk) if (lrst_n) begin
    if (done) dones++;
    if (rd_valid && rd_ready) outq.push_back(rd_data);
  end
  always @(negedge lclk) rd_ready <= ($urandom_range(0, 3) != 0);

  task automatic run(input mop_e o, input logic b);
    int d0;
    d0 = dones;
    @(negedge lclk); op = o; bank = b; start = 1;
    @(negedge lclk); start = 0;
    wait (!busy);
    repeat (2) @(posedge lclk);
    checks++;
    if (dones != d0 + 1) begin failures++; $display("FAIL no done"); end
  endtask

  initial begin
    fp = '0;
    fp.rmin = 16'd6; fp.dx = 8'd1; fp.dy = 8'd2; fp.tanphi = 18'd50000; fp.t0 = 16'd3;
    for (int i = 0; i < NPIX; i++) begin img_re[i] = 0; img_im[i] = 0; end
    for (int a = 0; a < 2 ** AW; a++) begin g_m[0].u_m.poke(a, '1); g_m[1].u_m.poke(a, '1); end
    #100 lrst_n = 1; mrst_n = 1;
    run(OP_ZERO, 1'b0);
    for (int s = 0; s < 2; s++) begin
      for (int k = 0; k < N; k++)
        for (int t = 0; t < 2 ** TW; t++) begin
          @(negedge lclk);
          bram_we = 1; bram_stage = SW'(k); bram_waddr = TW'(t);
          bram_wdata = smp_t'({16'($urandom_range(0, 600) - 300), 16'($urandom_range(0, 600) - 300)});
          bmem[k][t] = bram_wdata;
        end
      @(negedge lclk); bram_we = 0;
      fp.ubase = 16'(2 + 3 * s);
      run(OP_STEP, 1'(s));
      for (int pix = 0; pix < NPIX; pix++)
        for (int k = 0; k < N; k++) begin
          int t;
          if (dic_ref(fp, int'(signed'(fp.ubase)) + k, pix % (2 ** X_W), pix / (2 ** X_W), TW, C_W, t)) begin
            img_re[pix] = wrap18(longint'(img_re[pix]) + int'(bmem[k][t].re));
            img_im[pix] = wrap18(longint'(img_im[pix]) + int'(bmem[k][t].im));
          end
        end
    end
    run(OP_READ, 1'b0);            // after two steps the latest image is back in SRAM 0
    checks++;
    if (outq.size() != NPIX) begin failures++; $display("FAIL read %0d pixels", outq.size()); end
    for (int i = 0; i < NPIX && i < outq.size(); i++) begin
      checks++;
      if (int'(outq[i].re) != img_re[i] || int'(outq[i].im) != img_im[i]) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d: %0d,%0d exp %0d,%0d", i, outq[i].re, outq[i].im, img_re[i], img_im[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge lclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

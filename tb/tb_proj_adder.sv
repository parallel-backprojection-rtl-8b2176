// Self-checking test of one projection adder stage: the BlockRAM is loaded with random
// samples, then a stream of pixel indices (paused whenever the stage's FIFO is nearly full)
// and a stream of random target pixels (offered and taken at random) pass through it. Every
// output pixel must equal its input plus the sample the reference model selects for that
// pixel, or plus zero outside the beam or window; the pixel index must also be passed on one
// clock later. Checks that both in-beam and out-of-beam pixels and FIFO back-pressure occur.
module tb_proj_adder;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int X_W = 4, Y_W = 5, R = 0, C_W = 20, TW = R + 9, PW = X_W + Y_W;
  localparam int NPIX = 2 ** PW;
  logic clk = 0, rst_n = 0;
  flight_t fp;
  logic signed [15:0] u;
  logic bram_we = 0;
  logic [TW-1:0] bram_waddr = '0;
  smp_t bram_wdata = '0;
  logic pix_valid = 0, pix_valid_o, pf_afull;
  logic [PW-1:0] pix = '0, pix_o;
  logic t_valid = 0, t_ready, o_valid, o_ready = 0;
  pix_t t_data = '0, o_data;
  smp_t bmem [2**TW];
  pix_t tin [NPIX];
  int checks = 0, failures = 0, got = 0, hits = 0, afull_cycles = 0, pass_err = 0;

  proj_adder #(.X_W(X_W), .Y_W(Y_W), .R(R), .C_W(C_W), .PF_DEPTH(64), .PF_AF(64 - C_W - 12)) dut (.*);
  always #5 clk = !clk;

  // pass-on of the pixel index
  logic [PW-1:0] pix_d = '0;
  logic pv_d = 0;
  always @(posedge clk) if (rst_n) begin
    pv_d <= pix_valid; pix_d <= pix;
    if (rst_n && (pix_valid_o !== pv_d || (pv_d && pix_o !== pix_d))) pass_err++;
    if (pf_afull) afull_cycles++;
  end

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    int t, x, y, er, ei;
    bit h;
    x = got % (2 ** X_W); y = got / (2 ** X_W);
    h = dic_ref(fp, int'(u), x, y, TW, C_W, t);
    if (h) hits++;
    er = wrap18(longint'(tin[got].re) + (h ? int'(bmem[t].re) : 0));
    ei = wrap18(longint'(tin[got].im) + (h ? int'(bmem[t].im) : 0));
    checks++;
    if (o_data.re !== PIX_W'(er) || o_data.im !== PIX_W'(ei)) begin
      failures++;
      if (failures < 10) $display("FAIL pixel %0d: %0d,%0d exp %0d,%0d", got, o_data.re, o_data.im, er, ei);
    end
    got <= got + 1;
  end

  // pixel index generator, paused by almost-full
  int pi = 0;
  always @(negedge clk) begin
    pix_valid <= rst_n && pi < NPIX && !pf_afull && fp.rmin != 0;
    pix <= PW'(pi);
  end
  always @(posedge clk) if (pix_valid) pi <= pi + 1;

  // target stream, offered and taken at random (slow at first so the FIFO fills up)
  int ti = 0;
  always @(negedge clk) begin
    t_valid <= rst_n && ti < NPIX && fp.rmin != 0 && ($urandom_range(0, 99) < (ti < 100 ? 5 : 70));
    t_data  <= tin[ti];
    o_ready <= ($urandom_range(0, 99) < 75);
  end
  always @(posedge clk) if (t_valid && t_ready) ti <= ti + 1;

  initial begin
    fp = '0; u = '0;
    for (int i = 0; i < NPIX; i++) begin
      tin[i].re = PIX_W'($urandom); tin[i].im = PIX_W'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2 ** TW; a++) begin
      @(negedge clk);
      bram_we = 1; bram_waddr = TW'(a); bram_wdata = smp_t'($urandom);
      bmem[a] = bram_wdata;
    end
    @(negedge clk); bram_we = 0;
    u = 16'sd13;
    fp.dx = 8'd2; fp.dy = 8'd3; fp.tanphi = 18'd45000; fp.t0 = 16'd10; fp.ubase = '0;
    fp.rmin = 16'd20;
    wait (got == NPIX);
    repeat (5) @(posedge clk);
    checks++;
    if (hits == 0 || hits == NPIX || afull_cycles == 0 || pass_err != 0) begin
      failures++; $display("FAIL hits=%0d afull=%0d pass_err=%0d", hits, afull_cycles, pass_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

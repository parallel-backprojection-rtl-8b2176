// Self-checking test of the target memory controller with two behavioural SRAMs (64 words).
// The testbench stands in for the adder side: words read from the source SRAM arrive in a
// queue (with a randomly asserted almost-full that must stop new reads), are transformed and
// offered back through a queue that is at times empty. Checks: a step with bank = 0 and one
// with bank = 1 leave the transformed image in the other SRAM and the source untouched; a
// step narrowed to words 10..40 writes only those words; a readout (with the narrowed range
// still applied, which it must ignore) delivers every word of the latest SRAM in order; zeroing clears both SRAMs; each
// operation ends with one `done` pulse.
module tb_tmem_ctrl;
  import bp_pkg::*;
  localparam int AW = 6, LAT = 2, WORDS = 2 ** AW;
  logic clk = 0, rst_n = 0, start = 0;
  mop_e op = OP_STEP;
  logic bank = 0, busy, done;
  logic [AW-1:0] first = '0, last = '1;
  logic [AW-1:0] sram_addr [2];
  logic sram_rd [2], sram_wr [2];
  logic [WORD_W-1:0] sram_wdata [2], sram_rdata [2];
  logic af_wr, af_afull = 0, bf_rd, bf_empty;
  logic [WORD_W-1:0] af_wdata, bf_rdata;
  logic [WORD_W-1:0] aq[$], bq[$];
  int checks = 0, failures = 0, dones = 0, late_reads = 0;

  tmem_ctrl #(.AW(AW), .SRAM_LAT(LAT)) dut (.*);
  for (genvar i = 0; i < 2; i++) begin : g_m
    sram_model #(.AW(AW), .LAT(LAT)) u_m (.clk, .addr(sram_addr[i]), .rd(sram_rd[i]),
      .wr(sram_wr[i]), .wdata(sram_wdata[i]), .rdata(sram_rdata[i]));
  end
  always #10 clk = !clk;

  function automatic logic [WORD_W-1:0] xform(input logic [WORD_W-1:0] w);
    return {w[71:36] + 36'd3, w[35:0] ^ 36'h5};
  endfunction

  assign bf_empty = bq.size() == 0;
  assign bf_rdata = bf_empty ? '0 : bq[0];
  logic [2:0] afull_hist;
  always @(posedge clk) if (rst_n) begin
    if (done) dones++;
    afull_hist <= {afull_hist[1:0], af_afull};
    // reads issued while almost-full was high for 1+ cycles are a violation
    if ((sram_rd[0] || sram_rd[1]) && af_afull) late_reads++;
    if (af_wr) aq.push_back(af_wdata);
    if (bf_rd) void'(bq.pop_front());
  end
  // adder stand-in: moves transformed words from aq to bq at random
  always @(negedge clk) begin
    if (aq.size() != 0 && $urandom_range(0, 2) != 0 && op == OP_STEP) bq.push_back(xform(aq.pop_front()));
    af_afull <= ($urandom_range(0, 9) < 3);
  end

  function automatic logic [WORD_W-1:0] peekm(input int i, input int a);
    return (i == 1) ? g_m[1].u_m.peek(a) : g_m[0].u_m.peek(a);
  endfunction

  task automatic run(input mop_e o, input logic b);
    int d0;
    d0 = dones;
    @(negedge clk); op = o; bank = b; start = 1;
    @(negedge clk); start = 0;
    wait (!busy);
    repeat (3) @(posedge clk);
    checks++;
    if (dones != d0 + 1) begin failures++; $display("FAIL done count"); end
  endtask

  initial begin
    logic [WORD_W-1:0] src [WORDS];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      src[a] = {$urandom, $urandom, $urandom};
      g_m[0].u_m.poke(a, src[a]);
      g_m[1].u_m.poke(a, '1);
    end
    for (int s = 0; s < 2; s++) begin
      run(OP_STEP, 1'(s));
      for (int a = 0; a < WORDS; a++) begin
        checks += 2;
        if (peekm(1-s, a) !== xform(src[a])) begin failures++; $display("FAIL step %0d word %0d", s, a); end
        if (peekm(s, a) !== src[a]) begin failures++; $display("FAIL source changed %0d", a); end
        src[a] = xform(src[a]);
      end
    end
    begin
      logic [WORD_W-1:0] old1 [WORDS];
      for (int a = 0; a < WORDS; a++) old1[a] = peekm(1, a);
      first = AW'(10); last = AW'(40);
      run(OP_STEP, 1'b0);
      for (int a = 0; a < WORDS; a++) begin
        checks += 2;
        if (peekm(1, a) !== ((a >= 10 && a <= 40) ? xform(src[a]) : old1[a])) begin
          failures++; $display("FAIL narrowed step word %0d", a);
        end
        if (peekm(0, a) !== src[a]) begin failures++; $display("FAIL narrowed source changed %0d", a); end
      end
    end
    aq.delete();
    run(OP_READ, 1'b0);
    checks++;
    if (aq.size() != WORDS) begin failures++; $display("FAIL read %0d words", aq.size()); end
    for (int a = 0; a < WORDS && a < aq.size(); a++) begin
      checks++;
      if (aq[a] !== src[a]) begin failures++; $display("FAIL readout word %0d", a); end
    end
    aq.delete();
    run(OP_ZERO, 1'b0);
    for (int a = 0; a < WORDS; a++) begin
      checks++;
      if (g_m[0].u_m.peek(a) !== '0 || g_m[1].u_m.peek(a) !== '0) begin failures++; $display("FAIL zero %0d", a); end
    end
    checks++;
    if (late_reads != 0) begin failures++; $display("FAIL %0d reads while almost full", late_reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

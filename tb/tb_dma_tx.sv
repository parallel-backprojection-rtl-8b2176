// Self-checking test of the DMA transmit controller: a transfer of LEN words is requested
// once with the right length, every magnitude is sent once, in order, zero-extended, with the
// last word marked; a stalling host and a stalling producer are both exercised, and words
// offered outside a transfer must be held back.
module tb_dma_tx;
  import bp_pkg::*;
  localparam int LEN_W = 10;
  logic clk = 0, rst_n = 0, start = 0, m_valid = 0, tx_ready = 0;
  logic [LEN_W-1:0] len = '0;
  logic [MAG_W-1:0] m_data = '0;
  logic busy, m_ready, tx_req, tx_valid, tx_last;
  logic [LEN_W-1:0] tx_len;
  logic [CSR_W-1:0] tx_data;
  int checks = 0, failures = 0, reqs = 0, lasts = 0, got = 0, cnt_src = 0;

  dma_tx #(.LEN_W(LEN_W)) dut (.*);
  always #5 clk = !clk;

  // producer: counting magnitudes, offered at random
  always @(negedge clk) begin
    m_valid  <= rst_n && ($urandom_range(0, 3) != 0);
    m_data   <= MAG_W'(cnt_src * 3 + 5);
    tx_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) cnt_src <= cnt_src + 1;
    if (tx_req) begin
      reqs++;
      checks++;
      if (tx_len !== len) begin failures++; $display("FAIL tx_len"); end
    end
    if (tx_valid && tx_ready) begin
      checks++;
      if (tx_data !== CSR_W'(got * 3 + 5)) begin failures++; $display("FAIL word %0d = %0d", got, tx_data); end
      if (tx_last) lasts++;
      got <= got + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (got != 0) begin failures++; $display("FAIL sent without transfer"); end
    for (int b = 0; b < 3; b++) begin
      @(negedge clk);
      len = LEN_W'(100 + 37 * b);
      start = 1;
      @(negedge clk);
      start = 0;
      wait (!busy);
      repeat (10) @(posedge clk);
      checks++;
      if (lasts != b + 1 || reqs != b + 1) begin failures++; $display("FAIL lasts=%0d reqs=%0d", lasts, reqs); end
    end
    checks++;
    if (got != 100 + 137 + 174) begin failures++; $display("FAIL sent %0d", got); end
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

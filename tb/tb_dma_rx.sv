// Self-checking test of the DMA receive controller with small sizes (2 pipelines, 4 stages,
// R = 0: 512 words per BlockRAM): the request carries the full buffer length, and every word
// of a randomly stalling DMA stream must be written exactly once to pipeline p, stage k,
// address t where word index = (p*N + k)*2^(R+9) + t. Two batches are sent.
module tb_dma_rx;
  import bp_pkg::*;
  localparam int PIPES = 2, N = 4, R = 0, TW = R + 9;
  localparam int TOTAL = PIPES * N * (2 ** TW);
  localparam int LEN_W = $clog2(TOTAL + 1);
  logic clk = 0, rst_n = 0, start = 0, rx_valid = 0;
  logic [CSR_W-1:0] rx_data = '0;
  logic busy, rx_req, rx_ready;
  logic [LEN_W-1:0] rx_len;
  logic bram_we [PIPES];
  logic [1:0] bram_stage;
  logic [TW-1:0] bram_waddr;
  smp_t bram_wdata;
  logic [CSR_W-1:0] mem [PIPES][N][2**TW];
  int written [PIPES][N][2**TW];
  int checks = 0, failures = 0, sent = 0, reqs = 0;

  dma_rx #(.PIPES(PIPES), .N(N), .R(R)) dut (.*);
  always #5 clk = !clk;

  always @(negedge clk) begin
    rx_valid <= rst_n && busy && ($urandom_range(0, 2) != 0) && sent < TOTAL;
    rx_data  <= 32'(sent) * 32'h9E37 + 32'h1234;
  end
  always @(posedge clk) if (rst_n) begin
    if (rx_req) begin
      reqs++;
      checks++;
      if (rx_len !== LEN_W'(TOTAL)) begin failures++; $display("FAIL rx_len %0d", rx_len); end
    end
    if (rx_valid && rx_ready) sent <= sent + 1;
    for (int p = 0; p < PIPES; p++) if (bram_we[p]) begin
      mem[p][bram_stage][bram_waddr] = bram_wdata;
      written[p][bram_stage][bram_waddr]++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      sent = 0;
      foreach (written[p, k, t]) written[p][k][t] = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      wait (!busy);
      repeat (5) @(posedge clk);
      foreach (mem[p, k, t]) begin
        int i;
        i = (p * N + k) * (2 ** TW) + t;
        checks++;
        if (written[p][k][t] != 1 || mem[p][k][t] !== 32'(i) * 32'h9E37 + 32'h1234) begin
          failures++;
          if (failures < 10) $display("FAIL p%0d k%0d t%0d written %0d", p, k, t, written[p][k][t]);
        end
      end
    end
    checks++;
    if (reqs != 2) begin failures++; $display("FAIL reqs %0d", reqs); end
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

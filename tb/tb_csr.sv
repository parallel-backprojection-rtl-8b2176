// Self-checking test of the control and status registers: writes and reads back every
// flight parameter of both pipelines, checks the command pulses of A_CTRL, the read-only
// configuration word, the status bits, host writes of the bank bits and their automatic flip
// (and the step counter) when a pipeline reports the end of a step.
module tb_csr;
  import bp_pkg::*;
  localparam int PIPES = 2, N = 8, R = 2;
  logic clk = 0, rst_n = 0, pio_wr = 0, pio_rd = 0;
  logic [7:0] pio_addr = '0;
  logic [CSR_W-1:0] pio_wdata = '0, pio_rdata;
  logic clocks_ok = 1, pipes_busy = 0, rx_busy = 0, tx_busy = 0;
  logic [PIPES-1:0] step_done = '0, bank;
  logic go_step, go_zero, go_read, go_rx;
  logic [0:0] rd_pipe;
  flight_t fp [PIPES];
  int checks = 0, failures = 0;
  int pulses [4] = '{0, 0, 0, 0};

  csr #(.PIPES(PIPES), .N(N), .R(R)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (rst_n) begin
    if (go_step) pulses[0]++;
    if (go_zero) pulses[1]++;
    if (go_read) pulses[2]++;
    if (go_rx)   pulses[3]++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); pio_wr = 1; pio_addr = a; pio_wdata = d;
    @(negedge clk); pio_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); pio_rd = 1; pio_addr = a;
    @(negedge clk); pio_rd = 0; d = pio_rdata;
  endtask
  task automatic expect_eq(input int unsigned got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(A_CONFIG, d);  expect_eq(d, 32'h020208, "config");
    for (int p = 0; p < PIPES; p++) begin
      logic [7:0] b;
      b = PIPE_BASE + 8'(8 * p);
      wr(b + 0, 32'h1000 + p); wr(b + 1, 32'h0302 + p); wr(b + 2, 32'h2_1234 + p);
      wr(b + 3, 32'h0800 + p); wr(b + 4, 32'hFFF0 + p);
    end
    for (int p = 0; p < PIPES; p++) begin
      logic [7:0] b;
      b = PIPE_BASE + 8'(8 * p);
      rd(b + 0, d); expect_eq(d, 32'h1000 + p, "rmin");
      rd(b + 1, d); expect_eq(d, 32'h0302 + p, "dxdy");
      rd(b + 2, d); expect_eq(d, 32'h2_1234 + p, "tanphi");
      rd(b + 3, d); expect_eq(d, 32'h0800 + p, "t0");
      rd(b + 4, d); expect_eq(d, 32'hFFF0 + p, "ubase");
      expect_eq(32'(fp[p].rmin), 32'h1000 + p, "fp.rmin");
      expect_eq(32'(fp[p].dx), 32'h02 + p, "fp.dx");
      expect_eq(32'(fp[p].dy), 32'h03, "fp.dy");
      expect_eq(32'(fp[p].tanphi), 32'h2_1234 + p, "fp.tanphi");
      expect_eq(32'(signed'(fp[p].ubase)), 32'hFFFF_FFF0 + p, "fp.ubase");
    end
    wr(A_CTRL, 32'h1); wr(A_CTRL, 32'h2); wr(A_CTRL, 32'h4); wr(A_CTRL, 32'h8); wr(A_CTRL, 32'h8);
    repeat (2) @(posedge clk);
    expect_eq(pulses[0], 1, "step pulses"); expect_eq(pulses[1], 1, "zero pulses");
    expect_eq(pulses[2], 1, "read pulses"); expect_eq(pulses[3], 2, "rx pulses");
    pipes_busy = 1; tx_busy = 1;
    rd(A_STATUS, d); expect_eq(d, 32'b01101, "status busy");
    pipes_busy = 0; tx_busy = 0; rx_busy = 1; clocks_ok = 0;
    rd(A_STATUS, d); expect_eq(d, 32'b00010, "status rx");
    rx_busy = 0; clocks_ok = 1;
    wr(A_BANK, 32'h2); rd(A_BANK, d); expect_eq(d, 32'h2, "bank write");
    @(negedge clk); step_done = 2'b11; @(negedge clk); step_done = 2'b00;
    rd(A_BANK, d); expect_eq(d, 32'h1, "bank flip");
    rd(A_STEPS, d); expect_eq(d, 32'h1, "steps");
    rd(A_STATUS, d); expect_eq(d, 32'b11000, "step flag");
    rd(A_STATUS, d); expect_eq(d, 32'b01000, "step flag cleared");
    wr(A_RDPIPE, 32'h1); rd(A_RDPIPE, d); expect_eq(d, 32'h1, "rdpipe");
    expect_eq(32'(rd_pipe), 1, "rd_pipe out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

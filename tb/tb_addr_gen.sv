// Self-checking test of the address generator: a sweep with a random `adv` must offer every
// address from `first` to `last` exactly once, in order, fire only when adv is high, then pulse
// `done` once and go idle. Full sweeps, partial sweeps and a one-address sweep are run.
module tb_addr_gen;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0, start = 0, adv = 0;
  logic active, fire, done;
  logic [AW-1:0] addr, first = '0, last = '1;
  int checks = 0, failures = 0;

  addr_gen #(.AW(AW)) dut (.*);
  always #5 clk = !clk;

  task automatic sweep(input int pct, input int f, input int l);
    int expect_a, dones, cycles;
    expect_a = f; dones = 0; cycles = 0;
    first <= AW'(f); last <= AW'(l);
    start <= 1;
    @(posedge clk);
    start <= 0;
    #1;
    while (active && cycles < 5000) begin
      adv <= ($urandom_range(0, 99) < pct);
      #1;
      checks++;
      if (fire !== adv || (fire && addr !== AW'(expect_a))) begin
        failures++; $display("FAIL addr=%0d exp=%0d", addr, expect_a);
      end
      if (fire) expect_a++;
      @(posedge clk);
      #1;
      if (done) dones++;
      cycles++;
    end
    adv <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (expect_a != l + 1 || dones != 1 || active) begin
      failures++; $display("FAIL swept %0d, done %0d", expect_a, dones);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    sweep(60, 0, 2**AW - 1);
    sweep(100, 0, 2**AW - 1);
    sweep(20, 0, 2**AW - 1);
    sweep(70, 16, 47);
    sweep(50, 5, 5);
    sweep(100, 40, 63);
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

// Self-checking test of the projection BlockRAM: fills all 2^(R+9) words with a pattern,
// reads them back in random order with simultaneous writes elsewhere, and checks the
// one-clock read latency against a reference array.
module tb_proj_bram;
  localparam int R = 2, W = 32, AW = R + 9;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  proj_bram #(.R(R), .W(W)) dut (.*);
  always #5 clk = !clk;

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      we <= 1; waddr <= AW'(a); wdata <= $urandom;
      @(posedge clk);
      ref_mem[a] = wdata;
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      int a, b;
      a = $urandom_range(0, 2**AW - 1);
      b = $urandom_range(0, 2**AW - 1);
      re <= 1; raddr <= AW'(a);
      we <= (b != a); waddr <= AW'(b); wdata <= $urandom;
      @(posedge clk);
      if (we) ref_mem[b] = wdata;
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
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

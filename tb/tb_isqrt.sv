// Self-checking test of the pipelined square root: random and corner radicands, one per clock,
// results compared in order with an independent integer square root and checked to appear
// exactly IN_W/2 clocks after the edge that takes their operand; a stall (en low) must hold the pipeline.
module tb_isqrt;
  localparam int IN_W = 42;
  localparam int OW   = IN_W / 2;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [IN_W-1:0] radicand = '0;
  logic out_valid;
  logic [OW-1:0] root;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(IN_W)) dut (.*);
  always #5 clk = !clk;

  function automatic longint ref_sqrt(input longint v);
    longint r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  longint exp_q[$];
  int     t_q[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && en && out_valid) begin
    longint e;
    int t0;
    e  = exp_q.pop_front();
    t0 = t_q.pop_front();
    checks++;
    if (root !== OW'(e) || cyc - t0 != OW + 1) begin
      failures++;
      $display("FAIL root=%0d exp=%0d latency=%0d", root, e, cyc - t0);
    end
  end

  task automatic push(input longint v);
    radicand <= IN_W'(v); in_valid <= 1;
    exp_q.push_back(ref_sqrt(v)); t_q.push_back(cyc);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    push(0); push(1); push(2); push(3); push(4); push(99); push(100);
    push((longint'(1) << IN_W) - 1); push(longint'(1) << (IN_W - 2));
    for (int i = 0; i < 300; i++) begin
      longint v;
      v = {$urandom, $urandom} & ((longint'(1) << IN_W) - 1);
      if (i % 3 == 0) v = v >> ($urandom % 40);
      push(v);
    end
    // stall: with en low nothing may move
    push(12345);
    in_valid <= 0;
    en <= 0;
    repeat (5) @(posedge clk);
    begin
      logic [OW-1:0] hold;
      hold = root;
      repeat (3) @(posedge clk);
      checks++;
      if (root !== hold) begin failures++; $display("FAIL stall moved pipeline"); end
    end
    // the stalled cycles do not count towards the latency
    foreach (t_q[i]) t_q[i] += 8;
    en <= 1;
    repeat (OW + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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

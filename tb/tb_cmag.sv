// Self-checking test of the complex magnitude unit: corner and random complex pixels, with a
// consumer that stalls at random; every magnitude must arrive once, in order, equal to an
// independently computed floor(sqrt(re^2+im^2)); with no stalls one result leaves per clock.
module tb_cmag;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  pix_t in_data = '0;
  logic in_ready, out_valid;
  logic [MAG_W-1:0] out_mag;
  int checks = 0, failures = 0;
  longint q[$];
  int n_out = 0, first_out = -1, last_out = 0, cyc = 0;

  cmag dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint isq(input longint v);
    longint r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint e;
    e = q.pop_front();
    checks++;
    if (out_mag !== MAG_W'(e)) begin failures++; $display("FAIL mag=%0d exp=%0d", out_mag, e); end
    n_out++;
    if (first_out < 0) first_out = cyc;
    last_out = cyc;
  end

  task automatic run(input int n, input int stall_pct);
    int sent = 0;
    bit acc;
    while (sent < n) begin
      logic signed [PIX_W-1:0] re, im;
      re = PIX_W'($urandom); im = PIX_W'($urandom);
      if (sent < 4) begin
        re = (sent[0]) ? -18'sd131072 : 18'sd131071;
        im = (sent[1]) ? -18'sd131072 : 18'sd0;
      end
      in_valid <= 1; in_data <= '{im: im, re: re};
      out_ready <= ($urandom_range(0, 99) >= stall_pct);
      @(negedge clk);
      acc = in_ready;
      @(posedge clk);
      if (acc) begin
        q.push_back(isq(longint'(re) * re + longint'(im) * im));
        sent++;
      end
    end
    in_valid <= 0;
    out_ready <= 1;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(300, 30);
    first_out = -1;
    n_out = 0;
    run(200, 0);
    checks++;
    if (q.size() != 0 || last_out - first_out != n_out - 1) begin
      failures++; $display("FAIL left=%0d rate %0d in %0d", q.size(), n_out, last_out - first_out + 1);
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

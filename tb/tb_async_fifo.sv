// Self-checking test of the dual-clock FIFO with a 20 ns write clock and a 7.5 ns read clock
// and then the other way round: a writer pushes a counting sequence whenever `full` allows,
// a reader pops at random; every word must arrive once, in order, with nothing lost.
module tb_async_fifo;
  localparam int W = 72, AW = 4;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, afull, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, n_full = 0, n_afull = 0;
  int sent = 0, got = 0;
  realtime wper = 10.0, rper = 3.75;
  localparam int TOTAL = 1500;

  async_fifo #(.W(W), .AW(AW), .AF_LEVEL(10)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_data, .full, .afull,
    .rclk, .rrst_n(rst_n), .rd_en, .rd_data, .empty);

  always #(wper) wclk = !wclk;
  always #(rper) rclk = !rclk;

  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) sent <= sent + 1;
    if (full) n_full++;
    if (afull) n_afull++;
  end
  always @(negedge wclk) begin
    wr_en   <= rst_n && sent < TOTAL && ($urandom_range(0, 3) != 0) && !full;
    wr_data <= {8'hA5, 32'(sent), 32'(sent * 7 + 1)};
  end

  always @(negedge rclk) rd_en <= rst_n && !empty && $realtime > 2000 && ($urandom_range(0, 2) == 0 || got > TOTAL / 2);
  always @(posedge rclk) if (rst_n && rd_en && !empty) begin
    checks++;
    if (rd_data !== {8'hA5, 32'(got), 32'(got * 7 + 1)}) begin
      failures++; $display("FAIL word %0d got %h", got, rd_data);
    end
    got <= got + 1;
  end

  initial begin
    #50 rst_n = 1;
    wait (got == TOTAL);
    #200;
    checks++;
    if (n_full == 0 || n_afull == 0) begin failures++; $display("FAIL full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (timeout, got %0d)", checks, failures, got);
    $finish;
  end
endmodule

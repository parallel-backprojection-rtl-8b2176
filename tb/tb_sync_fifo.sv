// Self-checking test of the single-clock FIFO: random pushes and pops (never into a full or
// out of an empty FIFO) against a reference queue; checks show-ahead data, empty, full and
// the almost-full level on every clock.
module tb_sync_fifo;
  localparam int W = 32, DEPTH = 16, AF = 12;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, afull;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH), .AF_LEVEL(AF)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit w, r;
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;
      #1;
      w = ($urandom_range(0, 99) < bias) && !full;
      r = ($urandom_range(0, 99) < 50) && !empty;
      wr_en <= w; rd_en <= r; wr_data <= $urandom;
      #1;
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) ||
          afull !== (model.size() >= AF) || (!empty && rd_data !== model[0])) begin
        failures++;
        $display("FAIL size=%0d empty=%0b full=%0b afull=%0b", model.size(), empty, full, afull);
      end
      if (full) n_full++;
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

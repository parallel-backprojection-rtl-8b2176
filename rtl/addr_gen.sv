// Address generator: sweeps addresses first .. last once per `start`.
// While active it offers the current address; every cycle in which `adv` is high the access
// takes place (`fire`) and the address moves on. After the last address `active` falls and
// `done` pulses for one cycle. One instance sweeps the SRAM words of Target Memory A (adv =
// the clock-crossing FIFO has room), one the words of Target Memory B (adv = merged output
// data is available) and one the pixel indices handed to the distance-to-time calculators
// (adv = no projection FIFO is nearly full). `first` and `last` are sampled at `start`; a
// processing step narrowed to the rows the radar beam reaches sweeps only part of the memory.
// Sweeping a contiguous address range linearly is this design's own choice.
module addr_gen #(
  parameter int AW = 18
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] first,
  input  logic [AW-1:0] last,
  input  logic          adv,
  output logic          active,
  output logic          fire,
  output logic [AW-1:0] addr,
  output logic          done
);
  logic [AW-1:0] last_q;
  assign fire = active && adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; addr <= '0; last_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        addr   <= first;
        last_q <= last;
      end else if (fire) begin
        addr <= addr + 1'b1;
        if (addr == last_q) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule

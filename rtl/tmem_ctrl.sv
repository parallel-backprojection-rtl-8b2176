// Target memory controller: the SRAM-clock side of one backprojection pipeline.
// A pipeline owns a pair of target SRAMs. `bank` names the one holding the latest image; in a
// processing step it is the source (Target Memory A role) and the other is the destination
// (Target Memory B role), and the host flips `bank` after the step. Operations, started by a
// one-cycle `start` with `op` stable:
//   OP_STEP  source words are read as fast as the crossing FIFO towards the adders has room
//            (address generator A, paused by its almost-full flag) while the words coming back
//            from the adders are written to the destination whenever one is available (address
//            generator B). `done` pulses after the last destination write.
//            Only words `first` .. `last` (sampled at `start`) are swept: the pipeline narrows
//            a step to the image rows the radar beam can reach.
//   OP_ZERO  both SRAMs are written with zero, one word per cycle.
//   OP_READ  the latest image is read into the crossing FIFO for the magnitude/DMA output path.
// SRAM port (per SRAM, memory clock): addr, rd, wr, wdata; rdata is valid SRAM_LAT cycles after
// rd. Each 72-bit word holds two complex pixels. The A/B role swap, the FIFOs and the zeroing
// request follow the design; the port protocol and latency are assumptions about the vendor
// memory controller.
module tmem_ctrl
  import bp_pkg::*;
#(
  parameter int AW       = 18,
  parameter int SRAM_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mop_e              op,
  input  logic              bank,
  input  logic [AW-1:0]     first,
  input  logic [AW-1:0]     last,
  output logic              busy,
  output logic              done,
  // SRAM pair
  output logic [AW-1:0]     sram_addr  [2],
  output logic              sram_rd    [2],
  output logic              sram_wr    [2],
  output logic [WORD_W-1:0] sram_wdata [2],
  input  logic [WORD_W-1:0] sram_rdata [2],
  // towards the adders (write side of a crossing FIFO)
  output logic              af_wr,
  output logic [WORD_W-1:0] af_wdata,
  input  logic              af_afull,
  // from the adders (read side of a crossing FIFO)
  output logic              bf_rd,
  input  logic [WORD_W-1:0] bf_rdata,
  input  logic              bf_empty
);
  mop_e op_q;
  logic bank_q;
  logic a_start, b_start, a_act, b_act, a_fire, b_fire, a_done, b_done;
  logic [AW-1:0] a_addr, b_addr, first_q, last_q, g_first, g_last;
  logic [SRAM_LAT-1:0] rv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_STEP; bank_q <= 1'b0; first_q <= '0; last_q <= '0; busy <= 1'b0; done <= 1'b0; rv <= '0;
    end else begin
      done <= 1'b0;
      rv   <= {rv[SRAM_LAT-2:0], a_fire};
      if (start && !busy) begin
        op_q   <= op;
        bank_q <= bank;
        first_q <= first;
        last_q <= last;
        busy   <= 1'b1;
      end else if (busy && ((op_q == OP_READ) ? (!a_act && rv == '0 && !a_start)
                                              : b_done)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // start the address generators one cycle after the operation is latched
  logic go;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go <= 1'b0;
    else        go <= start && !busy;
  end
  assign a_start = go && (op_q == OP_STEP || op_q == OP_READ);
  assign b_start = go && (op_q == OP_STEP || op_q == OP_ZERO);

  assign g_first = (op_q == OP_STEP) ? first_q : '0;
  assign g_last  = (op_q == OP_STEP) ? last_q  : '1;

  addr_gen #(.AW(AW)) u_ag_a (
    .clk, .rst_n, .start(a_start), .first(g_first), .last(g_last), .adv(!af_afull),
    .active(a_act), .fire(a_fire), .addr(a_addr), .done(a_done)
  );
  addr_gen #(.AW(AW)) u_ag_b (
    .clk, .rst_n, .start(b_start), .first(g_first), .last(g_last), .adv(op_q == OP_ZERO || !bf_empty),
    .active(b_act), .fire(b_fire), .addr(b_addr), .done(b_done)
  );

  assign bf_rd = b_fire && op_q == OP_STEP;

  for (genvar i = 0; i < 2; i++) begin : g_sram
    logic is_src;
    assign is_src        = (1'(i) == bank_q);
    assign sram_rd[i]    = a_fire && is_src;
    assign sram_wr[i]    = b_fire && (op_q == OP_ZERO || !is_src);
    assign sram_addr[i]  = sram_rd[i] ? a_addr : b_addr;
    assign sram_wdata[i] = (op_q == OP_ZERO) ? '0 : bf_rdata;
  end

  assign af_wr    = rv[SRAM_LAT-1];
  assign af_wdata = sram_rdata[bank_q];

  logic unused;
  assign unused = a_done;
endmodule

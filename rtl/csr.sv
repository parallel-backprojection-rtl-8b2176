// Control and status registers, written and read by the host with programmed I/O.
// The host uses them to set the flight parameters of each pipeline, to request zeroing of the
// target SRAMs, to start a DMA fetch of projection data, to start a processing step, to start
// the readout of an image and to poll for completion. One bit per pipeline records which SRAM
// of its pair holds the latest image; it flips by itself when a processing step of that
// pipeline ends; the host may write it to pick an image for readout, but not between processing
// steps, whose row narrowing relies on it. The compile-time sizes N (adders per
// pipeline), R (BlockRAM depth 2^(R+9)) and the number of pipelines can be read back.
// Interface: pio_wr/pio_rd with a word address and 32-bit data; read data is registered and
// valid the cycle after pio_rd. Control bits written to A_CTRL produce one-cycle pulses.
// Register map (bp_pkg): A_CTRL b0 step, b1 zero, b2 readout, b3 DMA receive; A_STATUS
// b0 pipelines busy, b1 DMA receive busy, b2 DMA transmit busy, b3 clocks good, b4 a step has
// ended since the last status read; A_CONFIG {PIPES, R, N}; A_BANK; A_RDPIPE; A_STEPS; per
// pipeline p at PIPE_BASE+8p: RMIN, {DY,DX}, TANPHI, T0, UBASE.
// The register groups follow the design; the map and encodings are this design's own.
module csr
  import bp_pkg::*;
#(
  parameter int PIPES = 2,
  parameter int N     = 8,
  parameter int R     = 2,
  localparam int PPW  = (PIPES > 1) ? $clog2(PIPES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pio_wr,
  input  logic             pio_rd,
  input  logic [7:0]       pio_addr,
  input  logic [CSR_W-1:0] pio_wdata,
  output logic [CSR_W-1:0] pio_rdata,
  // status in
  input  logic             clocks_ok,
  input  logic             pipes_busy,
  input  logic             rx_busy,
  input  logic             tx_busy,
  input  logic [PIPES-1:0] step_done,
  // control out
  output logic             go_step,
  output logic             go_zero,
  output logic             go_read,
  output logic             go_rx,
  output logic [PIPES-1:0] bank,
  output logic [PPW-1:0]   rd_pipe,
  output flight_t          fp [PIPES]
);
  logic [15:0] steps;
  logic        step_flag;

  function automatic logic in_pipe(input logic [7:0] a, input int p);
    return a[7:3] == PIPE_BASE[7:3] + 5'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_step <= 1'b0; go_zero <= 1'b0; go_read <= 1'b0; go_rx <= 1'b0;
      bank <= '0; rd_pipe <= '0; steps <= '0; step_flag <= 1'b0; pio_rdata <= '0;
      for (int p = 0; p < PIPES; p++) fp[p] <= '0;
    end else begin
      go_step <= 1'b0; go_zero <= 1'b0; go_read <= 1'b0; go_rx <= 1'b0;
      bank <= bank ^ step_done;
      if (step_done[0]) begin
        steps     <= steps + 1'b1;
        step_flag <= 1'b1;
      end
      if (pio_wr) begin
        unique case (pio_addr)
          A_CTRL: begin
            go_step <= pio_wdata[0];
            go_zero <= pio_wdata[1];
            go_read <= pio_wdata[2];
            go_rx   <= pio_wdata[3];
          end
          A_BANK:   bank    <= pio_wdata[PIPES-1:0];
          A_RDPIPE: rd_pipe <= pio_wdata[PPW-1:0];
          default: begin
            for (int p = 0; p < PIPES; p++) begin
              if (in_pipe(pio_addr, p)) begin
                unique case (pio_addr[2:0])
                  O_RMIN:   fp[p].rmin   <= pio_wdata[15:0];
                  O_DXDY:   {fp[p].dy, fp[p].dx} <= pio_wdata[15:0];
                  O_TANPHI: fp[p].tanphi <= pio_wdata[17:0];
                  O_T0:     fp[p].t0     <= pio_wdata[15:0];
                  O_UBASE:  fp[p].ubase  <= pio_wdata[15:0];
                  default: ;
                endcase
              end
            end
          end
        endcase
      end
      if (pio_rd) begin
        pio_rdata <= '0;
        unique case (pio_addr)
          A_STATUS: begin
            pio_rdata[4:0] <= {step_flag, clocks_ok, tx_busy, rx_busy, pipes_busy};
            step_flag      <= 1'b0;
          end
          A_CONFIG: pio_rdata[23:0] <= {8'(PIPES), 8'(R), 8'(N)};
          A_BANK:   pio_rdata[PIPES-1:0] <= bank;
          A_RDPIPE: pio_rdata[PPW-1:0]   <= rd_pipe;
          A_STEPS:  pio_rdata[15:0]      <= steps;
          default: begin
            for (int p = 0; p < PIPES; p++) begin
              if (in_pipe(pio_addr, p)) begin
                unique case (pio_addr[2:0])
                  O_RMIN:   pio_rdata[15:0] <= fp[p].rmin;
                  O_DXDY:   pio_rdata[15:0] <= {fp[p].dy, fp[p].dx};
                  O_TANPHI: pio_rdata[17:0] <= fp[p].tanphi;
                  O_T0:     pio_rdata[15:0] <= fp[p].t0;
                  O_UBASE:  pio_rdata[15:0] <= fp[p].ubase;
                  default: ;
                endcase
              end
            end
          end
        endcase
      end
    end
  end
endmodule

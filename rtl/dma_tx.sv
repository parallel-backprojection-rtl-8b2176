// DMA transmit controller (DXC): sends LEN_W-counted blocks of magnitudes to the host.
// On `start` it raises a one-cycle transfer request `tx_req` with the word count `tx_len`
// (the FPGA masters every DMA transfer), then forwards one magnitude per 32-bit word,
// zero-extended, through the valid/ready word stream towards the board's PCI interface,
// marking the final word with `tx_last`. `busy` is high from start until the last word is
// taken; magnitudes arriving when no transfer is open are held back. One word per clock.
// The role of the block follows the design; the word format and handshake are this design's own.
module dma_tx
  import bp_pkg::*;
#(
  parameter int LEN_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] len,
  output logic             busy,
  input  logic             m_valid,
  input  logic [MAG_W-1:0] m_data,
  output logic             m_ready,
  output logic             tx_req,
  output logic [LEN_W-1:0] tx_len,
  output logic             tx_valid,
  output logic [CSR_W-1:0] tx_data,
  output logic             tx_last,
  input  logic             tx_ready
);
  logic [LEN_W-1:0] left;

  assign tx_valid = busy && m_valid;
  assign tx_data  = CSR_W'(m_data);
  assign tx_last  = left == LEN_W'(1);
  assign m_ready  = busy && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; left <= '0; tx_req <= 1'b0; tx_len <= '0;
    end else begin
      tx_req <= 1'b0;
      if (start && !busy && len != '0) begin
        busy   <= 1'b1;
        left   <= len;
        tx_req <= 1'b1;
        tx_len <= len;
      end else if (tx_valid && tx_ready) begin
        left <= left - 1'b1;
        if (tx_last) busy <= 1'b0;
      end
    end
  end
endmodule

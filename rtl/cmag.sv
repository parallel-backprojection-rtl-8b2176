// Complex magnitude: |p| = floor(sqrt(re^2 + im^2)) of a 36-bit complex target pixel,
// giving an 18-bit unsigned value (the largest possible magnitude, sqrt(2)*2^17, fits).
// Two multipliers form the squares, an adder their sum and the pipelined shift-and-subtract
// square root (isqrt) the result. Input and output are valid/ready streams; the whole pipeline
// advances together whenever its last stage is empty or being accepted, so one pixel per clock
// passes when the consumer keeps up. Latency: 2 + (PIX_W+1) cycles.
// The multiply/add/subtractor-root structure follows the design; flooring is this design's own.
module cmag
  import bp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pix_t             in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [MAG_W-1:0] out_mag,
  input  logic             out_ready
);
  localparam int SQ_W = 2 * PIX_W;        // one square
  localparam int RD_W = SQ_W + 2;         // sum, padded to an even width

  logic en;
  logic v1, v2;
  logic [SQ_W-1:0] rr1, ii1;
  logic [RD_W-1:0] sum2;
  logic sq_v;
  logic [RD_W/2-1:0] root;

  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; rr1 <= '0; ii1 <= '0; sum2 <= '0;
    end else if (en) begin
      v1   <= in_valid;
      rr1  <= SQ_W'(in_data.re * in_data.re);
      ii1  <= SQ_W'(in_data.im * in_data.im);
      v2   <= v1;
      sum2 <= RD_W'(rr1) + RD_W'(ii1);
    end
  end

  isqrt #(.IN_W(RD_W)) u_sqrt (
    .clk, .rst_n, .en, .in_valid(v2), .radicand(sum2), .out_valid(sq_v), .root(root)
  );

  assign out_valid = sq_v;
  assign out_mag   = (root > (RD_W/2)'({MAG_W{1'b1}})) ? '1 : MAG_W'(root);
endmodule

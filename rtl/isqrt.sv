// Pipelined integer square root, root = floor(sqrt(radicand)).
// Classic shift-and-subtract (non-restoring digit-by-digit) method: each of the IN_W/2
// stages brings down two radicand bits, tries to subtract (4*root+1) from the partial
// remainder and keeps the difference when it is not negative, giving one root bit. Every
// stage is a subtractor followed by a register, so a new operand can enter on every cycle
// and the result appears IN_W/2 cycles later. A valid bit travels with the data; the
// pipeline advances when `en` is high (tie it high for a free-running pipeline).
// The subtractor pipeline is the method the design calls for; the stage registering is this
// design's own choice.
module isqrt #(
  parameter int IN_W = 42                  // even
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   radicand,
  output logic              out_valid,
  output logic [IN_W/2-1:0] root
);
  localparam int OW = IN_W / 2;

  logic [IN_W-1:0] rad_q [OW+1];   // remaining radicand bits, shifted left per stage
  logic [OW+1:0]   rem_q [OW+1];   // partial remainder
  logic [OW-1:0]   rt_q  [OW+1];   // root so far
  logic            v_q   [OW+1];

  always_comb begin
    rad_q[0] = radicand;
    rem_q[0] = '0;
    rt_q[0]  = '0;
    v_q[0]   = in_valid;
  end

  for (genvar s = 0; s < OW; s++) begin : g_stage
    logic [OW+1:0] rem_in, trial;
    logic          ok;
    always_comb begin
      rem_in = {rem_q[s][OW-1:0], rad_q[s][IN_W-1 -: 2]};
      trial  = {rt_q[s], 2'b01};
      ok     = rem_in >= trial;
    end
    logic [IN_W-1:0] rad_r;
    logic [OW+1:0]   rem_r;
    logic [OW-1:0]   rt_r;
    logic            v_r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rad_r <= '0; rem_r <= '0; rt_r <= '0; v_r <= 1'b0;
      end else if (en) begin
        rad_r <= rad_q[s] << 2;
        rem_r <= ok ? rem_in - trial : rem_in;
        rt_r  <= {rt_q[s][OW-2:0], ok};
        v_r   <= v_q[s];
      end
    end
    always_comb begin
      rad_q[s+1] = rad_r;
      rem_q[s+1] = rem_r;
      rt_q[s+1]  = rt_r;
      v_q[s+1]   = v_r;
    end
  end

  assign root      = rt_q[OW];
  assign out_valid = v_q[OW];
endmodule

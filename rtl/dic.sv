// Distance-to-time index calculator (DIC).
// For pixel (x, y) of the target image and projection u it evaluates the SAR indexing function
//   t   = floor(sqrt(X^2 + Y^2)) - T0,  X = RMIN + x*DX,  Y = (y - u)*DY
//   hit = chi && 0 <= t < 2^T_W,         chi = |Y| <= X*tan(phi)
// with every quantity in fast-time sample units, so that the host supplies integer flight
// parameters (sample spacing dt = 1) and tan(phi) precomputed as an unsigned 2.16 number.
// Two multipliers form the squares, a third forms the beam edge X*tan(phi); the beam test runs
// in parallel with the square root, a pipeline of subtractors (isqrt). A pixel outside the beam
// or outside the stored window gets hit = 0 and its sample is later forced to zero.
// Timing: fully pipelined, one pixel per cycle, fixed latency LAT = C_W + 6 cycles; there is
// no stall input, so the producer must leave room downstream for LAT pixels in flight.
// The equation, the host-supplied tangent and the subtractor square root follow the design
// description; T0, the 2.16 format, saturation at 2^C_W-1 and flooring are this design's own.
module dic
  import bp_pkg::*;
#(
  parameter int X_W = 9,     // range pixel index width (512 columns)
  parameter int Y_W = 10,    // azimuth pixel index width (1024 rows)
  parameter int T_W = 11,    // fast-time index width (2^(R+9) samples, R = 2)
  parameter int C_W = 20     // distance arithmetic width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flight_t               fp,
  input  logic signed [15:0]    u,          // slow-time index of this projection
  input  logic                  in_valid,
  input  logic [X_W-1:0]        x,
  input  logic [Y_W-1:0]        y,
  output logic                  out_valid,
  output logic                  hit,
  output logic [T_W-1:0]        t
);
  localparam int D_W = C_W + 1;                 // root width
  localparam logic [C_W-1:0] CMAX = '1;

  // stage 1: range distance, azimuth offset
  logic                  v1;
  logic [C_W+8:0]        xr1;
  logic signed [17:0]    dyu1;
  // stage 2: saturated coordinates
  logic                  v2;
  logic [C_W-1:0]        X2, Y2;
  // stage 3: squares and beam edge
  logic                  v3;
  logic [2*C_W-1:0]      xx3, yy3;
  logic [C_W+17:0]       edge3, yl3;
  // stage 4: sum and chi
  logic                  v4, chi4;
  logic [2*C_W+1:0]      sum4;

  logic [17:0]           ady;
  logic [25:0]           yy_full;
  always_comb begin
    ady     = dyu1[17] ? 18'(-dyu1) : 18'(dyu1);
    yy_full = ady * fp.dy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
      xr1 <= '0; dyu1 <= '0; X2 <= '0; Y2 <= '0; xx3 <= '0; yy3 <= '0;
      edge3 <= '0; yl3 <= '0; chi4 <= 1'b0; sum4 <= '0;
    end else begin
      v1   <= in_valid;
      xr1  <= (C_W+9)'(fp.rmin) + (C_W+9)'(x * fp.dx);
      dyu1 <= 18'(signed'({1'b0, y})) - 18'(u);
      v2   <= v1;
      X2   <= (xr1 > (C_W+9)'(CMAX)) ? CMAX : xr1[C_W-1:0];
      Y2   <= (yy_full > 26'(CMAX)) ? CMAX : C_W'(yy_full);
      v3   <= v2;
      xx3  <= X2 * X2;
      yy3  <= Y2 * Y2;
      edge3 <= X2 * fp.tanphi;
      yl3  <= (C_W+18)'({Y2, 16'h0000});
      v4   <= v3;
      sum4 <= (2*C_W+2)'(xx3) + (2*C_W+2)'(yy3);
      chi4 <= yl3 <= edge3;
    end
  end

  logic          sq_v;
  logic [D_W-1:0] d;
  isqrt #(.IN_W(2*C_W+2)) u_sqrt (
    .clk, .rst_n, .en(1'b1), .in_valid(v4), .radicand(sum4), .out_valid(sq_v), .root(d)
  );

  // chi travels alongside the square root
  logic [D_W-1:0] chi_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chi_d <= '0;
    else        chi_d <= {chi_d[D_W-2:0], chi4};
  end

  logic signed [D_W+1:0] td;
  always_comb td = (D_W+2)'(d) - (D_W+2)'(fp.t0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; hit <= 1'b0; t <= '0;
    end else begin
      out_valid <= sq_v;
      hit       <= chi_d[D_W-1] && (td >= 0) && (td < (D_W+2)'(2**T_W));
      t         <= T_W'(td);
    end
  end
endmodule

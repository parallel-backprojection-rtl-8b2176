// Self-checking test of the distance-to-time index calculator: several flight-parameter sets,
// random pixels one per clock, each result compared with an independent evaluation of
// t = floor(sqrt(X^2+Y^2)) - T0 and of the beam and window tests, and its latency checked.
module tb_dic;
  import bp_pkg::*;
  localparam int X_W = 9, Y_W = 10, T_W = 11, C_W = 20;
  localparam int LAT = C_W + 6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  flight_t fp;
  logic signed [15:0] u;
  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  logic out_valid, hit;
  logic [T_W-1:0] t;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  dic #(.X_W(X_W), .Y_W(Y_W), .T_W(T_W), .C_W(C_W)) dut (.*);
  always #5 clk = !clk;

  function automatic longint isq(input longint v);
    longint r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  typedef struct { logic h; longint t; int c; } exp_t;
  exp_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic exp_t model(input int xi, input int yi);
    longint X, Y, d, tt, cmax;
    exp_t e;
    cmax = (longint'(1) << C_W) - 1;
    X = longint'(fp.rmin) + longint'(xi) * fp.dx;
    if (X > cmax) X = cmax;
    Y = longint'(yi) - longint'(u);
    if (Y < 0) Y = -Y;
    Y = Y * fp.dy;
    if (Y > cmax) Y = cmax;
    d  = isq(X * X + Y * Y);
    tt = d - longint'(fp.t0);
    e.h = (Y * 65536 <= X * longint'(fp.tanphi)) && tt >= 0 && tt < (1 << T_W);
    e.t = tt & ((1 << T_W) - 1);
    e.c = cyc;
    return e;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (hit) hits++; else misses++;
    if (hit !== e.h || (e.h && t !== T_W'(e.t)) || cyc - e.c != LAT + 1) begin
      failures++;
      $display("FAIL hit=%0b/%0b t=%0d/%0d lat=%0d", hit, e.h, t, e.t, cyc - e.c);
    end
  end

  initial begin
    fp = '0; u = '0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 6; set++) begin
      fp.rmin   = 16'($urandom_range(0, 3000));
      fp.dx     = 8'($urandom_range(1, 3));
      fp.dy     = 8'($urandom_range(1, 3));
      fp.tanphi = 18'($urandom_range(0, 90000));     // up to tan = 1.37
      fp.t0     = (fp.rmin > 100) ? fp.rmin - 16'($urandom_range(0, 100)) : 16'h0;
      fp.ubase  = '0;
      u         = 16'($urandom_range(0, 1023) - 100);
      if (set == 5) begin fp.rmin = 16'hffff; fp.dx = 8'hff; fp.dy = 8'hff; end  // saturation
      @(posedge clk);
      for (int i = 0; i < 400; i++) begin
        int xi, yi;
        xi = $urandom_range(0, 2**X_W - 1);
        yi = (i % 2) ? $urandom_range(0, 2**Y_W - 1) : int'(u) + $urandom_range(0, 40) - 20;
        yi = yi & (2**Y_W - 1);
        x <= X_W'(xi); y <= Y_W'(yi); in_valid <= 1;
        q.push_back(model(xi, yi));
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (LAT + 4) @(posedge clk);
    end
    checks++;
    if (q.size() != 0 || hits == 0 || misses == 0) begin
      failures++; $display("FAIL left=%0d hits=%0d misses=%0d", q.size(), hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

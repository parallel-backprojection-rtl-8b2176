// Carries a one-cycle pulse from one clock domain to another.
// The source pulse flips a toggle flip-flop; the toggle crosses through two synchronising
// flip-flops and a change of its value makes a one-cycle pulse in the destination domain.
// Pulses must be spaced by a few destination clock cycles (control events only).
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog, s1, s2, s3;
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) tog <= 1'b0;
    else if (src_pulse) tog <= !tog;
  end
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) {s1, s2, s3} <= '0;
    else            {s1, s2, s3} <= {tog, s1, s2};
  end
  assign dst_pulse = s2 ^ s3;
endmodule

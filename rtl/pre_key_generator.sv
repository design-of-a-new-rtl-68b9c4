// pre_key_generator: four Euler-integrated chaotic systems (Lorenz, Rossler,
// Chen, Lu) and the mixing rule, producing one 32-bit pre-key per step.
//
// Each clock with ap_ce and ap_start high every system takes one Euler step and
// the mixed value of the current states (MUX1..MUX4, selections sw1..sw4) is
// registered into x_V, with x_V_ap_vld high for that enabled clock.  So the k-th
// pre-key (k = 0, 1, ...) is the mix of the states after k steps, and it leaves
// the block one enabled clock after the request: one pre-key per clock at full
// rate.  ap_rst reloads all initial conditions.
//
// The port names follow the HLS block (ap_clk, ap_rst, ap_start, ap_done,
// ap_idle, ap_ready, x_V, x_V_ap_vld).  ap_ce is this design's clock enable (the
// divided clock); ap_done and ap_ready pulse with x_V_ap_vld, and ap_idle is high
// when no step is requested.  Four 2-bit selection ports are used, one per
// multiplexer.
module pre_key_generator
  import chaos_pkg::*;
(
  input  logic     ap_clk,
  input  logic     ap_rst,
  input  logic     ap_ce,
  input  logic     ap_start,
  input  sys_sel_e sw1,
  input  sys_sel_e sw2,
  input  sys_sel_e sw3,
  input  var_sel_e sw4,
  output logic     ap_done,
  output logic     ap_idle,
  output logic     ap_ready,
  output fix_t     x_V,
  output logic     x_V_ap_vld
);

  fix_t sx [4];
  fix_t sy [4];
  fix_t sz [4];
  fix_t xi, yi, zi, xn;
  logic step;

  assign step = ap_ce & ap_start;

  lorenz_euler  u_lorenz  (.ap_clk, .ap_rst, .ap_ce(step), .x1_V(sx[0]), .y1_V(sy[0]), .z1_V(sz[0]));
  rossler_euler u_rossler (.ap_clk, .ap_rst, .ap_ce(step), .x2_V(sx[1]), .y2_V(sy[1]), .z2_V(sz[1]));
  chen_euler    u_chen    (.ap_clk, .ap_rst, .ap_ce(step), .x3_V(sx[2]), .y3_V(sy[2]), .z3_V(sz[2]));
  lu_euler      u_lu      (.ap_clk, .ap_rst, .ap_ce(step), .x4_V(sx[3]), .y4_V(sy[3]), .z4_V(sz[3]));

  mixing_rule u_mix (
    .x(sx), .y(sy), .z(sz),
    .sw1, .sw2, .sw3, .sw4,
    .xi, .yi, .zi, .xn
  );

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      x_V        <= '0;
      x_V_ap_vld <= 1'b0;
    end else if (ap_ce) begin
      x_V_ap_vld <= ap_start;
      if (ap_start) x_V <= xn;
    end
  end

  assign ap_done  = x_V_ap_vld;
  assign ap_ready = x_V_ap_vld;
  assign ap_idle  = ~ap_start;

endmodule

// rossler_euler: the Rossler chaotic system solved by the explicit Euler method.
//
// dx/dt = -(y + z),  dy/dt = x + Ay,  dz/dt = B + z(x - C)
// with A = 0.2, B = 0.2, C = 5.7 and x(0) = y(0) = z(0) = 0.1 (standard form of
// the system, with +x in dy/dt).
// On every clock with ap_ce high the three state variables advance by one Euler
// step together:  v(n+1) = v(n) + H * dv/dt, evaluated from the state of step n.
// Synchronous ap_rst loads the initial conditions.  The outputs x2_V, y2_V,
// z2_V are the registered state (Q8.24, see chaos_pkg), so a new point of the
// trajectory is available one clock after each enabled step.
//
// Coefficients and initial conditions are the published ones; the number format
// and the step H = 0.001 are this design's choice (H must stay below about 0.003
// for the Chen system to remain bounded under Euler integration).
module rossler_euler
  import chaos_pkg::*;
#(
  parameter fix_t A  = FIX_0_2,
  parameter fix_t B  = FIX_0_2,
  parameter fix_t C  = FIX_5_7,
  parameter fix_t X0 = FIX_0_1,
  parameter fix_t Y0 = FIX_0_1,
  parameter fix_t Z0 = FIX_0_1,
  parameter fix_t H = FIX_H
) (
  input  logic ap_clk,
  input  logic ap_rst,
  input  logic ap_ce,
  output fix_t x2_V,
  output fix_t y2_V,
  output fix_t z2_V
);

  fix_t  x, y, z;
  wide_t dx, dy, dz;
  wide_t wx, wy, wz;

  always_comb begin
    wx = wide_t'(x);
    wy = wide_t'(y);
    wz = wide_t'(z);
    dx = -(wy + wz);
    dy = wx + fmul(wide_t'(A), wy);
    dz = wide_t'(B) + fmul(wz, wx - wide_t'(C));
  end

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      x <= X0;
      y <= Y0;
      z <= Z0;
    end else if (ap_ce) begin
      x <= euler(x, dx, H);
      y <= euler(y, dy, H);
      z <= euler(z, dz, H);
    end
  end

  assign x2_V = x;
  assign y2_V = y;
  assign z2_V = z;

endmodule

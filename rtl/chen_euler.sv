// chen_euler: the Chen chaotic system solved by the explicit Euler method.
//
// dx/dt = A(y - x),  dy/dt = (C - A)x - xz + Cy,  dz/dt = xy - Bz
// with A = 35, B = 3, C = 28 and x(0) = y(0) = z(0) = 1.
// On every clock with ap_ce high the three state variables advance by one Euler
// step together:  v(n+1) = v(n) + H * dv/dt, evaluated from the state of step n.
// Synchronous ap_rst loads the initial conditions.  The outputs x3_V, y3_V,
// z3_V are the registered state (Q8.24, see chaos_pkg), so a new point of the
// trajectory is available one clock after each enabled step.
//
// Coefficients and initial conditions are the published ones; the number format
// and the step H = 0.001 are this design's choice (H must stay below about 0.003
// for the Chen system to remain bounded under Euler integration).
module chen_euler
  import chaos_pkg::*;
#(
  parameter fix_t A  = fix_int(35),
  parameter fix_t B  = fix_int(3),
  parameter fix_t C  = fix_int(28),
  parameter fix_t X0 = FIX_1,
  parameter fix_t Y0 = FIX_1,
  parameter fix_t Z0 = FIX_1,
  parameter fix_t H = FIX_H
) (
  input  logic ap_clk,
  input  logic ap_rst,
  input  logic ap_ce,
  output fix_t x3_V,
  output fix_t y3_V,
  output fix_t z3_V
);

  fix_t  x, y, z;
  wide_t dx, dy, dz;
  wide_t wx, wy, wz;

  always_comb begin
    wx = wide_t'(x);
    wy = wide_t'(y);
    wz = wide_t'(z);
    dx = fmul(wide_t'(A), wy - wx);
    dy = fmul(wide_t'(C) - wide_t'(A), wx) - fmul(wx, wz) + fmul(wide_t'(C), wy);
    dz = fmul(wx, wy) - fmul(wide_t'(B), wz);
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

  assign x3_V = x;
  assign y3_V = y;
  assign z3_V = z;

endmodule

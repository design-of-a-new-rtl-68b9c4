// lu_euler: the Lu chaotic system solved by the explicit Euler method.
//
// dx/dt = A(y - x),  dy/dt = -xz + Cy,  dz/dt = xy - Bz
// with A = 36, B = 3, C = 20 and x(0) = y(0) = z(0) = 1.
// On every clock with ap_ce high the three state variables advance by one Euler
// step together:  v(n+1) = v(n) + H * dv/dt, evaluated from the state of step n.
// Synchronous ap_rst loads the initial conditions.  The outputs x4_V, y4_V,
// z4_V are the registered state (Q8.24, see chaos_pkg), so a new point of the
// trajectory is available one clock after each enabled step.
//
// Coefficients and initial conditions are the published ones; the number format
// and the step H = 0.001 are this design's choice (H must stay below about 0.003
// for the Chen system to remain bounded under Euler integration).
module lu_euler
  import chaos_pkg::*;
#(
  parameter fix_t A  = fix_int(36),
  parameter fix_t B  = fix_int(3),
  parameter fix_t C  = fix_int(20),
  parameter fix_t X0 = FIX_1,
  parameter fix_t Y0 = FIX_1,
  parameter fix_t Z0 = FIX_1,
  parameter fix_t H = FIX_H
) (
  input  logic ap_clk,
  input  logic ap_rst,
  input  logic ap_ce,
  output fix_t x4_V,
  output fix_t y4_V,
  output fix_t z4_V
);

  fix_t  x, y, z;
  wide_t dx, dy, dz;
  wide_t wx, wy, wz;

  always_comb begin
    wx = wide_t'(x);
    wy = wide_t'(y);
    wz = wide_t'(z);
    dx = fmul(wide_t'(A), wy - wx);
    dy = fmul(wide_t'(C), wy) - fmul(wx, wz);
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

  assign x4_V = x;
  assign y4_V = y;
  assign z4_V = z;

endmodule

// mixing_rule: the multiplexer tree that mixes the four chaotic systems.
//
// MUX1 picks the x variable of one system (sw1), MUX2 the y variable (sw2) and
// MUX3 the z variable (sw3), with the code 00 = Lorenz, 01 = Rossler, 10 = Chen,
// 11 = Lu.  MUX4 then picks among those three by sw4: 00 = x_i, 01 = y_i,
// 10 = z_i.  The published selection table leaves sw4 = 11 open; this design
// maps it to x_i like 00.  Its output x_n is the pre-key that perturbs the
// logistic map.  Purely combinational, no clock.
//
// Inputs are indexed by system: index 0 Lorenz, 1 Rossler, 2 Chen, 3 Lu.
module mixing_rule
  import chaos_pkg::*;
(
  input  fix_t     x [4],
  input  fix_t     y [4],
  input  fix_t     z [4],
  input  sys_sel_e sw1,
  input  sys_sel_e sw2,
  input  sys_sel_e sw3,
  input  var_sel_e sw4,
  output fix_t     xi,
  output fix_t     yi,
  output fix_t     zi,
  output fix_t     xn
);

  // MUX1..MUX3
  always_comb begin
    xi = x[sw1];
    yi = y[sw2];
    zi = z[sw3];
  end

  // MUX4
  always_comb begin
    unique case (sw4)
      VAR_X:     xn = xi;
      VAR_Y:     xn = yi;
      VAR_Z:     xn = zi;
      VAR_X_ALT: xn = xi;
    endcase
  end

endmodule

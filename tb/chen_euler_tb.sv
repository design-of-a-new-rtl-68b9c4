// chen_euler_tb: self-checking testbench of chen_euler (the 2 system).
// Steps the block with a random clock-enable pattern and compares every state
// with a bit-exact Q8.24 reference model, checks that disabled clocks hold the
// state, that the first steps track a double-precision Euler run, that the
// trajectory stays bounded and moving, and that reset reloads the initial
// conditions.
module chen_euler_tb;
  import chaos_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, ce;
  logic signed [31:0] xo, yo, zo;
  int checks = 0, failures = 0;
  state_t s;
  real rx, ry, rz, dx, dy, dz;
  int steps = 0;
  longint maxabs = 0;

  always #5 clk = ~clk;

  chen_euler dut (.ap_clk(clk), .ap_rst(rst), .ap_ce(ce), .x3_V(xo), .y3_V(yo), .z3_V(zo));

  task automatic check_state(string what);
    checks++;
    if (longint'(xo) != s.x || longint'(yo) != s.y || longint'(zo) != s.z) begin
      failures++;
      if (failures < 10) $display("FAIL %s step %0d: got %0d %0d %0d exp %0d %0d %0d", what, steps, xo, yo, zo, s.x, s.y, s.z);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    s = init_state(2);
    check_state("reset");
    rx = real'(s.x) / 16777216.0; ry = real'(s.y) / 16777216.0; rz = real'(s.z) / 16777216.0;
    for (int i = 0; i < 20000; i++) begin
      ce = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (ce) begin
        s = sys_step(2, s);
        steps++;
        if (steps <= 200) begin
          dx = 35.0*(ry-rx); dy = -7.0*rx - rx*rz + 28.0*ry; dz = rx*ry - 3.0*rz;
          rx += 0.001 * dx; ry += 0.001 * dy; rz += 0.001 * dz;
          checks++;
          if ((rx - real'(xo) / 16777216.0) > 0.01 || (real'(xo) / 16777216.0 - rx) > 0.01 ||
              (rz - real'(zo) / 16777216.0) > 0.01 || (real'(zo) / 16777216.0 - rz) > 0.01) begin
            failures++;
            $display("FAIL float track step %0d: %f %f", steps, rx, real'(xo) / 16777216.0);
          end
        end
      end
      check_state(ce ? "step" : "hold");
      if ((xo < 0 ? -longint'(xo) : longint'(xo)) > maxabs) maxabs = (xo < 0 ? -longint'(xo) : longint'(xo));
    end
    // bounded (|x| < 100) and not collapsed to a point (|x| reached > 0.5)
    checks++;
    if (maxabs > 100 * 16777216 || maxabs < 16777216 / 2) begin
      failures++;
      $display("FAIL range: max |x| = %f", real'(maxabs) / 16777216.0);
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    s = init_state(2);
    check_state("re-reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mixing_rule_tb: drives random values on the twelve chaotic inputs and walks
// all 256 selection combinations, comparing xi, yi, zi and x_n with the
// selection table (00 Lorenz, 01 Rossler, 10 Chen, 11 Lu; sw4: x, y, z, x).
module mixing_rule_tb;
  import chaos_pkg::*;

  fix_t x [4];
  fix_t y [4];
  fix_t z [4];
  sys_sel_e sw1, sw2, sw3;
  var_sel_e sw4;
  fix_t xi, yi, zi, xn, exp_xn;
  int checks = 0, failures = 0;

  mixing_rule dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 4; i++) begin
        x[i] = fix_t'($urandom); y[i] = fix_t'($urandom); z[i] = fix_t'($urandom);
      end
      for (int c = 0; c < 256; c++) begin
        sw1 = sys_sel_e'(c[1:0]); sw2 = sys_sel_e'(c[3:2]);
        sw3 = sys_sel_e'(c[5:4]); sw4 = var_sel_e'(c[7:6]);
        #1;
        case (c[7:6])
          2'd1:    exp_xn = y[c[3:2]];
          2'd2:    exp_xn = z[c[5:4]];
          default: exp_xn = x[c[1:0]];
        endcase
        checks++;
        if (xi !== x[c[1:0]] || yi !== y[c[3:2]] || zi !== z[c[5:4]] || xn !== exp_xn) begin
          failures++;
          if (failures < 10) $display("FAIL sel %b: xn %h exp %h", c[7:0], xn, exp_xn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

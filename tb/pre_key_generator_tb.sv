// pre_key_generator_tb: requests pre-keys with random ap_start and clock-enable
// patterns for several selection settings and compares x_V with the reference
// mix of the four reference systems.  Checks the one-enabled-clock latency
// (x_V_ap_vld exactly after an enabled clock with ap_start), that x_V holds
// otherwise, and ap_done / ap_ready / ap_idle.
module pre_key_generator_tb;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, ce, start;
  sys_sel_e sw1, sw2, sw3;
  var_sel_e sw4;
  logic done, idle, ready, vld;
  fix_t x_V;
  int checks = 0, failures = 0;
  state_t s [4];
  logic exp_vld;
  int unsigned exp_x;

  always #5 clk = ~clk;

  pre_key_generator dut (
    .ap_clk(clk), .ap_rst(rst), .ap_ce(ce), .ap_start(start),
    .sw1, .sw2, .sw3, .sw4,
    .ap_done(done), .ap_idle(idle), .ap_ready(ready), .x_V, .x_V_ap_vld(vld)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1'b0; start = 1'b0;
    for (int setting = 0; setting < 6; setting++) begin
      sw1 = sys_sel_e'($urandom_range(0, 3)); sw2 = sys_sel_e'($urandom_range(0, 3));
      sw3 = sys_sel_e'($urandom_range(0, 3)); sw4 = var_sel_e'(setting % 4);
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      for (int i = 0; i < 4; i++) s[i] = init_state(i);
      exp_vld = 1'b0; exp_x = 0;
      for (int c = 0; c < 3000; c++) begin
        ce = ($urandom_range(0, 4) != 0);
        start = ($urandom_range(0, 3) != 0);
        #1;
        checks++;
        if (idle !== ~start) begin failures++; $display("FAIL ap_idle"); end
        @(posedge clk); #1;
        if (ce) begin
          exp_vld = start;
          if (start) begin
            exp_x = mix(s, sw1, sw2, sw3, sw4);
            for (int i = 0; i < 4; i++) s[i] = sys_step(i, s[i]);
          end
        end
        checks++;
        if (vld !== exp_vld || done !== exp_vld || ready !== exp_vld || int'(x_V) != int'(exp_x)) begin
          failures++;
          if (failures < 10) $display("FAIL setting %0d cycle %0d: vld %b/%b x %h/%h", setting, c, vld, exp_vld, x_V, exp_x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

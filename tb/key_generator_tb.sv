// key_generator_tb: requests 3000 keys per selection setting under a random
// clock-enable and request pattern and compares each key with the reference
// key stream (chaotic systems -> mixing rule -> logistic map).  Checks that
// keys come out in order, each exactly three enabled clocks after its request,
// that a held request gives one key per enabled clock, and that reset restarts
// the stream.
module key_generator_tb;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, ce, start;
  sys_sel_e sw1, sw2, sw3;
  var_sel_e sw4;
  logic [31:0] key;
  logic key_vld;
  int checks = 0, failures = 0;
  key_model m;
  logic [2:0] req_pipe;       // request history in enabled clocks
  int n_keys, n_full_rate;

  always #5 clk = ~clk;

  key_generator dut (.clk, .rst, .ce, .start, .sw1, .sw2, .sw3, .sw4, .key, .key_vld);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1'b0; start = 1'b0;
    n_full_rate = 0;
    for (int setting = 0; setting < 4; setting++) begin
      sw1 = sys_sel_e'(setting); sw2 = sys_sel_e'((setting + 1) % 4);
      sw3 = sys_sel_e'((setting + 2) % 4); sw4 = var_sel_e'(setting);
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      m = new(setting, (setting + 1) % 4, (setting + 2) % 4, setting);
      req_pipe = '0;
      n_keys = 0;
      for (int c = 0; c < 6000; c++) begin
        ce = (c < 200) ? 1'b1 : ($urandom_range(0, 3) != 0);
        start = (c < 200) ? 1'b1 : ($urandom_range(0, 2) != 0);
        @(posedge clk); #1;
        if (ce) req_pipe = {req_pipe[1:0], start};
        checks++;
        if (key_vld !== req_pipe[2]) begin
          failures++;
          if (failures < 10) $display("FAIL latency: setting %0d cycle %0d vld %b exp %b", setting, c, key_vld, req_pipe[2]);
        end
        if (ce && req_pipe[2]) begin
          int unsigned k;
          k = m.next_key();
          n_keys++;
          if (c < 200) n_full_rate++;
          checks++;
          if (key !== k) begin
            failures++;
            if (failures < 10) $display("FAIL key %0d setting %0d: %h exp %h", n_keys, setting, key, k);
          end
        end
      end
    end
    checks++;
    if (n_full_rate < 4 * 190) begin
      failures++;
      $display("FAIL: only %0d keys at full rate", n_full_rate);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

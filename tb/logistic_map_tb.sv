// logistic_map_tb: feeds random and corner inputs (0, 1/2, 1/4, all ones) and
// compares xxout_V with the bit-exact reference and with r x (1 - x), r = 3.99,
// in double precision (to within 2^-28).  Also checks the one-enabled-clock
// latency, holding on disabled clocks and the handshake outputs.
module logistic_map_tb;
  import chaos_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, ce, start;
  logic [31:0] xin, xout;
  logic done, idle, ready, vld;
  int checks = 0, failures = 0;
  int unsigned exp_x;
  logic exp_vld;
  real xr, yr;

  always #5 clk = ~clk;

  logistic_map dut (
    .ap_clk(clk), .ap_rst(rst), .ap_ce(ce), .ap_start(start), .xxin_V(xin),
    .ap_done(done), .ap_idle(idle), .ap_ready(ready), .xxout_V(xout), .xxout_V_ap_vld(vld)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; start = 1'b0; xin = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    exp_x = 0; exp_vld = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      case (i)
        0: xin = 32'h0;
        1: xin = 32'h8000_0000;
        2: xin = 32'h4000_0000;
        3: xin = 32'hFFFF_FFFF;
        default: xin = $urandom;
      endcase
      ce    = (i < 4) ? 1'b1 : ($urandom_range(0, 3) != 0);
      start = (i < 4) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (ce) begin
        exp_vld = start;
        if (start) begin
          exp_x = logistic(xin);
          xr = real'(xin) / 4294967296.0;
          yr = 3.99 * xr * (1.0 - xr);
          checks++;
          if ((yr - real'(xout) / 4294967296.0) > 1.0 / 268435456.0 ||
              (real'(xout) / 4294967296.0 - yr) > 1.0 / 268435456.0) begin
            failures++;
            if (failures < 10) $display("FAIL real: x %f y %f got %f", xr, yr, real'(xout) / 4294967296.0);
          end
        end
      end
      checks++;
      if (xout !== exp_x || vld !== exp_vld || done !== exp_vld || ready !== exp_vld || idle !== ~start) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: xout %h exp %h vld %b/%b", i, xout, exp_x, vld, exp_vld);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

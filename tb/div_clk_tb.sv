// div_clk_tb: checks the enable pattern of dividers by 1, 2 (default) and 5:
// exactly one pulse every DIV clocks, the first DIV clocks after reset.
module div_clk_tb;
  logic clk = 1'b0;
  logic rst;
  logic ce1, ce2, ce5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_clk #(.DIV(1)) dut1 (.clk, .rst, .ce(ce1));
  div_clk             dut2 (.clk, .rst, .ce(ce2));
  div_clk #(.DIV(5)) dut5 (.clk, .rst, .ce(ce5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      // t clocks after reset release; pulses at t = DIV-1, 2*DIV-1, ...
      checks++;
      if (ce1 !== 1'b1 || ce2 !== ((t % 2) == 1) || ce5 !== ((t % 5) == 4)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: %b %b %b", t, ce1, ce2, ce5);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pre_key_reg_tb: random D / CE / reset sequence against a one-line model of a
// clock-enabled register with synchronous clear.
module pre_key_reg_tb;
  logic clk = 1'b0;
  logic rst, ce;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pre_key_reg #(.WIDTH(32)) dut (.clk, .rst, .ce, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; d = '0;
    @(posedge clk); #1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom_range(0, 50) == 0);
      ce  = $urandom_range(0, 1);
      d   = $urandom;
      @(posedge clk); #1;
      if (rst) model = '0;
      else if (ce) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q %h exp %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// otp_xor_tb: random pixels and keys; checks c = m xor K(15:0) one enabled
// clock later, holding on disabled clocks, and that applying the same key to
// the result gives back the pixel (encryption followed by decryption).
module otp_xor_tb;
  logic clk = 1'b0;
  logic ce;
  logic [15:0] din, dout, model;
  logic [31:0] key;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  otp_xor #(.DW(16)) dut (.clk, .ce, .datain(din), .x_logis(key), .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1'b1; din = '0; key = '0;
    @(posedge clk); #1;
    model = '0;
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] m;
      logic [31:0] k;
      m = 16'($urandom); k = $urandom;
      ce = ($urandom_range(0, 3) != 0);
      din = m; key = k;
      @(posedge clk); #1;
      if (ce) model = m ^ k[15:0];
      checks++;
      if (dout !== model) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: %h exp %h", i, dout, model);
      end
      if (ce) begin
        din = dout; ce = 1'b1;
        @(posedge clk); #1;
        checks++;
        if (dout !== m) begin
          failures++;
          if (failures < 10) $display("FAIL round trip %0d: %h exp %h", i, dout, m);
        end
        model = m;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

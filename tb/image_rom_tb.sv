// image_rom_tb: reads every address of the full-size ROM (sequentially, then at
// random with random enables) and compares with the test-image formula; checks
// the one-clock read latency and that the output holds when ena is low.
module image_rom_tb;
  import chaos_ref_pkg::*;

  logic clk = 1'b0;
  logic ena;
  logic [15:0] addr, dout, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  image_rom dut (.clka(clk), .ena, .addra(addr), .douta(dout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ena = 1'b1; addr = '0;
    @(posedge clk); #1;
    model = image_pixel(0);
    for (int i = 0; i < 65536 + 20000; i++) begin
      if (i < 65536) begin addr = 16'(i); ena = 1'b1; end
      else begin addr = 16'($urandom); ena = $urandom_range(0, 1); end
      @(posedge clk); #1;
      if (ena) model = image_pixel(addr);
      checks++;
      if (dout !== model) begin
        failures++;
        if (failures < 10) $display("FAIL addr %h: %h exp %h", addr, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

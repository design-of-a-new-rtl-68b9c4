// frame_ram_tb: writes random words to random addresses while reading others,
// against an associative-array model; checks the one-clock read latency, the
// old-data result of a same-address read and write, and enb holding the output.
module frame_ram_tb;
  logic clk = 1'b0;
  logic wea, enb;
  logic [9:0] addra, addrb;
  logic [15:0] dina, doutb, expd;
  logic [15:0] model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_ram #(.AW(10), .DW(16)) dut (.clk, .wea, .addra, .dina, .enb, .addrb, .doutb);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 1'b0; enb = 1'b0; addra = '0; addrb = '0; dina = '0;
    // fill every word first so that every read has a known value
    for (int a = 0; a < 1024; a++) begin
      wea = 1'b1; addra = 10'(a); dina = 16'($urandom); model[a] = dina;
      @(posedge clk); #1;
    end
    wea = 1'b0; enb = 1'b1; addrb = '0;
    @(posedge clk); #1;
    expd = model[0];
    for (int i = 0; i < 20000; i++) begin
      wea = $urandom_range(0, 1); addra = 10'($urandom); dina = 16'($urandom);
      enb = ($urandom_range(0, 3) != 0);
      addrb = (i % 7 == 0) ? addra : 10'($urandom);
      @(posedge clk); #1;
      if (enb) expd = model[addrb];
      if (wea) model[addra] = dina;
      checks++;
      if (doutb !== expd) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: addrb %h got %h exp %h", i, addrb, doutb, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// encryption_process_tb: encrypts a 256-pixel image (AW = 8, clock divided by
// 3) for two selection settings, then again for the first one, and reads the
// cipher image back through the display port.  Every cipher pixel must equal
// image pixel xor low 16 bits of the reference key; a repeated setting must give
// the same cipher image; a pass must take (N + 4) * DIV clocks, give or take the divider phase.
module encryption_process_tb;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  localparam int AW = 8, DIV = 3, N = 256;

  logic clk = 1'b0;
  logic rst, start, disp_en, busy, done;
  logic [AW:0] n_pixels;
  sys_sel_e sw1, sw2, sw3;
  var_sel_e sw4;
  logic [AW-1:0] disp_addr;
  logic [15:0] disp_data;
  logic [15:0] first [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  encryption_process #(.AW(AW), .DW(16), .DIV(DIV)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int s1, int s2, int s3, int s4, bit compare_first);
    key_model m;
    int cycles;
    sw1 = sys_sel_e'(s1); sw2 = sys_sel_e'(s2); sw3 = sys_sel_e'(s3); sw4 = var_sel_e'(s4);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 10000) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles < (N + 3) * DIV || cycles > (N + 4) * DIV + DIV + 1) begin
      failures++;
      $display("FAIL pass took %0d clocks, expected about %0d", cycles, (N + 4) * DIV);
    end
    m = new(s1, s2, s3, s4);
    for (int a = 0; a < N; a++) begin
      logic [15:0] expd;
      expd = image_pixel(a) ^ 16'(m.next_key());
      disp_en = 1'b1; disp_addr = AW'(a);
      @(posedge clk); #1;
      disp_en = 1'b0;
      checks++;
      if (disp_data !== expd) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d: %h exp %h", a, disp_data, expd);
      end
      if (compare_first) begin
        checks++;
        if (disp_data !== first[a]) failures++;
      end else first[a] = disp_data;
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; disp_en = 1'b0; disp_addr = '0; n_pixels = (AW + 1)'(N);
    sw1 = SYS_LORENZ; sw2 = SYS_LORENZ; sw3 = SYS_LORENZ; sw4 = VAR_X;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    run(0, 1, 2, 0, 0);
    run(3, 2, 1, 2, 0);
    run(3, 2, 1, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

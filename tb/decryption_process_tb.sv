// decryption_process_tb: a testbench memory holds the cipher image of a
// 256-pixel test image (image xor reference keys) and answers the source port
// one clock after each read.  After a pass (AW = 8, DIV = 2) the recovered image
// read through the display port must equal the test image, for two selection
// settings; the pass must take (N + 4) * DIV clocks.  A third pass with the
// wrong selections must not recover the image.
module decryption_process_tb;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  localparam int AW = 8, DIV = 2, N = 256;

  logic clk = 1'b0;
  logic rst, start, disp_en, busy, done, src_en;
  logic [AW:0] n_pixels;
  sys_sel_e sw1, sw2, sw3;
  var_sel_e sw4;
  logic [AW-1:0] disp_addr, src_addr;
  logic [15:0] disp_data, src_data;
  logic [15:0] cipher [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decryption_process #(.AW(AW), .DW(16), .DIV(DIV)) dut (.*);

  always_ff @(posedge clk) if (src_en) src_data <= cipher[src_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int s1, int s2, int s3, int s4, int k1, int k2, int k3, int k4, bit should_match);
    key_model m;
    int cycles, wrong;
    m = new(s1, s2, s3, s4);
    for (int a = 0; a < N; a++) cipher[a] = image_pixel(a) ^ 16'(m.next_key());
    sw1 = sys_sel_e'(k1); sw2 = sys_sel_e'(k2); sw3 = sys_sel_e'(k3); sw4 = var_sel_e'(k4);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 10000) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles < (N + 3) * DIV || cycles > (N + 4) * DIV + DIV + 1) begin
      failures++;
      $display("FAIL pass took %0d clocks", cycles);
    end
    wrong = 0;
    for (int a = 0; a < N; a++) begin
      disp_en = 1'b1; disp_addr = AW'(a);
      @(posedge clk); #1;
      disp_en = 1'b0;
      if (disp_data !== image_pixel(a)) wrong++;
      if (should_match) begin
        checks++;
        if (disp_data !== image_pixel(a)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d: %h exp %h", a, disp_data, image_pixel(a));
        end
      end
    end
    if (!should_match) begin
      checks++;
      if (wrong < N * 9 / 10) begin
        failures++;
        $display("FAIL wrong key recovered %0d of %0d pixels", N - wrong, N);
      end
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; disp_en = 1'b0; disp_addr = '0; n_pixels = (AW + 1)'(N);
    sw1 = SYS_LORENZ; sw2 = SYS_LORENZ; sw3 = SYS_LORENZ; sw4 = VAR_X;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    run(1, 1, 1, 1, 1, 1, 1, 1, 1);
    run(2, 0, 3, 2, 2, 0, 3, 2, 1);
    run(2, 0, 3, 2, 2, 0, 3, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

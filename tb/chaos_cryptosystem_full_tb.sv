// chaos_cryptosystem_full_tb: one complete run of the cryptosystem at its
// default size, 65536 16-bit pixels with the clock divided by 2: encryption of
// the whole test image, then decryption.  Checks every cipher pixel against
// image xor reference key and every recovered pixel against the image, the
// run time, and reports image statistics: the mean and the chi-square of the
// cipher bytes (uniformity, checked against a loose bound), and the correlation
// of horizontally adjacent pixels in the plain and the cipher image (checked:
// strong in the plain image, near zero in the cipher image).
module chaos_cryptosystem_full_tb;
  import chaos_ref_pkg::*;

  localparam int N = 65536;

  logic clk = 1'b0;
  logic rst, start;
  logic [1:0] sw1, sw2, sw3, sw4;
  logic cipher_disp_en, plain_disp_en;
  logic [15:0] cipher_disp_addr, plain_disp_addr;
  logic [15:0] cipher_disp_data, plain_disp_data;
  logic busy, enc_done, dec_done;
  int checks = 0, failures = 0;
  logic [15:0] cimg [N];
  int hist [256];

  always #5 clk = ~clk;

  chaos_cryptosystem dut (.*);

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real corr(bit use_cipher);
    real sx, sy, sxx, syy, sxy, n, vx, vy;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 0;
    for (int a = 0; a < N; a++) begin
      real px, py;
      if ((a % 256) == 255) continue;
      px = use_cipher ? real'(cimg[a][15:8]) : real'(image_pixel(a) >> 8);
      py = use_cipher ? real'(cimg[a + 1][15:8]) : real'(image_pixel(a + 1) >> 8);
      sx += px; sy += py; sxx += px * px; syy += py * py; sxy += px * py; n += 1;
    end
    vx = sxx / n - (sx / n) * (sx / n);
    vy = syy / n - (sy / n) * (sy / n);
    return (sxy / n - (sx / n) * (sy / n)) / $sqrt(vx * vy);
  endfunction

  initial begin
    key_model m;
    int cycles;
    real mean, chi, r_plain, r_cipher;
    rst = 1'b1; start = 1'b0;
    sw1 = 2'b01; sw2 = 2'b01; sw3 = 2'b10; sw4 = 2'b00;
    cipher_disp_en = 1'b0; cipher_disp_addr = '0; plain_disp_en = 1'b0; plain_disp_addr = '0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!dec_done && cycles < 700000) begin @(posedge clk); #1; cycles++; end
    $display("run of %0d pixels took %0d clocks", N, cycles);
    checks++;
    if (cycles < 2 * (N + 3) * 2 || cycles > 2 * (N + 5) * 2 + 4) begin
      failures++;
      $display("FAIL run time");
    end
    m = new(1, 1, 2, 0);
    for (int i = 0; i < 256; i++) hist[i] = 0;
    mean = 0;
    for (int a = 0; a < N; a++) begin
      logic [15:0] c_exp;
      c_exp = image_pixel(a) ^ 16'(m.next_key());
      cipher_disp_en = 1'b1; cipher_disp_addr = 16'(a);
      plain_disp_en = 1'b1; plain_disp_addr = 16'(a);
      @(posedge clk); #1;
      cimg[a] = cipher_disp_data;
      checks += 2;
      if (cipher_disp_data !== c_exp) begin
        failures++;
        if (failures < 10) $display("FAIL cipher %0d: %h exp %h", a, cipher_disp_data, c_exp);
      end
      if (plain_disp_data !== image_pixel(a)) begin
        failures++;
        if (failures < 10) $display("FAIL plain %0d: %h exp %h", a, plain_disp_data, image_pixel(a));
      end
      hist[cipher_disp_data[15:8]]++;
      hist[cipher_disp_data[7:0]]++;
      mean += real'(cipher_disp_data[15:8]) + real'(cipher_disp_data[7:0]);
    end
    mean = mean / (2.0 * N);
    chi = 0;
    for (int i = 0; i < 256; i++) chi += (real'(hist[i]) - 512.0) ** 2 / 512.0;
    r_plain = corr(0);
    r_cipher = corr(1);
    $display("cipher bytes: mean %f chi-square %f; adjacent correlation plain %f cipher %f",
             mean, chi, r_plain, r_cipher);
    checks += 4;
    if (mean < 125.5 || mean > 129.5) begin failures++; $display("FAIL mean"); end
    if (chi > 400.0) begin failures++; $display("FAIL chi-square"); end
    if (r_plain < 0.5) begin failures++; $display("FAIL plain correlation"); end
    if (r_cipher > 0.05 || r_cipher < -0.05) begin failures++; $display("FAIL cipher correlation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// chaos_cryptosystem_tb: end-to-end test of the cryptosystem on a 256-pixel
// image (AW = 8, clock divided by 2).  For five selection settings it starts a
// run, lets encryption hand over to decryption, and then reads both frame RAMs
// through the display ports.  Every cipher pixel must equal image xor reference
// key, every recovered pixel the image, and most cipher pixels must differ
// from the plain ones.  It counts the mechanisms of the design and fails if one
// never happened: each of the four systems feeding x_n, each sw4 code (with the
// 11 code), encryption and decryption passes, the hand-over of the cipher RAM
// read port from decryption back to the display, stalled clocks of the divided
// datapath (clocks of a run beyond its enabled steps), and a start ignored while busy.
module chaos_cryptosystem_tb;
  import chaos_ref_pkg::*;

  localparam int AW = 8, DIV = 2, N = 256;

  logic clk = 1'b0;
  logic rst, start;
  logic [1:0] sw1, sw2, sw3, sw4;
  logic cipher_disp_en, plain_disp_en;
  logic [AW-1:0] cipher_disp_addr, plain_disp_addr;
  logic [15:0] cipher_disp_data, plain_disp_data;
  logic busy, enc_done, dec_done;
  int checks = 0, failures = 0;
  int n_sys [4], n_sw4 [4];
  int n_enc = 0, n_dec = 0, n_handover = 0, n_stall = 0, n_ignored = 0;

  always #5 clk = ~clk;

  chaos_cryptosystem #(.AW(AW), .DW(16), .DIV(DIV), .N_PIXELS(N)) dut (.*);

  always_ff @(posedge clk) begin
    if (enc_done) n_enc <= n_enc + 1;
    if (dec_done) n_dec <= n_dec + 1;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic run(int s1, int s2, int s3, int s4);
    key_model m;
    int cycles, same;
    sw1 = 2'(s1); sw2 = 2'(s2); sw3 = 2'(s3); sw4 = 2'(s4);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!dec_done && cycles < 20000) begin
      @(posedge clk); #1;
      cycles++;
      if (cycles == 700) begin              // during decryption: must be ignored
        start = 1'b1;
        n_ignored++;
      end else start = 1'b0;
    end
    start = 1'b0;
    // two passes of N + 4 enabled steps each: every further clock was a stall
    if (cycles > 2 * (N + 4)) n_stall += cycles - 2 * (N + 4);
    checks++;
    if (cycles < 2 * (N + 3) * DIV || cycles > 2 * (N + 5) * DIV + 4) fail($sformatf("run took %0d clocks", cycles));
    @(posedge clk); #1;
    checks++;
    if (busy) fail("busy after dec_done");
    // the cipher RAM port is back with the display
    m = new(s1, s2, s3, s4);
    same = 0;
    for (int a = 0; a < N; a++) begin
      logic [15:0] c_exp;
      c_exp = image_pixel(a) ^ 16'(m.next_key());
      cipher_disp_en = 1'b1; cipher_disp_addr = AW'(a);
      plain_disp_en = 1'b1; plain_disp_addr = AW'(a);
      @(posedge clk); #1;
      checks += 2;
      if (cipher_disp_data !== c_exp) fail($sformatf("cipher %0d: %h exp %h", a, cipher_disp_data, c_exp));
      if (plain_disp_data !== image_pixel(a)) fail($sformatf("plain %0d: %h exp %h", a, plain_disp_data, image_pixel(a)));
      if (cipher_disp_data == image_pixel(a)) same++;
    end
    cipher_disp_en = 1'b0; plain_disp_en = 1'b0;
    n_handover++;
    checks++;
    if (same > N / 10) fail($sformatf("%0d cipher pixels equal the plain ones", same));
    case (s4)
      1:       n_sys[s2]++;
      2:       n_sys[s3]++;
      default: n_sys[s1]++;
    endcase
    n_sw4[s4]++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    sw1 = '0; sw2 = '0; sw3 = '0; sw4 = '0;
    cipher_disp_en = 1'b0; cipher_disp_addr = '0; plain_disp_en = 1'b0; plain_disp_addr = '0;
    for (int i = 0; i < 4; i++) begin n_sys[i] = 0; n_sw4[i] = 0; end
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    run(0, 1, 2, 0);   // Lorenz x
    run(1, 2, 3, 1);   // Chen y
    run(2, 3, 0, 2);   // Lorenz z
    run(3, 0, 1, 3);   // Lu x through the 11 code
    run(1, 0, 0, 0);   // Rossler x
    $display("mechanisms: systems %0d %0d %0d %0d, sw4 %0d %0d %0d %0d, enc %0d dec %0d, handover %0d, stalls %0d, ignored starts %0d",
             n_sys[0], n_sys[1], n_sys[2], n_sys[3], n_sw4[0], n_sw4[1], n_sw4[2], n_sw4[3],
             n_enc, n_dec, n_handover, n_stall, n_ignored);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_sys[i] == 0) fail($sformatf("system %0d never selected", i));
      if (n_sw4[i] == 0) fail($sformatf("sw4 code %0d never used", i));
    end
    checks += 5;
    if (n_enc != 5) fail("encryption passes");
    if (n_dec != 5) fail("decryption passes");
    if (n_handover == 0) fail("no port hand-over");
    if (n_stall == 0) fail("no stalled clock");
    if (n_ignored == 0) fail("no ignored start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

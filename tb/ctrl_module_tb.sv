// ctrl_module_tb: runs passes of several lengths under a random clock enable
// and checks, step by step, the published order of a pass: key request k at
// step k, read of pixel k at step k+2, write of result k at step k+4, done one
// clock after the last write, the counts of each, busy, and that a start while
// busy is ignored.  Also runs one full 65536-pixel pass.
module ctrl_module_tb;
  logic clk = 1'b0;
  logic rst, ce, start;
  logic [16:0] n_pixels;
  logic clear, key_req, rd_en, wea, busy, done;
  logic [15:0] rd_addr, wr_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_module dut (.clk, .rst, .ce, .start, .n_pixels, .clear, .key_req, .rd_en, .rd_addr,
                   .wea, .wr_addr, .busy, .done);

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic run_pass(int n, bit random_ce);
    int step, n_req, n_rd, n_wr;
    bit seen_done;
    n_pixels = 17'(n);
    ce = 1'b0; start = 1'b1;
    #1;
    checks++;
    if (clear !== 1'b1) fail("clear on start");
    @(posedge clk); #1;
    start = 1'b0;
    step = 0; n_req = 0; n_rd = 0; n_wr = 0; seen_done = 0;
    while (!seen_done) begin
      ce = random_ce ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (step == 3 && ce) start = 1'b1;      // ignored: already busy
      #1;
      checks++;
      if (busy !== 1'b1) fail("busy during pass");
      if (key_req !== (step < n)) fail($sformatf("key_req at step %0d", step));
      if (ce) begin
        if (rd_en !== (step >= 2 && step < n + 2)) fail($sformatf("rd_en at step %0d", step));
        if (rd_en && rd_addr !== 16'(step - 2)) fail("rd_addr");
        if (wea !== (step >= 4 && step < n + 4)) fail($sformatf("wea at step %0d", step));
        if (wea && wr_addr !== 16'(step - 4)) fail("wr_addr");
        n_req += key_req; n_rd += rd_en; n_wr += wea;
      end else if (rd_en || wea) fail("memory access without ce");
      @(posedge clk); #1;
      start = 1'b0;
      if (ce) step++;
      if (done) begin
        seen_done = 1;
        checks++;
        if (step != n + 4 || busy) fail($sformatf("done at step %0d, n %0d", step, n));
      end
      if (step > n + 10) begin fail("no done"); seen_done = 1; end
    end
    checks++;
    if (n_req != n || n_rd != n || n_wr != n) fail($sformatf("counts %0d %0d %0d for %0d", n_req, n_rd, n_wr, n));
    @(posedge clk); #1;
    checks++;
    if (done || busy) fail("done not a pulse");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; start = 1'b0; n_pixels = 17'd1;
    @(posedge clk); #1;
    rst = 1'b0;
    run_pass(1, 0);
    run_pass(5, 1);
    run_pass(300, 1);
    run_pass(65536, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

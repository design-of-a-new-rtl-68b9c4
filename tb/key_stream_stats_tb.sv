// key_stream_stats_tb: statistical tests of the key stream, in the spirit of the
// ENT and NIST batteries.  The key generator runs at full rate (one key per
// clock) for 262144 keys; each key must match the reference stream.  The 16 key
// bits that the cipher uses (bits 15:0) form a 4-Mbit sequence, 524288 bytes,
// on which the testbench measures
//   ENT:  byte entropy, chi-square against uniform, arithmetic mean, Monte
//         Carlo estimate of pi (pairs of 24-bit words), serial correlation
//   NIST: frequency (monobit) test and runs test, with their P-values
// and checks each against a loose bound.  The byte statistics of the whole
// 32-bit word are printed too; its top bits follow the arcsine density of the
// logistic map and are not uniform, which is why the cipher uses the low bits.
module key_stream_stats_tb;
  import chaos_pkg::*;
  import chaos_ref_pkg::*;

  localparam int NK = 262144;

  logic clk = 1'b0;
  logic rst, ce, start;
  logic [31:0] key;
  logic key_vld;
  int checks = 0, failures = 0;
  int nk = 0;
  longint hist [256];
  longint hist_hi [256];
  byte unsigned bytes_q [$];
  key_model m;

  always #5 clk = ~clk;

  key_generator dut (.clk, .rst, .ce, .start, .sw1(SYS_LORENZ), .sw2(SYS_CHEN), .sw3(SYS_LU),
                     .sw4(VAR_X), .key, .key_vld);

  initial begin
    repeat (NK + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real entropy(input longint h [256], input real n);
    real e;
    e = 0;
    for (int i = 0; i < 256; i++)
      if (h[i] != 0) e -= (real'(h[i]) / n) * $ln(real'(h[i]) / n) / $ln(2.0);
    return e;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real erfc_approx(input real x);
    // Abramowitz-Stegun 7.1.26, x >= 0
    real t;
    t = 1.0 / (1.0 + 0.3275911 * x);
    return t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))))
           * $exp(-x * x);
  endfunction

  initial begin
    real n, chi, mean, ent, ent_hi, sc, pi_est, s_monobit, p_monobit, pi_ones, v_obs, p_runs;
    real sx, sxx, sxy, first_b, prev_b;
    longint ones, n_in, pairs, runs, nbits;
    bit prev_bit;
    int wrong;
    for (int i = 0; i < 256; i++) begin hist[i] = 0; hist_hi[i] = 0; end
    m = new(0, 2, 3, 0);
    rst = 1'b1; ce = 1'b1; start = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0; start = 1'b1;
    wrong = 0;
    while (nk < NK) begin
      @(posedge clk); #1;
      if (nk >= NK - 3) start = 1'b0;
      if (key_vld) begin
        if (key !== m.next_key()) wrong++;
        bytes_q.push_back(key[7:0]);
        bytes_q.push_back(key[15:8]);
        hist[key[7:0]]++; hist[key[15:8]]++;
        hist_hi[key[31:24]]++;
        nk++;
      end
    end
    checks++;
    if (wrong != 0) begin failures++; $display("FAIL %0d keys differ from the reference", wrong); end

    n = real'(bytes_q.size());
    ent = entropy(hist, n);
    ent_hi = entropy(hist_hi, real'(NK));
    chi = 0; mean = 0;
    for (int i = 0; i < 256; i++) begin
      chi += (real'(hist[i]) - n / 256.0) ** 2 / (n / 256.0);
      mean += real'(i) * real'(hist[i]);
    end
    mean /= n;
    // serial correlation of successive bytes (cyclic, as ENT)
    sx = 0; sxx = 0; sxy = 0;
    first_b = real'(bytes_q[0]); prev_b = first_b;
    for (int i = 0; i < bytes_q.size(); i++) begin
      real b;
      b = real'(bytes_q[i]);
      sx += b; sxx += b * b;
      if (i > 0) sxy += prev_b * b;
      prev_b = b;
    end
    sxy += prev_b * first_b;
    sc = (n * sxy - sx * sx) / (n * sxx - sx * sx);
    // Monte Carlo pi: 6 bytes -> (x, y), 24 bits each
    n_in = 0; pairs = 0;
    for (int i = 0; i + 5 < bytes_q.size(); i += 6) begin
      real x, y;
      x = real'({bytes_q[i], bytes_q[i + 1], bytes_q[i + 2]}) / 16777216.0;
      y = real'({bytes_q[i + 3], bytes_q[i + 4], bytes_q[i + 5]}) / 16777216.0;
      pairs++;
      if (x * x + y * y <= 1.0) n_in++;
    end
    pi_est = 4.0 * real'(n_in) / real'(pairs);
    // NIST frequency and runs tests on the bit sequence
    ones = 0; runs = 1; nbits = 0; prev_bit = bytes_q[0][0];
    foreach (bytes_q[i]) begin
      for (int b = 0; b < 8; b++) begin
        bit bt;
        bt = bytes_q[i][b];
        ones += bt;
        if (nbits > 0 && bt != prev_bit) runs++;
        prev_bit = bt;
        nbits++;
      end
    end
    s_monobit = fabs(2.0 * real'(ones) - real'(nbits)) / $sqrt(real'(nbits));
    p_monobit = erfc_approx(s_monobit / $sqrt(2.0));
    pi_ones = real'(ones) / real'(nbits);
    v_obs = real'(runs);
    p_runs = erfc_approx(fabs(v_obs - 2.0 * real'(nbits) * pi_ones * (1.0 - pi_ones)) /
                         (2.0 * $sqrt(2.0 * real'(nbits)) * pi_ones * (1.0 - pi_ones)));
    $display("key bits 15:0, %0d bytes: entropy %f bits/byte, chi-square %f, mean %f, pi %f (error %f %%), serial correlation %f",
             bytes_q.size(), ent, chi, mean, pi_est, 100.0 * fabs(pi_est - 3.14159265) / 3.14159265, sc);
    $display("NIST frequency P = %f, runs P = %f", p_monobit, p_runs);
    $display("key bits 31:24 entropy %f bits/byte (not used by the cipher)", ent_hi);
    checks += 7;
    if (ent < 7.999) begin failures++; $display("FAIL entropy"); end
    if (chi > 350.0) begin failures++; $display("FAIL chi-square"); end
    if (fabs(mean - 127.5) > 0.5) begin failures++; $display("FAIL mean"); end
    if (fabs(pi_est - 3.14159265) > 0.03) begin failures++; $display("FAIL pi"); end
    if (fabs(sc) > 0.01) begin failures++; $display("FAIL serial correlation"); end
    if (p_monobit < 0.001) begin failures++; $display("FAIL monobit"); end
    if (p_runs < 0.001) begin failures++; $display("FAIL runs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

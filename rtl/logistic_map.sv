// logistic_map: one iteration of the logistic map x(n+1) = r * x(n) * (1 - x(n))
// applied to the perturbing value x(n) from the pre-key generator.
//
// The 32-bit input xxin_V is read as an unsigned fraction in [0, 1) (Q0.32), so
// every bit of the pre-key counts.  x(1-x) is formed exactly at 64 bits and kept
// to 32 fraction bits, then multiplied by r, held as a Q4.28 constant (default
// 3.99, so that r/4 < 1 and the result never reaches 1).  The result xxout_V is
// the key word, Q0.32, registered on a clock with ap_ce and ap_start high, with
// xxout_V_ap_vld high for that enabled clock (latency one enabled clock).
//
// Port names follow the HLS block; r, the input scaling and the timing are this
// design's choices.
module logistic_map #(
  parameter logic [31:0] R = 32'd1071057469   // 3.99 * 2^28
) (
  input  logic        ap_clk,
  input  logic        ap_rst,
  input  logic        ap_ce,
  input  logic        ap_start,
  input  logic [31:0] xxin_V,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  output logic [31:0] xxout_V,
  output logic        xxout_V_ap_vld
);

  logic [32:0] one_minus_x;   // 1 - x, Q1.32 (equals 1.0 when x = 0)
  logic [64:0] p;             // x(1-x), Q1.64
  logic [63:0] q;             // r * x(1-x), Q4.60 after the shift below
  logic [31:0] next_x;

  always_comb begin
    one_minus_x = 33'h1_0000_0000 - {1'b0, xxin_V};
    p           = {33'b0, xxin_V} * {32'b0, one_minus_x};
    // p <= 2^62, so p[63:32] holds x(1-x) in Q0.32 (at most 2^30)
    q           = {32'b0, p[63:32]} * {32'b0, R};
    next_x      = q[59:28];
  end

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      xxout_V        <= '0;
      xxout_V_ap_vld <= 1'b0;
    end else if (ap_ce) begin
      xxout_V_ap_vld <= ap_start;
      if (ap_start) xxout_V <= next_x;
    end
  end

  assign ap_done  = xxout_V_ap_vld;
  assign ap_ready = xxout_V_ap_vld;
  assign ap_idle  = ~ap_start;

endmodule

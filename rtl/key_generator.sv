// key_generator: the chaos-based encryption key generator.
//
// pre-key generator (four chaotic systems + mixing rule) -> 32-bit register
// RTL_REG -> logistic map.  The pre-key x_n perturbs the logistic map, whose
// output x(n+1) is the key word K.  Each enabled clock (ce) with start high
// requests one key; key k appears on key with key_vld high three enabled clocks
// after its request (pre-key register, RTL_REG, logistic output register), and
// with start held high one key follows per enabled clock.  rst reloads the
// initial conditions of all systems, so the key stream is a fixed function of
// the selections sw1..sw4.
//
// The structure is the published one; the handshake between the stages (a valid
// bit travelling beside RTL_REG) is this design's.
module key_generator
  import chaos_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        start,
  input  sys_sel_e    sw1,
  input  sys_sel_e    sw2,
  input  sys_sel_e    sw3,
  input  var_sel_e    sw4,
  output logic [31:0] key,
  output logic        key_vld
);

  fix_t        x_V;
  logic        x_V_ap_vld;
  logic [31:0] pre_key;
  logic        pre_key_vld;
  logic        pk_done, pk_idle, pk_ready;
  logic        lg_done, lg_idle, lg_ready;

  pre_key_generator u_pre_key_generator (
    .ap_clk(clk), .ap_rst(rst), .ap_ce(ce), .ap_start(start),
    .sw1, .sw2, .sw3, .sw4,
    .ap_done(pk_done), .ap_idle(pk_idle), .ap_ready(pk_ready),
    .x_V, .x_V_ap_vld
  );

  pre_key_reg #(.WIDTH(32)) u_pre_key_reg (
    .clk, .rst, .ce(ce & x_V_ap_vld), .d(x_V), .q(pre_key)
  );

  always_ff @(posedge clk) begin
    if (rst)     pre_key_vld <= 1'b0;
    else if (ce) pre_key_vld <= x_V_ap_vld;
  end

  logistic_map u_logistic (
    .ap_clk(clk), .ap_rst(rst), .ap_ce(ce), .ap_start(pre_key_vld),
    .xxin_V(pre_key),
    .ap_done(lg_done), .ap_idle(lg_idle), .ap_ready(lg_ready),
    .xxout_V(key), .xxout_V_ap_vld(key_vld)
  );

  // a key leaves the generator only on an enabled clock's worth of valid data:
  // the valid bit can rise only when the clock enable allowed the stage to load
  a_vld_rises_on_ce: assert property (@(posedge clk) disable iff (rst) $rose(key_vld) |-> $past(ce));

endmodule

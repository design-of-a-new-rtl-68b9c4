// ctrl_module: sequencer of one pass of the cipher over an image.
//
// A start pulse (any clock) clears the key generator (clear, same clock) and
// starts a step counter t that advances on every clock with ce high.  From t the
// module derives, for pixels k = 0 .. n_pixels-1:
//   key_req  during t = k               key k requested from the key generator
//   rd_en    at      t = k + KEY_LEAD   pixel k read from the source memory
//   wea      at      t = k + KEY_LAT+1  result k written to the frame RAM
// with KEY_LEAD = KEY_LAT - SRC_LAT, so key k and pixel k reach the XOR stage
// in the same enabled clock (key latency KEY_LAT = 3, memory latency SRC_LAT = 1,
// XOR register 1).  rd_en and wea already include ce.  done pulses for one clock
// after the last write; busy is high from start to done.  The address adders and
// the end-of-image compare play the part of the adder, comparator and address
// register of the published decryption schematic.  The sequencing itself is
// this design's own.  Two assertions state the rules of the schedule.
module ctrl_module #(
  parameter int AW      = 16,
  parameter int KEY_LAT = 3,
  parameter int SRC_LAT = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  logic          start,
  input  logic [AW:0]   n_pixels,
  output logic          clear,
  output logic          key_req,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          wea,
  output logic [AW-1:0] wr_addr,
  output logic          busy,
  output logic          done
);

  localparam int TW       = AW + 3;
  localparam int KEY_LEAD = KEY_LAT - SRC_LAT;
  localparam int WR_LAG   = KEY_LAT + 1;

  logic [TW-1:0] t, n, rd_t, wr_t;
  logic          last;

  always_comb begin
    n       = TW'(n_pixels);
    rd_t    = t - TW'(KEY_LEAD);
    wr_t    = t - TW'(WR_LAG);
    clear   = start & ~busy;
    key_req = busy & (t < n);
    rd_en   = ce & busy & (t >= TW'(KEY_LEAD)) & (rd_t < n);
    rd_addr = rd_t[AW-1:0];
    wea     = ce & busy & (t >= TW'(WR_LAG)) & (wr_t < n);
    wr_addr = wr_t[AW-1:0];
    last    = (wr_t == n - 1'b1);
  end

  // memory accesses happen only on enabled clocks and only inside a pass;
  // done ends the pass
  a_access_in_pass: assert property (@(posedge clk) disable iff (rst) (rd_en | wea) |-> (ce & busy));
  a_done_ends_pass: assert property (@(posedge clk) disable iff (rst) done |-> !busy);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        busy <= 1'b1;
        t    <= '0;
      end else if (busy && ce) begin
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        t <= t + 1'b1;
      end
    end
  end

endmodule

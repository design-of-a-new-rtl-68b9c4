// pre_key_reg: the 32-bit register (C, CE, D, Q) between the pre-key generator
// and the logistic map.  It captures D on a rising clock while CE is high and
// holds it otherwise, so the logistic map always sees a stable pre-key.
// Synchronous reset to zero is this design's addition.
module pre_key_reg #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= d;
  end

endmodule

// div_clk: clock divider for the cipher datapath, made as a clock enable.
// ce is high for one clock in every DIV clocks (always high for DIV = 1); every
// register of the datapath advances only on those clocks, which equals clocking
// it with the divided clock while keeping a single clock domain.  The ratio
// DIV = 2 is this design's choice.
module div_clk #(
  parameter int DIV = 2
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);

  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || cnt == CW'(DIV - 1)) cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end

  assign ce = (cnt == CW'(DIV - 1));

endmodule

// frame_ram: simple dual-port image memory, 2^AW words of DW bits, one clock.
// Port a writes dina at addra when wea is high; port b reads addrb when enb is
// high and presents the word on doutb one clock later (held otherwise).  A read
// and a write of the same address in one clock return the old word.
module frame_ram #(
  parameter int AW = 16,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  input  logic          enb,
  input  logic [AW-1:0] addrb,
  output logic [DW-1:0] doutb
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wea) mem[addra] <= dina;
  end

  always_ff @(posedge clk) begin
    if (enb) doutb <= mem[addrb];
  end

endmodule

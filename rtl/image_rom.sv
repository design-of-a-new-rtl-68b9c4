// image_rom: read-only image memory, 2^AW pixels of DW bits, one synchronous
// read per clock with ena high (data on douta one clock later, held otherwise).
//
// The memory is filled at start-up from a formula giving a synthetic, strongly
// correlated test image (a smooth gradient with a checkerboard), since a real
// picture is not part of this design.  For address a, with row = a / 256 and
// col = a % 256 (8 bits each):
//     pixel[15:8] = (row + col) mod 256        diagonal gradient
//     pixel[7:0]  = row xor (64 if bit 5 of row differs from bit 5 of col)
// truncated to DW bits.  Replace image_pixel() or the initial block to load a
// real image.
module image_rom #(
  parameter int AW = 16,
  parameter int DW = 16
) (
  input  logic          clka,
  input  logic          ena,
  input  logic [AW-1:0] addra,
  output logic [DW-1:0] douta
);

  logic [DW-1:0] mem [2**AW];

  function automatic logic [DW-1:0] image_pixel(input int unsigned a);
    logic [7:0]  row, col;
    logic [15:0] pix;
    row = 8'((a >> 8) & 32'hFF);
    col = 8'(a & 32'hFF);
    pix[15:8] = row + col;
    pix[7:0]  = row ^ ((row[5] ^ col[5]) ? 8'h40 : 8'h00);
    return DW'(pix);
  endfunction

  initial begin
    for (int unsigned a = 0; a < 2**AW; a++) mem[a] = image_pixel(a);
  end

  always_ff @(posedge clka) begin
    if (ena) douta <= mem[addra];
  end

endmodule

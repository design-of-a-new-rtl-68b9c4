// otp_xor: the one-time-pad stage used for both directions.
//
// Encryption c(k) = m(k) xor K(k) and decryption m(k) = c(k) xor K(k) are the
// same operation, so one module serves as the encryption and the decryption
// unit.  The DW-bit pixel datain is XORed with the low DW bits of the 32-bit key
// x_logis and registered on each clock with ce high (latency one enabled clock).
// Which key bits are used is this design's choice.
module otp_xor #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [DW-1:0] datain,
  input  logic [31:0]   x_logis,
  output logic [DW-1:0] dout
);

  always_ff @(posedge clk) begin
    if (ce) dout <= datain ^ x_logis[DW-1:0];
  end

endmodule

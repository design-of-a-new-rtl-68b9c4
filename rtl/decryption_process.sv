// decryption_process: the decryption half of the cryptosystem.
//
// On start the cipher image is read pixel by pixel through the source port
// (src_en, src_addr -> src_data one clock later, e.g. the frame RAM of the
// encryption process), each pixel is XORed with the regenerated key stream and
// the recovered pixel is written to this block's frame RAM.  Timing is that of
// encryption_process: one pixel per enabled clock of div_clk, N + 4 enabled
// clocks per pass, key generator reset at every start.  With the same
// selections sw1..sw4 the key streams of both halves are identical, so the
// recovered image equals the plain image.  disp_* reads the recovered image.
//
// Structure: source memory -> decryption (otp_xor) -> RAM, with ctrl_module,
// div_clk and key_generator, as in the published decryption schematic.
module decryption_process
  import chaos_pkg::*;
#(
  parameter int AW  = 16,
  parameter int DW  = 16,
  parameter int DIV = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW:0]   n_pixels,
  input  sys_sel_e      sw1,
  input  sys_sel_e      sw2,
  input  sys_sel_e      sw3,
  input  var_sel_e      sw4,
  output logic          src_en,
  output logic [AW-1:0] src_addr,
  input  logic [DW-1:0] src_data,
  input  logic          disp_en,
  input  logic [AW-1:0] disp_addr,
  output logic [DW-1:0] disp_data,
  output logic          busy,
  output logic          done
);

  logic          ce, clear, key_req, wea;
  logic [AW-1:0] wr_addr;
  logic [31:0]   key;
  logic          key_vld;
  logic [DW-1:0] plain;

  div_clk #(.DIV(DIV)) u_div_clk (.clk, .rst, .ce);

  ctrl_module #(.AW(AW)) u_ctrl (
    .clk, .rst, .ce, .start, .n_pixels,
    .clear, .key_req, .rd_en(src_en), .rd_addr(src_addr), .wea, .wr_addr, .busy, .done
  );

  key_generator u_keygen (
    .clk, .rst(rst | clear), .ce, .start(key_req),
    .sw1, .sw2, .sw3, .sw4, .key, .key_vld
  );

  otp_xor #(.DW(DW)) u_decryption (
    .clk, .ce(ce & key_vld), .datain(src_data), .x_logis(key), .dout(plain)
  );

  frame_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .wea, .addra(wr_addr), .dina(plain),
    .enb(disp_en), .addrb(disp_addr), .doutb(disp_data)
  );

endmodule

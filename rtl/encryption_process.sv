// encryption_process: the encryption half of the cryptosystem.
//
// On start the plain image is read pixel by pixel from the image ROM, each
// pixel is XORed with the next key word of the chaos-based key generator, and
// the cipher pixel is written to the frame RAM at the same address.  The whole
// datapath runs on the clock enable of div_clk; one pixel is processed per
// enabled clock, and a pass over N pixels takes N + 4 enabled clocks.  The key
// generator is reset to its initial conditions at every start, so each pass uses
// the same key stream for a given sw1..sw4 (this is what lets the decryption
// process regenerate it).  The RAM's second port (disp_*) lets a display read
// the cipher image; done pulses when the pass is complete.
//
// Structure: ROM -> encryption (otp_xor) -> RAM, with ctrl_module, div_clk and
// key_generator, as in the published encryption schematic.
module encryption_process
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
  input  logic          disp_en,
  input  logic [AW-1:0] disp_addr,
  output logic [DW-1:0] disp_data,
  output logic          busy,
  output logic          done
);

  logic          ce, clear, key_req, rd_en, wea;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0]   key;
  logic          key_vld;
  logic [DW-1:0] plain, cipher;

  div_clk #(.DIV(DIV)) u_div_clk (.clk, .rst, .ce);

  ctrl_module #(.AW(AW)) u_ctrl (
    .clk, .rst, .ce, .start, .n_pixels,
    .clear, .key_req, .rd_en, .rd_addr, .wea, .wr_addr, .busy, .done
  );

  key_generator u_keygen (
    .clk, .rst(rst | clear), .ce, .start(key_req),
    .sw1, .sw2, .sw3, .sw4, .key, .key_vld
  );

  image_rom #(.AW(AW), .DW(DW)) u_rom (
    .clka(clk), .ena(rd_en), .addra(rd_addr), .douta(plain)
  );

  otp_xor #(.DW(DW)) u_encryption (
    .clk, .ce(ce & key_vld), .datain(plain), .x_logis(key), .dout(cipher)
  );

  frame_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .wea, .addra(wr_addr), .dina(cipher),
    .enb(disp_en), .addrb(disp_addr), .doutb(disp_data)
  );

endmodule

// chaos_cryptosystem: image stream cipher with a chaos-based key generator,
// encryption and decryption side by side.
//
// A start pulse runs the encryption process over the first N_PIXELS pixels of
// the image ROM, writing the cipher image into its frame RAM; when it is done
// the decryption process starts by itself, reads the cipher image back from
// that RAM, regenerates the same key stream and writes the recovered image into
// its own frame RAM.  Both key generators use the selections sw1..sw4, which
// must stay constant during a run.  enc_done and dec_done pulse at the end of
// each pass; busy is high from start until dec_done, and a start while busy
// is ignored.
//
// While no decryption is running, port b of the cipher RAM belongs to the
// cipher display port (cipher_disp_*); the recovered image is always readable
// on plain_disp_*.  These ports stand for the display of the published system,
// which is not part of this RTL.  Read data appears one clock after the address.
//
// A pass takes (N_PIXELS + 4) * DIV clocks plus one to start, so a full run
// about 2 * (N_PIXELS + 4) * DIV clocks.
module chaos_cryptosystem
  import chaos_pkg::*;
#(
  parameter int AW       = 16,
  parameter int DW       = 16,
  parameter int DIV      = 2,
  parameter int N_PIXELS = 2**AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [1:0]    sw1,
  input  logic [1:0]    sw2,
  input  logic [1:0]    sw3,
  input  logic [1:0]    sw4,
  input  logic          cipher_disp_en,
  input  logic [AW-1:0] cipher_disp_addr,
  output logic [DW-1:0] cipher_disp_data,
  input  logic          plain_disp_en,
  input  logic [AW-1:0] plain_disp_addr,
  output logic [DW-1:0] plain_disp_data,
  output logic          busy,
  output logic          enc_done,
  output logic          dec_done
);

  localparam logic [AW:0] N = (AW + 1)'(N_PIXELS);

  logic          enc_busy, dec_busy, enc_start;
  logic          src_en;
  logic [AW-1:0] src_addr;
  logic          cram_en;
  logic [AW-1:0] cram_addr;
  logic [DW-1:0] cram_data;

  encryption_process #(.AW(AW), .DW(DW), .DIV(DIV)) u_encryption (
    .clk, .rst, .start(enc_start), .n_pixels(N),
    .sw1(sys_sel_e'(sw1)), .sw2(sys_sel_e'(sw2)), .sw3(sys_sel_e'(sw3)), .sw4(var_sel_e'(sw4)),
    .disp_en(cram_en), .disp_addr(cram_addr), .disp_data(cram_data),
    .busy(enc_busy), .done(enc_done)
  );

  decryption_process #(.AW(AW), .DW(DW), .DIV(DIV)) u_decryption (
    .clk, .rst, .start(enc_done), .n_pixels(N),
    .sw1(sys_sel_e'(sw1)), .sw2(sys_sel_e'(sw2)), .sw3(sys_sel_e'(sw3)), .sw4(var_sel_e'(sw4)),
    .src_en, .src_addr, .src_data(cram_data),
    .disp_en(plain_disp_en), .disp_addr(plain_disp_addr), .disp_data(plain_disp_data),
    .busy(dec_busy), .done(dec_done)
  );

  // cipher RAM read port: the decryption process while it runs, else the display
  always_comb begin
    if (dec_busy) begin
      cram_en   = src_en;
      cram_addr = src_addr;
    end else begin
      cram_en   = cipher_disp_en;
      cram_addr = cipher_disp_addr;
    end
  end

  // a start is taken only when the whole system is idle
  assign enc_start        = start & ~busy;
  assign cipher_disp_data = cram_data;
  assign busy             = enc_busy | enc_done | dec_busy;

endmodule

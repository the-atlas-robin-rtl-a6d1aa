// crc32: CRC-32 (IEEE 802.3 polynomial 0x04C11DB7, reflected, init all ones)
// with a byte-wide and a word-wide update.
//
// The input handler uses it to compute a check value over every fragment,
// which is appended to the fragment in the buffer; the GbE MACs use it for
// the Ethernet frame check sequence. The polynomial is this design's choice
// for the fragment CRC. Per clock the register takes either one byte
// (byte_en) or one 32-bit word (word_en, least significant byte first);
// init reloads all ones. crc is the running register; crc_out is its
// complement, the value that is stored or transmitted.
module crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        byte_en,
  input  logic [7:0]  byte_in,
  input  logic        word_en,
  input  logic [31:0] word_in,
  output logic [31:0] crc,
  output logic [31:0] crc_out
);
  localparam logic [31:0] POLY_R = 32'hEDB88320;

  function automatic logic [31:0] upd_byte(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c ^ {24'h0, d};
    for (int i = 0; i < 8; i++) r = r[0] ? ((r >> 1) ^ POLY_R) : (r >> 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc <= '1;
    else if (init) crc <= '1;
    else if (word_en)
      crc <= upd_byte(upd_byte(upd_byte(upd_byte(crc, word_in[7:0]), word_in[15:8]),
                               word_in[23:16]), word_in[31:24]);
    else if (byte_en) crc <= upd_byte(crc, byte_in);
  end

  assign crc_out = ~crc;
endmodule

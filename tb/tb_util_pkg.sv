// tb_util_pkg: reference functions shared by the testbenches.
//
// crc32_step/crc32_word give the CRC-32 of IEEE 802.3 (reflected polynomial
// 0xEDB88320, register starting at all ones, result complemented), written
// bit by bit from the definition so that it is independent of the RTL's
// loop. The standard check value crc("123456789") = 0xCBF43926 is verified
// by tb_crc32 against both.
package tb_util_pkg;
  function automatic logic [31:0] crc32_step(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = r[0] ^ d[i];
      r = {1'b0, r[31:1]};
      if (fb) r = r ^ 32'hEDB88320;
    end
    return r;
  endfunction

  // CRC register after a list of 32-bit words, each least significant byte first
  function automatic logic [31:0] crc32_words(input logic [31:0] w[$]);
    logic [31:0] c;
    c = '1;
    foreach (w[i]) for (int b = 0; b < 4; b++) c = crc32_step(c, w[i][8*b +: 8]);
    return ~c;
  endfunction

  function automatic logic [31:0] crc32_bytes(input logic [7:0] d[$]);
    logic [31:0] c;
    c = '1;
    foreach (d[i]) c = crc32_step(c, d[i]);
    return ~c;
  endfunction
endpackage

// tb_crc32: checks the CRC-32 against the standard check value of
// "123456789" (0xCBF43926), against the bitwise reference for random byte
// and word sequences, the word path against four byte steps, and the
// Ethernet residue 0xDEBB20E3 after a frame plus its own check sequence.
module tb_crc32;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init, byte_en, word_en;
  logic [7:0] byte_in;
  logic [31:0] word_in, crc, crc_out;
  int checks = 0, failures = 0;

  crc32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_init();
    @(negedge clk); init = 1; @(negedge clk); init = 0;
  endtask

  task automatic send_byte(input logic [7:0] b);
    byte_en = 1; byte_in = b; @(negedge clk); byte_en = 0;
  endtask

  initial begin
    logic [7:0] s[$];
    logic [31:0] w[$];
    string str;
    init = 0; byte_en = 0; word_en = 0; byte_in = 0; word_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    str = "123456789";
    do_init();
    for (int i = 0; i < str.len(); i++) send_byte(str[i]);
    check(crc_out == 32'hCBF43926, "check value of 123456789");
    s = {};
    for (int i = 0; i < str.len(); i++) s.push_back(str[i]);
    check(crc32_bytes(s) == 32'hCBF43926, "reference function check value");
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom_range(1, 40);
      s = {};
      do_init();
      for (int i = 0; i < n; i++) begin
        s.push_back(8'($urandom));
        send_byte(s[i]);
      end
      check(crc_out == crc32_bytes(s), "random bytes");
      // append the FCS, LSB first: register must show the residue
      begin
        logic [31:0] fcs;
        fcs = crc_out;
        for (int b = 0; b < 4; b++) send_byte(fcs[8*b +: 8]);
      end
      check(crc == 32'hDEBB20E3, "residue");
    end
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom_range(1, 20);
      w = {};
      do_init();
      for (int i = 0; i < n; i++) begin
        w.push_back($urandom);
        word_en = 1; word_in = w[i]; @(negedge clk); word_en = 0;
      end
      check(crc_out == crc32_words(w), "random words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gbe_rx_mac: sends GMII frames (preamble, delimiter, payload, FCS from
// the reference CRC) and checks that the payload comes out without
// preamble and FCS, that good frames are marked good, and that a corrupted
// FCS, an rx_er byte and a frame under 64 bytes are marked bad.
module tb_gbe_rx_mac;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rxd, out_data;
  logic rx_dv, rx_er, out_valid, out_sof, out_eof, out_good;
  logic [15:0] crc_err_count;
  int checks = 0, failures = 0;

  gbe_rx_mac dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] got[$];
  bit sof_seen, eof_seen, good_seen;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      if (out_sof) begin got = {}; sof_seen = 1; end
      got.push_back(out_data);
    end
    if (out_eof) begin eof_seen = 1; good_seen = out_good; end
  end

  task automatic frame(input int n, input bit bad_fcs, input bit er, input bit exp_good, input string tag);
    logic [7:0] p[$];
    logic [31:0] fcs;
    for (int i = 0; i < n; i++) p.push_back(8'($urandom));
    fcs = crc32_bytes(p);
    if (bad_fcs) fcs ^= 32'h100;
    sof_seen = 0; eof_seen = 0;
    for (int i = 0; i < 7; i++) begin @(negedge clk); rx_dv = 1; rxd = 8'h55; end
    @(negedge clk); rxd = 8'hD5;
    foreach (p[i]) begin @(negedge clk); rxd = p[i]; rx_er = er && (i == 5); end
    for (int b = 0; b < 4; b++) begin @(negedge clk); rxd = fcs[8*b +: 8]; rx_er = 0; end
    @(negedge clk); rx_dv = 0;
    repeat (14) @(negedge clk);
    check(sof_seen && eof_seen, {tag, ": frame seen"});
    check(good_seen == exp_good, {tag, ": good flag"});
    check(got.size() == n, $sformatf("%s: %0d bytes out of %0d", tag, got.size(), n));
    if (got.size() == n) foreach (p[i]) check(got[i] == p[i], {tag, ": byte"});
  endtask

  initial begin
    rxd = 0; rx_dv = 0; rx_er = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(60, 0, 0, 1, "min");
    frame(300, 0, 0, 1, "long");
    frame(100, 1, 0, 0, "bad fcs");
    frame(100, 0, 1, 0, "rx_er");
    frame(40, 0, 0, 0, "runt");
    frame(1514, 0, 0, 1, "max");
    check(crc_err_count == 1, "crc error count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

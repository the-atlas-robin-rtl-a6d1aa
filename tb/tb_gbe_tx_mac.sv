// tb_gbe_tx_mac: pushes frames as word streams (with a 16-bit final header
// word in one of them) into the transmit MAC and decodes GMII: checks
// preamble and delimiter, payload bytes, zero padding to 60 bytes, the FCS
// against the reference CRC, the inter-frame gap, and a PAUSE frame (with
// quanta on request, zero on release) when the flow-control request changes.
module tb_gbe_tx_mac;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready, fc_req, tx_en;
  logic [31:0] in_data, frame_count, pause_count;
  logic [3:0] in_keep;
  logic [7:0] txd;
  int checks = 0, failures = 0;

  gbe_tx_mac #(.FIFO_D(512), .SRC_MAC(48'h0200_0000_0001), .PAUSE_QUANTA(16'h1234)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GMII capture
  typedef logic [7:0] bytes_t[$];
  bytes_t frames[$];
  logic [7:0] cur[$];
  bit en_q;
  int gap = 0, min_gap = 1000;
  always @(posedge clk) if (rst_n) begin
    if (tx_en) begin
      if (!en_q && gap < min_gap && frames.size() > 0) min_gap = gap;
      cur.push_back(txd);
      gap = 0;
    end else begin
      gap++;
      if (en_q) begin frames.push_back(cur); cur = {}; end
    end
    en_q = tx_en;
  end

  bytes_t expect_q[$];

  task automatic send(input int nbytes, input bit half_end);  // half_end: nbytes % 4 == 2
    logic [7:0] p[$];
    int nw;
    for (int i = 0; i < nbytes; i++) p.push_back(8'($urandom));
    nw = (nbytes + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_last = (w == nw - 1);
      in_keep = 4'hF;
      if (w == nw - 1 && nbytes % 4 != 0) in_keep = 4'((1 << (nbytes % 4)) - 1);
      for (int b = 0; b < 4; b++) in_data[8*b +: 8] = (4*w + b < nbytes) ? p[4*w + b] : 8'hEE;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    expect_q.push_back(p);
  endtask

  function automatic bytes_t pad(input bytes_t p);
    bytes_t r;
    r = p;
    while (r.size() < 60) r.push_back(8'h00);
    return r;
  endfunction

  task automatic check_frame(input bytes_t f, input bytes_t body, input string tag);
    bytes_t b;
    logic [31:0] fcs;
    b = pad(body);
    check(f.size() == 8 + b.size() + 4, $sformatf("%s: length %0d", tag, f.size()));
    if (f.size() != 8 + b.size() + 4) return;
    for (int i = 0; i < 7; i++) check(f[i] == 8'h55, {tag, ": preamble"});
    check(f[7] == 8'hD5, {tag, ": SFD"});
    foreach (b[i]) check(f[8 + i] == b[i], $sformatf("%s: byte %0d", tag, i));
    fcs = crc32_bytes(b);
    for (int k = 0; k < 4; k++) check(f[8 + b.size() + k] == fcs[8*k +: 8], {tag, ": FCS"});
  endtask

  function automatic bytes_t pause_body(input logic [15:0] q);
    bytes_t r;
    r = '{8'h01, 8'h80, 8'hC2, 8'h00, 8'h00, 8'h01, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01,
          8'h88, 8'h08, 8'h00, 8'h01, q[15:8], q[7:0]};
    return r;
  endfunction

  initial begin
    bytes_t p;
    in_valid = 0; in_last = 0; in_keep = 0; in_data = 0; fc_req = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(100, 0);
    send(30, 0);                        // padded
    send(62, 1);                        // last word carries 16 bits
    send(1500, 0);
    repeat (3000) @(negedge clk);
    fc_req = 1;
    repeat (200) @(negedge clk);
    fc_req = 0;
    repeat (200) @(negedge clk);
    check(frames.size() == 6, $sformatf("frames seen %0d", frames.size()));
    if (frames.size() == 6) begin
      for (int i = 0; i < 4; i++) begin
        p = expect_q[i];
        check_frame(frames[i], p, $sformatf("frame %0d", i));
      end
      check_frame(frames[4], pause_body(16'h1234), "pause on");
      check_frame(frames[5], pause_body(16'h0000), "pause off");
    end
    check(min_gap >= 12, $sformatf("inter-frame gap %0d", min_gap));
    check(frame_count == 4 && pause_count == 2, "frame and pause counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

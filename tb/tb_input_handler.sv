// tb_input_handler: drives link words into the input handler with a 1:1
// alternating write grant, a free page FIFO model and a used page FIFO
// model, and checks every buffer word, the appended CRC, each page record
// (page number, length, L1ID, run number, status bits) and the write rate
// of one word per two cycles. Cases: single-page, multi-page and exactly
// page-sized fragments, 1 kB and 2 kB pages, length mismatch, wrong marker,
// truncated fragment, junk outside fragments, empty FPF and full UPF stalls.
module tb_input_handler;
  import robin_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 20;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_page_log2;
  logic in_valid, in_pop, fpf_empty, fpf_pop, upf_full, upf_push;
  link_word_t in_word;
  logic [PAGE_NUM_W-1:0] fpf_page;
  upf_record_t upf_rec;
  logic wr_valid, wr_ready;
  logic [AW-1:0] wr_addr;
  logic [31:0] wr_data, frag_count;
  int checks = 0, failures = 0;

  input_handler #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  link_word_t lq[$];
  logic [15:0] fq[$];
  upf_record_t uq[$];
  logic [31:0] mem [logic [AW-1:0]];
  bit hold_upf;
  int cyc = 0;
  int wr_times[$];

  // model outputs are refreshed at the falling edge, after the queues moved
  always @(negedge clk) begin
    in_valid  = lq.size() > 0;
    in_word   = (lq.size() > 0) ? lq[0] : '0;
    fpf_empty = fq.size() == 0;
    fpf_page  = (fq.size() > 0) ? fq[0] : '0;
    upf_full  = hold_upf;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) wr_ready <= 1'b1; else wr_ready <= !wr_ready;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_pop) void'(lq.pop_front());
    if (fpf_pop) void'(fq.pop_front());
    if (upf_push) uq.push_back(upf_rec);
    if (wr_valid && wr_ready) begin
      mem[wr_addr] = wr_data;
      wr_times.push_back(cyc);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void make_frag(output logic [31:0] w[$], input int n, input logic [31:0] l1id,
                                    input logic [31:0] len_field, input logic [31:0] marker);
    w = {};
    w.push_back(marker);
    w.push_back(len_field);
    w.push_back(32'h0000_0777);
    w.push_back(l1id);
    for (int i = 4; i < n; i++) w.push_back($urandom);
  endfunction

  task automatic send(input logic [31:0] w[$], input bit eof = 1);
    lq.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_BOF, 16'h0}});
    foreach (w[i]) lq.push_back('{err: 1'b0, ctrl: 1'b0, data: w[i]});
    if (eof) lq.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_EOF, 16'h0}});
  endtask

  task automatic wait_idle();
    int t, quiet;
    t = 0;
    quiet = 0;
    // idle: link queue drained and no buffer write or record for 20 cycles
    while (quiet < 20 && t < 200000) begin
      @(posedge clk);
      t++;
      quiet = (lq.size() > 0 || (wr_valid && wr_ready) || upf_push) ? 0 : quiet + 1;
    end
  endtask

  // check the records and the buffer contents of one fragment
  task automatic check_frag(input logic [31:0] w[$], input int lg, input logic [15:0] pages[$],
                            input bit exp_len_err, input bit exp_marker_err, input bit exp_trunc,
                            input string tag);
    int total, p, left, k, idx;
    logic [31:0] crc;
    logic [31:0] all[$];
    total = w.size() + 1;
    p = 1 << lg;
    crc = crc32_words(w);
    all = w;
    all.push_back(crc);
    left = total;
    k = 0;
    idx = 0;
    while (left > 0) begin
      upf_record_t r;
      int len;
      len = (left > p) ? p : left;
      check(uq.size() > 0, {tag, ": record present"});
      if (uq.size() == 0) return;
      r = uq.pop_front();
      check(r.page_num == pages[k], $sformatf("%s: page %0d number", tag, k));
      check(r.page_len == 16'(len), $sformatf("%s: page %0d length %0d/%0d", tag, k, r.page_len, len));
      check(r.status.first_page == (k == 0), {tag, ": first flag"});
      check(r.status.last_page == (left == len), {tag, ": last flag"});
      check(r.status.crc_appended == (left == len), {tag, ": crc flag"});
      check(r.status.bad_marker == exp_marker_err, {tag, ": marker flag"});
      check(!r.status.link_error, {tag, ": no link error"});
      if (left == len) begin
        check(r.status.len_mismatch == exp_len_err, {tag, ": length flag"});
        check(r.status.truncated == exp_trunc, {tag, ": truncated flag"});
        check(r.l1id == w[3] && r.run_number == w[2], {tag, ": l1id/run"});
      end
      for (int i = 0; i < len; i++) begin
        logic [AW-1:0] a;
        a = AW'((32'(pages[k]) << lg) + 32'(i));
        check(mem.exists(a) && mem[a] == all[idx], $sformatf("%s: word %0d", tag, idx));
        idx++;
      end
      left -= len;
      k++;
    end
  endtask

  initial begin
    logic [31:0] w[$], w2[$];
    logic [15:0] pg[$];
    cfg_page_log2 = 4'd8;
    hold_upf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A: short fragment, one page, and rate check
    fq = {16'd5, 16'd9, 16'd2, 16'd7, 16'd11, 16'd3, 16'd12, 16'd13, 16'd14, 16'd15};
    make_frag(w, 100, 32'h0100_0001, 32'd100, HDR_MARKER);
    wr_times = {};
    send(w);
    wait_idle();
    check_frag(w, 8, '{16'd5}, 0, 0, 0, "A");
    check(wr_times.size() == 101, "A: write count");
    check(wr_times[100] - wr_times[0] == 200, $sformatf("A: one word per two cycles (%0d)",
                                                       wr_times[100] - wr_times[0]));

    // B: three pages
    make_frag(w, 600, 32'h0100_0002, 32'd600, HDR_MARKER);
    send(w);
    wait_idle();
    check_frag(w, 8, '{16'd9, 16'd2, 16'd7}, 0, 0, 0, "B");

    // C: exactly one page of data, CRC goes to a new page
    make_frag(w, 256, 32'h0100_0003, 32'd256, HDR_MARKER);
    send(w);
    wait_idle();
    check_frag(w, 8, '{16'd11, 16'd3}, 0, 0, 0, "C");

    // D: length field disagrees; E: wrong marker
    make_frag(w, 40, 32'h0100_0004, 32'd50, HDR_MARKER);
    send(w);
    wait_idle();
    check_frag(w, 8, '{16'd12}, 1, 0, 0, "D");
    make_frag(w, 20, 32'h0100_0005, 32'd20, 32'h12345678);
    send(w);
    wait_idle();
    check_frag(w, 8, '{16'd13}, 0, 1, 0, "E");

    // F: junk outside fragments, then a truncated fragment followed by a good one
    lq.push_back('{err: 1'b0, ctrl: 1'b0, data: 32'hDEAD0000});
    lq.push_back('{err: 1'b0, ctrl: 1'b0, data: 32'hDEAD0001});
    make_frag(w, 10, 32'h0100_0006, 32'd10, HDR_MARKER);
    make_frag(w2, 30, 32'h0100_0007, 32'd30, HDR_MARKER);
    send(w, 0);
    send(w2);
    wait_idle();
    check_frag(w, 8, '{16'd14}, 0, 0, 1, "F1");
    check_frag(w2, 8, '{16'd15}, 0, 0, 0, "F2");
    check(uq.size() == 0, "no extra records");

    // G: FPF empty stall, then 2 kB pages and a UPF-full stall
    cfg_page_log2 = 4'd9;
    make_frag(w, 700, 32'h0100_0008, 32'd700, HDR_MARKER);
    mem.delete();
    send(w);
    repeat (50) @(posedge clk);
    check(mem.size() == 0, "G: nothing written without a free page");
    check(lq.size() > 0, "G: link input stalled");
    hold_upf = 1;
    fq = {16'd20, 16'd21};
    repeat (2000) @(posedge clk);
    check(uq.size() == 0, "G: no record while UPF full");
    check(lq.size() > 0 && mem.size() == 512, "G: input stalls after the first page");
    hold_upf = 0;
    wait_idle();
    check_frag(w, 9, '{16'd20, 16'd21}, 0, 0, 0, "G");
    check(frag_count == 8, $sformatf("fragment count %0d", frag_count));

    // H: a link error flagged on word 300 of a 600-word fragment in 1 kB
    // pages: the flagged word lies in page 1 (words 256..511), so the
    // records of pages 1 and 2 carry the error and page 0 does not
    cfg_page_log2 = 4'd8;
    fq = {16'd30, 16'd31, 16'd32};
    make_frag(w, 600, 32'h0100_0009, 32'd600, HDR_MARKER);
    lq.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_BOF, 16'h0}});
    foreach (w[i]) lq.push_back('{err: (i == 300), ctrl: 1'b0, data: w[i]});
    lq.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_EOF, 16'h0}});
    wait_idle();
    check(uq.size() == 3, $sformatf("H: three records (%0d)", uq.size()));
    if (uq.size() == 3) begin
      check(!uq[0].status.link_error, "H: page before the error clean");
      check(uq[1].status.link_error, "H: page with the error flagged");
      check(uq[2].status.link_error && uq[2].status.last_page && !uq[2].status.len_mismatch,
            "H: later page flagged, length right");
    end
    uq = {};
    check(frag_count == 9, $sformatf("fragment count %0d", frag_count));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

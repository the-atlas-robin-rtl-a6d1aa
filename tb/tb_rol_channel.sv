// tb_rol_channel: one complete channel with a buffer memory model. Checks
// (1) link input: fragments stored page by page and their records read
// from the used page FIFO, (2) flow control: XOFF rises when the data FIFO
// fills while no free pages exist, and a word sent into a full FIFO is
// flagged as overflow, (3) emulation mode: generator fragments stored with
// the right L1IDs, and buffer words read back through a reader port.
module tb_rol_channel;
  import robin_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 18;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_page_log2;
  logic cfg_emulate, link_valid, link_xoff, link_overflow;
  link_word_t link_word;
  logic gen_enable, gen_load;
  logic [15:0] gen_words;
  logic [31:0] gen_run, gen_first_l1id, frag_count;
  logic fpf_wr, upf_pop, upf_empty;
  logic [PAGE_NUM_W-1:0] fpf_wdata;
  logic [10:0] fpf_count;
  upf_record_t upf_head;
  logic [8:0] upf_count;
  logic cpu_wr_valid, cpu_wr_ready;
  logic [AW-1:0] cpu_wr_addr;
  logic [31:0] cpu_wr_data, rd_rdata;
  logic [2:0] rd_valid, rd_ready, rd_rvalid;
  logic [2:0][AW-1:0] rd_addr;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  rol_channel #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] mem [1 << AW];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    else mem_rdata <= mem[mem_addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lsend(input logic c, input logic [31:0] d);
    @(negedge clk); link_valid = 1; link_word = '{err: 1'b0, ctrl: c, data: d};
    @(negedge clk); link_valid = 0;
  endtask

  task automatic give_pages(input int first, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); fpf_wr = 1; fpf_wdata = 16'(first + i);
    end
    @(negedge clk); fpf_wr = 0;
  endtask

  task automatic pop_rec(output upf_record_t r);
    int t;
    t = 0;
    while (upf_empty && t < 20000) begin @(negedge clk); t++; end
    r = upf_head;
    upf_pop = 1; @(negedge clk); upf_pop = 0;
  endtask

  task automatic rd(input logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk); rd_valid = 3'b001; rd_addr[0] = a;
    while (!rd_ready[0]) @(negedge clk);
    @(negedge clk); rd_valid = 0;
    d = rd_rdata;
    check(rd_rvalid[0], "read data valid");
  endtask

  initial begin
    logic [31:0] w[$];
    upf_record_t r;
    logic [31:0] d;
    cfg_page_log2 = 4'd8; cfg_emulate = 0; link_valid = 0; link_word = '0;
    gen_enable = 0; gen_load = 0; gen_words = 0; gen_run = 0; gen_first_l1id = 0;
    fpf_wr = 0; fpf_wdata = 0; upf_pop = 0; cpu_wr_valid = 0; cpu_wr_addr = 0; cpu_wr_data = 0;
    rd_valid = 0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    give_pages(100, 4);
    check(fpf_count == 4, "four free pages");

    // (1) a 300-word fragment over the link: two pages
    w = {HDR_MARKER, 32'd300, 32'd55, 32'hAB000001};
    for (int i = 4; i < 300; i++) w.push_back($urandom);
    lsend(1, {CTRL_BOF, 16'h0});
    foreach (w[i]) lsend(0, w[i]);
    lsend(1, {CTRL_EOF, 16'h0});
    pop_rec(r);
    check(r.page_num == 100 && r.page_len == 256 && r.status.first_page && !r.status.last_page,
          "first page record");
    pop_rec(r);
    check(r.page_num == 101 && r.page_len == 45 && r.status.last_page && !r.status.len_mismatch,
          "last page record");
    check(r.l1id == 32'hAB000001 && r.run_number == 32'd55, "L1ID and run number");
    for (int i = 0; i < 300; i += 37) begin
      rd(AW'((i < 256) ? (100 * 256 + i) : (101 * 256 + i - 256)), d);
      check(d == w[i], $sformatf("buffer word %0d", i));
    end
    rd(AW'(101 * 256 + 44), d);
    check(d == crc32_words(w), "CRC after the last word");
    check(frag_count == 1, "one fragment");

    // (2) no free pages left after two more pages are used: XOFF, then overflow
    give_pages(200, 0);
    lsend(1, {CTRL_BOF, 16'h0});
    for (int i = 0; i < 800; i++) begin
      lsend(0, (i == 0) ? HDR_MARKER : 32'(i));
      if (link_xoff) break;
    end
    check(link_xoff, "XOFF raised while the input is blocked");
    begin
      bit ovf;
      ovf = 0;
      for (int i = 0; i < 100 && !ovf; i++) begin
        @(negedge clk); link_valid = 1; link_word = '{err: 1'b0, ctrl: 1'b0, data: 32'hFFFF0000};
        @(posedge clk); ovf = link_overflow;
      end
      @(negedge clk); link_valid = 0;
      check(ovf, "word into a full data FIFO flagged");
    end
    // free pages arrive: the blocked fragment drains; the source honours XOFF
    give_pages(110, 8);
    repeat (1000) @(negedge clk);
    check(!link_xoff, "XOFF released after pages arrive");
    lsend(1, {CTRL_EOF, 16'h0});
    repeat (1000) @(negedge clk);
    while (!upf_empty) pop_rec(r);
    check(r.status.last_page && r.status.len_mismatch, $sformatf("blocked fragment closed (length flagged) %h %0d", r.status, fpf_count));

    // (3) emulation: three generated fragments of 20 words
    cfg_emulate = 1; gen_words = 16'd20; gen_run = 32'd9; gen_first_l1id = 32'h00000500;
    @(negedge clk); gen_load = 1; @(negedge clk); gen_load = 0;
    gen_enable = 1;
    for (int f = 0; f < 3; f++) begin
      pop_rec(r);
      check(r.l1id == 32'h500 + 32'(f) && r.page_len == 21 && r.status.first_page &&
            r.status.last_page && r.status.len_mismatch == 0 && r.run_number == 9,
            $sformatf("generated fragment %0d", f));
      if (f == 2) gen_enable = 0;
    end
    rd(AW'(r.page_num * 256 + 7), d);
    check(d == 32'h502 + 7, "generated payload in buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

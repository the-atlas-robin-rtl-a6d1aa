// tb_workload_fragsizes: one ROL channel at its full default size (64 MB
// buffer, 2 kB pages, 1k free pages, 256 page records) storing fragments
// of 100 to 1000 words, the range over which the board's request rates are
// measured.
//
// Phase 1 sends every size from 100 to 1000 words in steps of 100, three
// times over. The link source offers one word every second clock, the
// write bandwidth the 1:1 time slice guarantees. A reader keeps requesting
// buffer words all the time, so every read slot is taken. The checks:
// - the source is never held off by XOFF;
// - no word is lost;
// - the input keeps pace. The last record must appear within a small
//   margin of the time the link needs.
//
// Phase 2 sends the same fragments as fast as the link allows (one word per
// clock, honouring XOFF). The sustained store rate must then be at least
// one word every second clock, minus the per-fragment overhead of the
// control words.
//
// A software-like process hands out free pages and pops page records.
// Another process rebuilds each fragment from its pages in the memory
// model, and compares it word by word and with its appended CRC.
// The memory is a sparse model of the 16M-word buffer.
module tb_workload_fragsizes;
  import robin_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = BUF_AW;
  localparam int PAGE_LOG2 = 9;
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

  rol_channel dut (.*);
  always #5 clk = ~clk;

  logic [31:0] mem [int unsigned];
  always @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] = mem_wdata;
    else mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected fragments in order
  typedef logic [31:0] words_t[$];
  words_t expect_q[$];
  int sent = 0, stored = 0;
  int xoff_seen = 0, overflows = 0;
  longint reads_done = 0;
  bit busy_reader = 0;

  always @(posedge clk) if (rst_n) begin
    if (link_overflow) overflows++;
    if (rd_rvalid[0]) reads_done++;
  end

  // reader that keeps every read slot busy
  always @(negedge clk) begin
    rd_valid[0] <= busy_reader;
    rd_addr[0]  <= AW'($urandom_range(0, 1 << 20));
  end

  function automatic words_t make_frag(input int n, input int l1id);
    words_t w;
    w = {HDR_MARKER, 32'(n), 32'd77, 32'(l1id)};
    for (int i = 4; i < n; i++) w.push_back($urandom);
    return w;
  endfunction

  // link source; gap = clocks between words (1 = every clock)
  task automatic send_frag(input words_t w, input int gap);
    link_word_t lw[$];
    lw.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_BOF, 16'h0}});
    foreach (w[i]) lw.push_back('{err: 1'b0, ctrl: 1'b0, data: w[i]});
    lw.push_back('{err: 1'b0, ctrl: 1'b1, data: {CTRL_EOF, 16'h0}});
    foreach (lw[i]) begin
      while (link_xoff) begin xoff_seen++; @(negedge clk); end
      link_valid = 1; link_word = lw[i];
      @(negedge clk); link_valid = 0;
      repeat (gap - 1) @(negedge clk);
    end
  endtask

  // software: keep the FPF topped up from a recycled pool, pop records,
  // rebuild each fragment from its pages
  int unsigned next_page = 0;
  task automatic give_page();
    @(negedge clk); fpf_wr = 1; fpf_wdata = 16'(next_page % 32768);
    next_page++;
    @(negedge clk); fpf_wr = 0;
  endtask

  initial begin : software
    upf_record_t r;
    words_t got, exp;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (fpf_count < 1000) give_page();
      if (!upf_empty) begin
        r = upf_head;
        upf_pop = 1; @(negedge clk); upf_pop = 0;
        for (int i = 0; i < int'(r.page_len); i++)
          got.push_back(mem[(int'(r.page_num) << PAGE_LOG2) + i]);
        check(r.status.first_page == (got.size() == int'(r.page_len)), "first-page flag");
        if (r.status.last_page) begin
          exp = expect_q.pop_front();
          check(got.size() == exp.size() + 1, $sformatf("fragment size %0d vs %0d", got.size(), exp.size() + 1));
          check(r.l1id == exp[HDR_W_L1ID] && r.run_number == 32'd77, "record L1ID and run number");
          check(!r.status.len_mismatch && !r.status.truncated && !r.status.bad_marker &&
                !r.status.ctrl_error && r.status.crc_appended, $sformatf("status %h", r.status));
          for (int i = 0; i < exp.size() && i < got.size(); i++)
            if (got[i] != exp[i]) begin check(0, $sformatf("word %0d of L1ID %0d", i, exp[HDR_W_L1ID])); break; end
          checks++;
          check(got.size() == exp.size() + 1 && got[exp.size()] == crc32_words(exp), "appended CRC");
          stored++;
          got = {};
        end
      end
    end
  end

  initial begin
    longint t0, t1, words;
    int l1id;
    words_t w;
    cfg_page_log2 = 4'(PAGE_LOG2); cfg_emulate = 0; link_valid = 0; link_word = '0;
    gen_enable = 0; gen_load = 0; gen_words = 0; gen_run = 0; gen_first_l1id = 0;
    fpf_wr = 0; fpf_wdata = 0; upf_pop = 0; cpu_wr_valid = 0; cpu_wr_addr = 0; cpu_wr_data = 0;
    rd_valid = 0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fpf_count > 900);
    @(negedge clk);
    l1id = 0;

    // phase 1: one word every second clock, every read slot taken
    busy_reader = 1;
    words = 0;
    t0 = $time / 10;
    for (int rep = 0; rep < 3; rep++)
      for (int n = 100; n <= 1000; n += 100) begin
        w = make_frag(n, l1id++);
        expect_q.push_back(w);
        words += n + 2;
        send_frag(w, 2);
      end
    while (stored < l1id) @(negedge clk);
    t1 = $time / 10;
    check(xoff_seen == 0, $sformatf("no XOFF at the guaranteed rate (%0d)", xoff_seen));
    check(t1 - t0 <= 2 * words + 200, $sformatf("phase 1: %0d link words stored in %0d clocks", words, t1 - t0));
    check(reads_done > (t1 - t0) / 2 - 10, $sformatf("reader served in every read slot (%0d)", reads_done));
    $display("phase 1: %0d words, %0d clocks, %0d reads", words, t1 - t0, reads_done);

    // phase 2: as fast as the link allows
    busy_reader = 0;
    xoff_seen = 0;
    words = 0;
    t0 = $time / 10;
    for (int n = 100; n <= 1000; n += 100) begin
      w = make_frag(n, l1id++);
      expect_q.push_back(w);
      words += n + 1;
      send_frag(w, 1);
    end
    while (stored < l1id) @(negedge clk);
    t1 = $time / 10;
    check(xoff_seen > 0, "XOFF used at full link speed");
    check(t1 - t0 <= 2 * words + 100, $sformatf("phase 2: %0d stored words in %0d clocks", words, t1 - t0));
    $display("phase 2: %0d words, %0d clocks, xoff cycles %0d", words, t1 - t0, xoff_seen);
    check(overflows == 0, "no word lost");
    check(frag_count == 32'(l1id), "fragment counter");
    check(expect_q.size() == 0, "every fragment stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_robin_top: end-to-end run of the ROBIN FPGA at its default sizes,
// with models of the three buffer memories, the network SRAM, the PCI
// bridge (local-bus writes in, DMA words out), the PHY (GMII) and a CPU
// that does the book-keeping over the CPU bus.
//
// Sequence: free pages are handed out; all three links send fragments at
// once (single- and multi-page, one with a wrong length word, one with a
// damaged character pair that must set the link error bit), while one
// channel first has no free pages, so its input stalls and raises XOFF;
// the CPU collects the used page records. The host sends a data request
// through the message memory; the CPU answers it with a PCI DMA response
// (header words plus the fragment's pages) and the PCI output is checked
// word by word, including the CRC. A request frame arrives over GbE; the
// CPU reads it from the SRAM ring and answers with a GbE DMA response whose
// 14-byte Ethernet header ends on a 16-bit boundary; the transmitted frame
// is checked byte by byte and by its FCS. A burst of frames then crosses
// the descriptor threshold, which must produce a PAUSE frame, and freeing
// the ring must produce the resume frame. Finally channel 2 runs in
// emulation mode with the internal generator, and the CPU buffer path
// writes and reads buffer words. Each mechanism is counted; one that never
// happened counts as a failure.
module tb_robin_top;
  import robin_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = BUF_AW, RAW = 17, PLOG = 9;   // 2 kB pages after reset
  logic clk = 0, rst_n = 0;
  logic [NUM_ROL-1:0][15:0] rol_rxd;
  logic [NUM_ROL-1:0] rol_rx_dv, rol_rx_ctl, rol_tx_xoff, rol_overflow;
  logic [NUM_ROL-1:0] buf_en, buf_we;
  logic [NUM_ROL-1:0][AW-1:0] buf_addr;
  logic [NUM_ROL-1:0][31:0] buf_wdata, buf_rdata;
  logic lb_wr;
  logic [11:0] lb_addr;
  logic [31:0] lb_wdata;
  logic pci_out_valid, pci_out_sof, pci_out_last, pci_out_ready;
  logic [31:0] pci_out_data, pci_out_addr;
  logic [7:0] gmii_rxd, gmii_txd;
  logic gmii_rx_dv, gmii_rx_er, gmii_tx_en;
  logic sram_en, sram_we;
  logic [RAW-1:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic cpu_req, cpu_we, cpu_ack;
  logic [19:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  int checks = 0, failures = 0;

  robin_top dut (.*);
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- external memories
  logic [31:0] bmem [NUM_ROL][int];
  always @(posedge clk) for (int c = 0; c < NUM_ROL; c++) if (buf_en[c]) begin
    if (buf_we[c]) bmem[c][int'(buf_addr[c])] = buf_wdata[c];
    else buf_rdata[c] <= bmem[c].exists(int'(buf_addr[c])) ? bmem[c][int'(buf_addr[c])] : 32'h0;
  end
  logic [31:0] sram [1 << RAW];
  always_ff @(posedge clk) if (sram_en) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    else sram_rdata <= sram[sram_addr];
  end

  // ---------------- mechanism counters
  int n_xoff = 0, n_stall = 0, n_multipage = 0, n_pci = 0, n_gbe = 0, n_odd16 = 0;
  int n_pause_on = 0, n_pause_off = 0, n_len_err = 0, n_emul = 0, n_cpu_buf = 0, n_gbe_rx = 0, n_link_err = 0;
  logic [NUM_ROL-1:0] xoff_q;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NUM_ROL; c++) if (rol_tx_xoff[c] && !xoff_q[c]) n_xoff++;
    xoff_q <= rol_tx_xoff;
    check(rol_overflow == '0, "no link word lost");
  end

  // ---------------- links: character pairs, source honours XOFF
  task automatic link_word(input int c, input logic ctl, input logic [31:0] d);
    while (rol_tx_xoff[c]) @(negedge clk);
    @(negedge clk); rol_rx_dv[c] = 1; rol_rx_ctl[c] = ctl; rol_rxd[c] = d[15:0];
    @(negedge clk); rol_rxd[c] = d[31:16];
    @(negedge clk); rol_rx_dv[c] = 0;
  endtask

  typedef logic [31:0] words_t[$];
  words_t frags [NUM_ROL][logic [31:0]];      // sent fragments by L1ID

  task automatic send_frag(input int c, input logic [31:0] l1id, input int n, input bit bad_len);
    words_t w;
    w = {HDR_MARKER, bad_len ? 32'(n + 5) : 32'(n), 32'd42, l1id};
    for (int i = 4; i < n; i++) w.push_back($urandom);
    frags[c][l1id] = w;
    link_word(c, 1, {CTRL_BOF, 16'h0});
    foreach (w[i]) link_word(c, 0, w[i]);
    link_word(c, 1, {CTRL_EOF, 16'h0});
  endtask

  // a fragment with one damaged character pair (control flags disagree)
  // inserted after word 10; the receiver drops the pair and flags the
  // following word
  task automatic send_frag_damaged(input int c, input logic [31:0] l1id, input int n);
    words_t w;
    w = {HDR_MARKER, 32'(n), 32'd42, l1id};
    for (int i = 4; i < n; i++) w.push_back($urandom);
    frags[c][l1id] = w;
    link_word(c, 1, {CTRL_BOF, 16'h0});
    foreach (w[i]) begin
      link_word(c, 0, w[i]);
      if (i == 10) begin
        @(negedge clk); rol_rx_dv[c] = 1; rol_rx_ctl[c] = 1; rol_rxd[c] = 16'hDEAD;
        @(negedge clk); rol_rx_ctl[c] = 0; rol_rxd[c] = 16'hBEEF;
        @(negedge clk); rol_rx_dv[c] = 0;
      end
    end
    link_word(c, 1, {CTRL_EOF, 16'h0});
  endtask

  // ---------------- CPU bus
  semaphore bus_lock = new(1);
  task automatic bus(input bit we, input logic [19:0] a, input logic [31:0] d, output logic [31:0] q);
    int t;
    bus_lock.get(1);
    @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_req = 0;
    t = 0;
    while (!cpu_ack && t < 1000) begin @(negedge clk); t++; end
    check(cpu_ack, "bus acknowledge");
    q = cpu_rdata;
    bus_lock.put(1);
  endtask
  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    logic [31:0] q;
    bus(1, a, d, q);
  endtask
  task automatic rd(input logic [19:0] a, output logic [31:0] q);
    bus(0, a, 0, q);
  endtask

  // book-keeping of the "CPU software": records per channel and L1ID
  typedef struct { logic [15:0] page; logic [15:0] len; } pg_t;
  typedef pg_t pages_t[$];
  pages_t book [NUM_ROL][logic [31:0]];
  page_status_t last_status [NUM_ROL][logic [31:0]];

  task automatic collect(input int c, input int nfrags);
    int got;
    logic [31:0] q, pi, l1, st;
    got = 0;
    while (got < nfrags) begin
      rd(20'h02008 + 20'(16 * c), q);
      if (q == 0) begin repeat (20) @(negedge clk); continue; end
      rd(20'h02004 + 20'(16 * c), pi);
      rd(20'h02005 + 20'(16 * c), l1);
      rd(20'h02006 + 20'(16 * c), st);
      wr(20'h02008 + 20'(16 * c), 0);
      book[c][l1].push_back('{page: pi[31:16], len: pi[15:0]});
      if (st[1]) begin
        last_status[c][l1] = page_status_t'(st);
        got++;
        if (book[c][l1].size() > 1) n_multipage++;
      end
    end
  endtask

  // ---------------- PCI sink
  typedef struct { logic [31:0] d; logic [31:0] a; bit sof; bit last; } pw_t;
  pw_t pci_q[$];
  always @(posedge clk) if (rst_n && pci_out_valid && pci_out_ready)
    pci_q.push_back('{d: pci_out_data, a: pci_out_addr, sof: pci_out_sof, last: pci_out_last});
  always @(negedge clk) pci_out_ready = $urandom_range(0, 3) != 0;

  // ---------------- GMII
  typedef logic [7:0] bytes_t[$];
  bytes_t tx_frames[$];
  logic [7:0] txcur[$];
  bit txen_q;
  always @(posedge clk) if (rst_n) begin
    if (gmii_tx_en) txcur.push_back(gmii_txd);
    else if (txen_q) begin tx_frames.push_back(txcur); txcur = {}; end
    txen_q = gmii_tx_en;
  end

  task automatic gmii_send(input bytes_t p);
    logic [31:0] fcs;
    fcs = crc32_bytes(p);
    for (int i = 0; i < 7; i++) begin @(negedge clk); gmii_rx_dv = 1; gmii_rxd = 8'h55; end
    @(negedge clk); gmii_rxd = 8'hD5;
    foreach (p[i]) begin @(negedge clk); gmii_rxd = p[i]; end
    for (int b = 0; b < 4; b++) begin @(negedge clk); gmii_rxd = fcs[8*b +: 8]; end
    @(negedge clk); gmii_rx_dv = 0;
    repeat (12) @(negedge clk);
  endtask

  function automatic bytes_t eth_req(input logic [31:0] l1id, input int ch);
    bytes_t p;
    p = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01,   // to the ROBIN
          8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h99,   // from a requester
          8'h88, 8'hB5};                              // local experimental type
    for (int b = 0; b < 4; b++) p.push_back(l1id[8*b +: 8]);
    p.push_back(8'(ch));
    while (p.size() < 60) p.push_back(8'h00);
    return p;
  endfunction

  // queue the buffer part of a response: one descriptor per page
  task automatic dma_fragment(input logic [19:0] fifo, input int c, input logic [31:0] l1id,
                              input logic [31:0] hdr[$], input bit odd16, input logic [31:0] dest);
    pages_t pg;
    logic [31:0] d;
    pg = book[c][l1id];
    foreach (pg[i]) begin
      int nh;
      nh = (i == 0) ? hdr.size() : 0;
      wr(fifo, {11'h0, odd16 && (i == 0), 2'b0, 2'(c), 6'h0, 10'(nh)});
      wr(fifo, 32'(pg[i].len));
      wr(fifo, 32'(pg[i].page) << PLOG);
      if (fifo == 20'h04000) begin
        wr(fifo, dest);
        dest += 32'(4 * (nh + pg[i].len));
      end
      if (i == 0) foreach (hdr[k]) wr(fifo, hdr[k]);
    end
  endtask

  // ---------------- main sequence
  initial begin
    logic [31:0] q, q2;
    int pg_next[NUM_ROL];
    rol_rxd = '0; rol_rx_dv = '0; rol_rx_ctl = '0; xoff_q = '0;
    lb_wr = 0; lb_addr = 0; lb_wdata = 0;
    gmii_rxd = 0; gmii_rx_dv = 0; gmii_rx_er = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // free pages: channels 0 and 1 get 12 each, channel 2 none yet
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 12; k++) wr(20'h02000 + 20'(16 * c), 32'(1000 * c + 3 * k + 1));
    pg_next = '{36, 1036, 2000};

    // ---- links
    fork
      begin
        send_frag(0, 32'h0100_0000, 100, 0);
        send_frag(0, 32'h0100_0001, 1100, 0);   // three 2 kB pages
        send_frag(0, 32'h0100_0002, 50, 1);     // length word disagrees
      end
      begin
        send_frag(1, 32'h0200_0000, 512, 0);    // page full, CRC on a second page
        send_frag(1, 32'h0200_0001, 300, 0);
        send_frag_damaged(1, 32'h0200_0002, 40);   // link error inside
      end
      begin
        send_frag(2, 32'h0300_0000, 900, 0);    // blocked until pages arrive
      end
      begin
        // channel 2 has no pages: wait until its input stalls and XOFF rises
        int t;
        t = 0;
        while (!rol_tx_xoff[2] && t < 100000) begin @(negedge clk); t++; end
        check(rol_tx_xoff[2], "XOFF while channel 2 has no free pages");
        rd(20'h02020, q);
        if (q == 0) n_stall++;
        for (int k = 0; k < 6; k++) wr(20'h02020, 32'(2000 + 7 * k));
      end
    join
    collect(0, 3);
    collect(1, 3);
    collect(2, 1);

    // ---- check the records
    begin
      logic [31:0] keys[$];
      keys = '{32'h0100_0000, 32'h0100_0001, 32'h0100_0002};
      check(book[0][keys[1]].size() == 3, "1100 words use three pages");
      check(book[1][32'h0200_0000].size() == 2 && book[1][32'h0200_0000][1].len == 1,
            "CRC of a page-sized fragment on its own page");
      check(last_status[0][keys[2]].len_mismatch, "length mismatch flagged");
      if (last_status[0][keys[2]].len_mismatch) n_len_err++;
      check(!last_status[0][keys[0]].len_mismatch && !last_status[1][32'h0200_0001].len_mismatch,
            "good fragments not flagged");
      check(book[2][32'h0300_0000].size() == 2 && book[2][32'h0300_0000][0].page == 2000,
            "stalled fragment stored once pages arrived");
    end
    rd(20'h02009, q); check(q == 3, "channel 0 fragment count");
    rd(20'h02019, q); check(q == 3, "channel 1 fragment count");
    check(last_status[1][32'h0200_0002].link_error && !last_status[1][32'h0200_0002].len_mismatch,
          "link error flagged, fragment complete");
    check(!last_status[1][32'h0200_0001].link_error && !last_status[0][32'h0100_0001].link_error,
          "clean fragments without link error");
    if (last_status[1][32'h0200_0002].link_error) n_link_err++;

    // ---- PCI request: host writes a message and its descriptor
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); lb_wr = 1; lb_addr = 12'(16 + i);
      lb_wdata = (i == 0) ? 32'h0000_0001 : (i == 1) ? 32'h0100_0001 : (i == 2) ? 32'd0 : 32'hF0000000;
    end
    @(negedge clk); lb_addr = 12'h800; lb_wdata = {16'd4, 16'd16};
    @(negedge clk); lb_wr = 0;
    begin
      logic [31:0] m[4];
      logic [31:0] hdr[$];
      words_t exp;
      int t;
      rd(20'h01001, q); check(q[5:0] == 1, "one PCI message");
      rd(20'h01000, q); wr(20'h01000, 0);
      check(q == {16'd4, 16'd16}, "message descriptor");
      for (int i = 0; i < 4; i++) rd(20'(q[15:0] + 16'(i)), m[i]);
      check(m[1] == 32'h0100_0001 && m[3] == 32'hF0000000, "message words");
      hdr = '{32'hCC000001, m[1]};
      dma_fragment(20'h04000, int'(m[2]), m[1], hdr, 0, m[3]);
      exp = hdr;
      foreach (frags[0][m[1]][i]) exp.push_back(frags[0][m[1]][i]);
      exp.push_back(crc32_words(frags[0][m[1]]));
      t = 0;
      while (pci_q.size() < exp.size() && t < 20000) begin @(negedge clk); t++; end
      check(pci_q.size() == exp.size(), $sformatf("PCI words %0d/%0d", pci_q.size(), exp.size()));
      foreach (exp[i]) if (i < pci_q.size()) begin
        check(pci_q[i].d == exp[i], $sformatf("PCI word %0d", i));
        check(pci_q[i].a == m[3] + 32'(4 * i), "PCI destination address");
      end
      if (pci_q.size() == exp.size() && pci_q[exp.size() - 1].d == exp[exp.size() - 1]) n_pci++;
    end

    // ---- GbE request and response
    begin
      bytes_t rq, f, exp;
      logic [31:0] l1, hdr[$];
      int off, size, t;
      logic [31:0] fcs;
      gmii_send(eth_req(32'h0200_0001, 1));
      rd(20'h06001, q); check(q == 1, "one GbE frame stored");
      rd(20'h06000, q); wr(20'h06000, 0);
      off = int'(q[16:0]); size = int'(q[31:17]);
      check(size == 60, "GbE frame size");
      rd(20'h80000 + 20'(off + 3), q);
      rd(20'h80000 + 20'(off + 4), q2);
      l1 = {q2[15:0], q[31:16]};
      check(l1 == 32'h0200_0001 && q2[23:16] == 8'd1, "request read from SRAM");
      if (l1 == 32'h0200_0001) n_gbe_rx++;
      wr(20'h06001, 32'(off + 15));               // release the frame
      // 14-byte Ethernet header: 3 full words and one 16-bit half
      hdr = '{32'h00990002, 32'h02000000, 32'h00000100, 32'h0000B588};
      dma_fragment(20'h05000, 1, l1, hdr, 1, 0);
      exp = '{8'h02, 8'h00, 8'h99, 8'h00, 8'h00, 8'h00, 8'h00, 8'h02, 8'h00, 8'h01, 8'h00, 8'h00,
              8'h88, 8'hB5};
      foreach (frags[1][l1][i]) for (int b = 0; b < 4; b++) exp.push_back(frags[1][l1][i][8*b +: 8]);
      fcs = crc32_words(frags[1][l1]);
      for (int b = 0; b < 4; b++) exp.push_back(fcs[8*b +: 8]);
      t = 0;
      while (tx_frames.size() < 1 && t < 40000) begin @(negedge clk); t++; end
      check(tx_frames.size() == 1, "GbE response sent");
      if (tx_frames.size() == 1) begin
        f = tx_frames.pop_front();
        check(f.size() == 8 + exp.size() + 4, $sformatf("GbE frame length %0d", f.size()));
        if (f.size() == 8 + exp.size() + 4) begin
          bit ok;
          ok = 1;
          foreach (exp[i]) if (f[8 + i] != exp[i]) ok = 0;
          check(ok, "GbE response bytes (header ends on 16 bits)");
          fcs = crc32_bytes(exp);
          check({f[f.size()-1], f[f.size()-2], f[f.size()-3], f[f.size()-4]} == fcs, "GbE FCS");
          if (ok) begin n_gbe++; n_odd16++; end
        end
      end
    end

    // ---- flow control: 24 queued frames cross the descriptor threshold
    for (int i = 0; i < 24; i++) gmii_send(eth_req(32'h0900_0000 + 32'(i), 0));
    repeat (400) @(negedge clk);
    rd(20'h06001, q); check(q == 24, "24 frames queued");
    begin
      bytes_t f;
      check(tx_frames.size() == 1, "pause frame sent");
      if (tx_frames.size() >= 1) begin
        f = tx_frames.pop_front();
        if (f.size() == 72 && f[8] == 8'h01 && f[20] == 8'h88 && f[21] == 8'h08 &&
            {f[24], f[25]} != 16'h0) n_pause_on++;
      end
      for (int i = 0; i < 24; i++) begin rd(20'h06000, q); wr(20'h06000, 0); end
      rd(20'h06002, q);
      wr(20'h06001, 32'(int'(dut.u_rx_buf.wr_ptr)));   // free the ring
      repeat (400) @(negedge clk);
      check(tx_frames.size() == 1, "resume frame sent");
      if (tx_frames.size() >= 1) begin
        f = tx_frames.pop_front();
        if (f.size() == 72 && f[20] == 8'h88 && {f[24], f[25]} == 16'h0) n_pause_off++;
      end
    end

    // ---- emulation mode on channel 2
    wr(20'h03001, 32'd64);
    wr(20'h03002, 32'd7);
    wr(20'h03003, 32'h0700_0000);
    wr(20'h03000, {24'h0, 1'b1, 3'b100, 4'd9});
    begin
      int t;
      t = 0;
      do begin rd(20'h02029, q); t++; end while (q < 3 && t < 2000);
      wr(20'h03000, {24'h0, 1'b0, 3'b100, 4'd9});
      repeat (300) @(negedge clk);
      wr(20'h03000, {24'h0, 1'b0, 3'b000, 4'd9});
      rd(20'h02029, q);
      collect(2, int'(q) - 1);
      check(book[2].exists(32'h0700_0000) && book[2].exists(32'h0700_0001), "generated fragments stored");
      if (book[2].exists(32'h0700_0001)) begin
        logic [31:0] a;
        a = 32'(book[2][32'h0700_0001][0].page) << PLOG;
        check(bmem[2][int'(a + 10)] == 32'h0700_0001 + 10, "generated payload in buffer");
        if (!last_status[2][32'h0700_0001].len_mismatch) n_emul++;
      end
    end

    // ---- CPU buffer path (self-test)
    wr(20'h07000, {6'h0, 2'd1, 24'h00F000});
    for (int i = 0; i < 4; i++) wr(20'h07001, 32'h51E57000 + 32'(i));
    wr(20'h07000, {6'h0, 2'd1, 24'h00F000});
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 4; i++) begin
        wr(20'h07002, 0);
        rd(20'h07002, q);
        if (q != 32'h51E57000 + 32'(i)) ok = 0;
      end
      check(ok, "buffer path read back");
      if (ok) n_cpu_buf++;
    end

    $display("mechanisms: xoff=%0d stall=%0d multipage=%0d len_err=%0d pci=%0d gbe_rx=%0d gbe=%0d odd16=%0d pause_on=%0d pause_off=%0d emul=%0d cpu_buf=%0d link_err=%0d",
             n_xoff, n_stall, n_multipage, n_len_err, n_pci, n_gbe_rx, n_gbe, n_odd16, n_pause_on,
             n_pause_off, n_emul, n_cpu_buf, n_link_err);
    check(n_xoff > 0, "XOFF happened");
    check(n_stall > 0, "FPF-empty stall happened");
    check(n_multipage > 0, "multi-page fragment happened");
    check(n_len_err > 0, "length error happened");
    check(n_pci > 0, "PCI response happened");
    check(n_gbe_rx > 0, "GbE request received");
    check(n_gbe > 0 && n_odd16 > 0, "GbE response with 16-bit header end happened");
    check(n_pause_on > 0 && n_pause_off > 0, "flow-control messages happened");
    check(n_emul > 0, "emulation mode happened");
    check(n_cpu_buf > 0, "CPU buffer path happened");
    check(n_link_err > 0, "link error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

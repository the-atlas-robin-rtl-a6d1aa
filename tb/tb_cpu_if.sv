// tb_cpu_if: exercises the CPU bus address map: configuration registers,
// free page writes and used page pops per channel, record word reads,
// message memory reads (with a memory model), DMA FIFO writes, GbE
// descriptor pop and read pointer, the SRAM window (with a delayed grant)
// and the buffer path (write and read with delayed grants).
module tb_cpu_if;
  import robin_pkg::*;
  localparam int AW = 24, RAW = 17;
  logic clk = 0, rst_n = 0;
  logic cpu_req, cpu_we, cpu_ack;
  logic [19:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic [3:0] cfg_page_log2;
  logic [NUM_ROL-1:0] cfg_emulate;
  logic gen_enable, gen_load;
  logic [15:0] gen_words;
  logic [31:0] gen_run, gen_first_l1id;
  logic msg_rd, msg_desc_pop;
  logic [10:0] msg_addr;
  logic [31:0] msg_rdata, msg_desc_head;
  logic [5:0] msg_desc_count, gbe_desc_count;
  logic [15:0] msg_lost, gbe_drops;
  logic [NUM_ROL-1:0] fpf_wr, upf_pop;
  logic [PAGE_NUM_W-1:0] fpf_wdata;
  logic [NUM_ROL-1:0][10:0] fpf_count;
  upf_record_t [NUM_ROL-1:0] upf_head;
  logic [NUM_ROL-1:0][8:0] upf_count;
  logic [NUM_ROL-1:0][31:0] frag_count;
  logic pci_dma_wr, gbe_dma_wr;
  logic [31:0] dma_wdata;
  logic [9:0] pci_dma_count, gbe_dma_count;
  logic gbe_desc_pop, gbe_rd_ptr_wr;
  logic [31:0] gbe_desc_head;
  logic [RAW:0] gbe_rd_ptr, gbe_occupancy;
  logic sram_rd_valid, sram_rd_ready, sram_rvalid;
  logic [RAW-1:0] sram_rd_addr;
  logic [31:0] sram_rdata;
  logic [NUM_ROL-1:0] buf_wr_valid, buf_wr_ready, buf_rd_valid, buf_rd_ready, buf_rvalid;
  logic [AW-1:0] buf_addr;
  logic [31:0] buf_wdata;
  logic [NUM_ROL-1:0][31:0] buf_rdata;
  int checks = 0, failures = 0;

  cpu_if #(.AW(AW), .RING_AW(RAW)) dut (.*);
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

  // models of the blocks behind the bus
  logic [31:0] bufmem [NUM_ROL][256];
  int fpf_w[NUM_ROL][$], upf_pops[NUM_ROL], pci_w[$], gbe_w[$], desc_pops = 0, gdesc_pops = 0;
  always @(posedge clk) if (rst_n) begin
    if (msg_rd) msg_rdata <= {21'h0, msg_addr} ^ 32'h5A5A0000;
    for (int c = 0; c < NUM_ROL; c++) begin
      if (fpf_wr[c]) fpf_w[c].push_back(int'(fpf_wdata));
      if (upf_pop[c]) upf_pops[c]++;
      if (buf_wr_valid[c] && buf_wr_ready[c]) bufmem[c][buf_addr[7:0]] <= buf_wdata;
      buf_rvalid[c] <= buf_rd_valid[c] && buf_rd_ready[c];
      if (buf_rd_valid[c] && buf_rd_ready[c]) buf_rdata[c] <= bufmem[c][buf_addr[7:0]];
    end
    if (pci_dma_wr) pci_w.push_back(int'(dma_wdata));
    if (gbe_dma_wr) gbe_w.push_back(int'(dma_wdata));
    if (msg_desc_pop) desc_pops++;
    if (gbe_desc_pop) gdesc_pops++;
    sram_rvalid <= sram_rd_valid && sram_rd_ready;
    if (sram_rd_valid && sram_rd_ready) sram_rdata <= {15'h0, sram_rd_addr} + 32'h10000000;
  end
  always @(negedge clk) begin
    sram_rd_ready = $urandom_range(0, 2) == 0;
    buf_wr_ready = NUM_ROL'($urandom);
    buf_rd_ready = NUM_ROL'($urandom);
  end

  task automatic bus(input bit we, input logic [19:0] a, input logic [31:0] d, output logic [31:0] q);
    int t;
    @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_req = 0;
    t = 0;
    while (!cpu_ack && t < 100) begin @(negedge clk); t++; end
    check(cpu_ack, $sformatf("ack for %h", a));
    q = cpu_rdata;
  endtask

  initial begin
    logic [31:0] q;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    msg_desc_head = 32'h00400010; msg_desc_count = 6'd3; msg_lost = 16'd2;
    gbe_desc_head = 32'h0BEE0000; gbe_desc_count = 6'd5; gbe_occupancy = 18'd777; gbe_drops = 16'd4;
    pci_dma_count = 10'd11; gbe_dma_count = 10'd12;
    for (int c = 0; c < NUM_ROL; c++) begin
      fpf_count[c] = 11'(100 + c); upf_count[c] = 9'(10 + c); frag_count[c] = 32'(1000 + c);
      upf_head[c] = {32'(c + 7), 32'(c + 3), 32'hAA000000 + 32'(c), 16'(c + 40), 16'(c + 20)};
      buf_rvalid[c] = 0;
    end
    sram_rvalid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bus(0, 20'h03000, 0, q);
    check(q[3:0] == 4'd9 && cfg_page_log2 == 4'd9, "2 kB pages after reset");
    bus(1, 20'h03000, 32'h0000_00B8, q);
    check(cfg_page_log2 == 4'd8 && cfg_emulate == 3'b011 && gen_enable, "control register");
    bus(1, 20'h03000, 32'h0000_0003, q);
    check(cfg_page_log2 == 4'd8, "page size clamped to 1 kB");
    bus(1, 20'h03001, 32'd77, q);
    bus(1, 20'h03002, 32'd5, q);
    bus(1, 20'h03003, 32'h1234, q);
    check(gen_words == 77 && gen_run == 5 && gen_first_l1id == 32'h1234, "generator registers");
    for (int c = 0; c < NUM_ROL; c++) begin
      bus(1, 20'h02000 + 20'(16 * c), 32'(500 + c), q);
      bus(1, 20'h02000 + 20'(16 * c), 32'(600 + c), q);
      bus(0, 20'h02000 + 20'(16 * c), 0, q);
      check(q == 32'(100 + c), "FPF count");
      bus(0, 20'h02004 + 20'(16 * c), 0, q);
      check(q == {16'(c + 40), 16'(c + 20)}, "record word 0: page info");
      bus(0, 20'h02005 + 20'(16 * c), 0, q);
      check(q == 32'hAA000000 + 32'(c), "record word 1: L1ID");
      bus(0, 20'h02006 + 20'(16 * c), 0, q);
      check(q == 32'(c + 3), "record word 2: status");
      bus(0, 20'h02007 + 20'(16 * c), 0, q);
      check(q == 32'(c + 7), "record word 3: run number");
      bus(1, 20'h02008 + 20'(16 * c), 0, q);
      bus(0, 20'h02008 + 20'(16 * c), 0, q);
      check(q == 32'(10 + c), "UPF count");
      bus(0, 20'h02009 + 20'(16 * c), 0, q);
      check(q == 32'(1000 + c), "fragment count");
      check(fpf_w[c].size() == 2 && fpf_w[c][0] == 500 + c && fpf_w[c][1] == 600 + c, $sformatf("FPF writes %0d %p", c, fpf_w[c]));
      check(upf_pops[c] == 1, $sformatf("UPF pop %0d %0d", c, upf_pops[c]));
    end
    for (int i = 0; i < 20; i++) begin
      bus(0, 20'(i * 97), 0, q);
      check(q == (32'(i * 97) ^ 32'h5A5A0000), "message memory read");
    end
    bus(0, 20'h01000, 0, q); check(q == 32'h00400010, "message descriptor");
    bus(0, 20'h01001, 0, q); check(q == {16'd2, 10'h0, 6'd3}, "message status");
    bus(1, 20'h01000, 0, q); check(desc_pops == 1, "message descriptor pop");
    bus(1, 20'h04000, 32'hCAFE0001, q);
    bus(1, 20'h04000, 32'hCAFE0002, q);
    bus(1, 20'h05000, 32'hBEEF0001, q);
    check(pci_w.size() == 2 && pci_w[1] == 32'hCAFE0002 && gbe_w.size() == 1, "DMA FIFO writes");
    bus(0, 20'h04000, 0, q); check(q == 11, "PCI DMA fill");
    bus(0, 20'h05000, 0, q); check(q == 12, "GbE DMA fill");
    bus(0, 20'h06000, 0, q); check(q == 32'h0BEE0000, "GbE descriptor");
    bus(0, 20'h06001, 0, q); check(q == 5, "GbE descriptor count");
    bus(0, 20'h06002, 0, q); check(q == 777, "ring occupancy");
    bus(0, 20'h06003, 0, q); check(q == 4, "dropped frames");
    bus(1, 20'h06000, 0, q); check(gdesc_pops == 1, "GbE descriptor pop");
    bus(1, 20'h06001, 32'd300, q); check(gbe_rd_ptr == 300, "ring read pointer");
    for (int i = 0; i < 10; i++) begin
      bus(0, 20'h80000 + 20'(i * 1001), 0, q);
      check(q == 32'h10000000 + 32'(i * 1001), "SRAM window");
    end
    // buffer path on channel 2: write 5 words, read them back
    bus(1, 20'h07000, {6'h0, 2'd2, 24'h10}, q);
    for (int i = 0; i < 5; i++) bus(1, 20'h07001, 32'hD0D00000 + 32'(i), q);
    bus(1, 20'h07000, {6'h0, 2'd2, 24'h10}, q);
    for (int i = 0; i < 5; i++) begin
      bus(1, 20'h07002, 0, q);
      bus(0, 20'h07002, 0, q);
      check(q == 32'hD0D00000 + 32'(i), "buffer path read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

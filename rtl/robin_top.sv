// robin_top: the FPGA of the ROBIN read-out buffer card.
//
// Three read-out links feed three independent channels (S-Link receiver,
// data FIFO, free/used page FIFOs, input handler, buffer arbiter), each
// with its own external buffer memory. The processor does the book-keeping
// through the CPU bus: it supplies free pages, collects used page records,
// reads PCI messages (message memory plus descriptor FIFO, written by the
// host through the PCI bridge's local bus) and GbE messages (frames stored
// by the receive MAC in the network SRAM ring), and answers requests by
// queueing descriptors and header words for the PCI or the GbE DMA engine.
// Each DMA engine takes buffer data from any of the three channels through
// that channel's arbiter; the PCI engine drives the bridge's local bus with
// destination addresses, the GbE engine feeds the transmit MAC. The receive
// buffer's flow-control request makes the transmit MAC send a pause frame.
//
// External parts are outside: buffer memories, SRAM, PCI bridge, PHY,
// deserialisers and the CPU are reached through the ports below. Everything
// runs on one clock here; the board's separate clock domains (link, GMII,
// PCI local bus, CPU bus) and their synchronisers are left out.
module robin_top
  import robin_pkg::*;
#(
  parameter int unsigned AW      = BUF_AW,
  parameter int unsigned RING_AW = 17
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // read-out links (deserialiser side)
  input  logic [NUM_ROL-1:0][15:0]   rol_rxd,
  input  logic [NUM_ROL-1:0]         rol_rx_dv,
  input  logic [NUM_ROL-1:0]         rol_rx_ctl,
  output logic [NUM_ROL-1:0]         rol_tx_xoff,
  output logic [NUM_ROL-1:0]         rol_overflow,
  // buffer memories
  output logic [NUM_ROL-1:0]         buf_en,
  output logic [NUM_ROL-1:0]         buf_we,
  output logic [NUM_ROL-1:0][AW-1:0] buf_addr,
  output logic [NUM_ROL-1:0][31:0]   buf_wdata,
  input  logic [NUM_ROL-1:0][31:0]   buf_rdata,
  // PCI bridge local bus: host writes, DMA output
  input  logic                       lb_wr,
  input  logic [11:0]                lb_addr,
  input  logic [31:0]                lb_wdata,
  output logic                       pci_out_valid,
  output logic [31:0]                pci_out_data,
  output logic [31:0]                pci_out_addr,
  output logic                       pci_out_sof,
  output logic                       pci_out_last,
  input  logic                       pci_out_ready,
  // GMII to the PHY
  input  logic [7:0]                 gmii_rxd,
  input  logic                       gmii_rx_dv,
  input  logic                       gmii_rx_er,
  output logic [7:0]                 gmii_txd,
  output logic                       gmii_tx_en,
  // network SRAM
  output logic                       sram_en,
  output logic                       sram_we,
  output logic [RING_AW-1:0]         sram_addr,
  output logic [31:0]                sram_wdata,
  input  logic [31:0]                sram_rdata,
  // CPU external bus
  input  logic                       cpu_req,
  input  logic                       cpu_we,
  input  logic [19:0]                cpu_addr,
  input  logic [31:0]                cpu_wdata,
  output logic                       cpu_ack,
  output logic [31:0]                cpu_rdata
);
  // configuration
  logic [3:0]         cfg_page_log2;
  logic [NUM_ROL-1:0] cfg_emulate;
  logic               gen_enable, gen_load;
  logic [15:0]        gen_words;
  logic [31:0]        gen_run, gen_first_l1id;

  // channels
  logic [NUM_ROL-1:0]       lw_valid, xoff;
  link_word_t [NUM_ROL-1:0] lw;
  logic [NUM_ROL-1:0]       fpf_wr, upf_pop, upf_empty;
  logic [PAGE_NUM_W-1:0]    fpf_wdata;
  logic [NUM_ROL-1:0][10:0] fpf_count;
  logic [NUM_ROL-1:0][8:0]  upf_count;
  upf_record_t [NUM_ROL-1:0] upf_head;
  logic [NUM_ROL-1:0][31:0] frag_count;
  logic [NUM_ROL-1:0]       cb_wr_valid, cb_wr_ready, cb_rd_valid;
  logic [AW-1:0]            cb_addr;
  logic [31:0]              cb_wdata;
  logic [NUM_ROL-1:0][2:0]  ch_rd_valid, ch_rd_ready, ch_rd_rvalid;
  logic [NUM_ROL-1:0][2:0][AW-1:0] ch_rd_addr;
  logic [NUM_ROL-1:0][31:0] ch_rdata;

  // DMA
  logic               pci_dma_wr, gbe_dma_wr;
  logic [31:0]        dma_wdata;
  logic [9:0]         pci_dma_count, gbe_dma_count;
  logic [NUM_ROL-1:0] pci_rd_valid, gbe_rd_valid;
  logic [AW-1:0]      pci_rd_addr, gbe_rd_addr;
  logic               g_valid, g_last, g_ready;
  logic [31:0]        g_data;
  logic [3:0]         g_keep;

  // messages
  logic               msg_rd, msg_desc_pop;
  logic [10:0]        msg_addr;
  logic [31:0]        msg_rdata, msg_desc_head;
  logic [5:0]         msg_desc_count;
  logic [15:0]        msg_lost;

  // GbE receive
  logic               rx_valid, rx_sof, rx_eof, rx_good;
  logic [7:0]         rx_data;
  logic               gbe_desc_pop, gbe_rd_ptr_wr, fc_req;
  logic [31:0]        gbe_desc_head;
  logic [5:0]         gbe_desc_count;
  logic [RING_AW:0]   gbe_rd_ptr, gbe_occupancy;
  logic [15:0]        gbe_drops;
  logic               s_rd_valid, s_rd_ready, s_rvalid;
  logic [RING_AW-1:0] s_rd_addr;
  logic [31:0]        s_rdata;

  for (genvar c = 0; c < NUM_ROL; c++) begin : g_rol
    slink_rx u_slink (
      .clk, .rst_n, .rxd(rol_rxd[c]), .rx_dv(rol_rx_dv[c]), .rx_ctl(rol_rx_ctl[c]),
      .xoff_req(xoff[c]), .tx_xoff(rol_tx_xoff[c]), .word_valid(lw_valid[c]),
      .word(lw[c]), .err_count()
    );

    assign ch_rd_valid[c] = {cb_rd_valid[c], gbe_rd_valid[c], pci_rd_valid[c]};
    assign ch_rd_addr[c]  = {cb_addr, gbe_rd_addr, pci_rd_addr};

    rol_channel #(.AW(AW)) u_chan (
      .clk, .rst_n, .cfg_page_log2, .cfg_emulate(cfg_emulate[c]),
      .link_valid(lw_valid[c]), .link_word(lw[c]), .link_xoff(xoff[c]),
      .link_overflow(rol_overflow[c]),
      .gen_enable, .gen_words, .gen_run, .gen_first_l1id, .gen_load,
      .fpf_wr(fpf_wr[c]), .fpf_wdata, .fpf_count(fpf_count[c]),
      .upf_pop(upf_pop[c]), .upf_head(upf_head[c]), .upf_empty(upf_empty[c]),
      .upf_count(upf_count[c]), .frag_count(frag_count[c]),
      .cpu_wr_valid(cb_wr_valid[c]), .cpu_wr_addr(cb_addr), .cpu_wr_data(cb_wdata),
      .cpu_wr_ready(cb_wr_ready[c]),
      .rd_valid(ch_rd_valid[c]), .rd_addr(ch_rd_addr[c]), .rd_ready(ch_rd_ready[c]),
      .rd_rvalid(ch_rd_rvalid[c]), .rd_rdata(ch_rdata[c]),
      .mem_en(buf_en[c]), .mem_we(buf_we[c]), .mem_addr(buf_addr[c]),
      .mem_wdata(buf_wdata[c]), .mem_rdata(buf_rdata[c])
    );
  end

  logic [NUM_ROL-1:0] pci_rd_ready, pci_rvalid, gbe_rd_ready, gbe_rvalid;
  logic [NUM_ROL-1:0] cb_rd_ready, cb_rvalid;
  always_comb begin
    for (int c = 0; c < NUM_ROL; c++) begin
      pci_rd_ready[c] = ch_rd_ready[c][0];
      gbe_rd_ready[c] = ch_rd_ready[c][1];
      cb_rd_ready[c]  = ch_rd_ready[c][2];
      pci_rvalid[c]   = ch_rd_rvalid[c][0];
      gbe_rvalid[c]   = ch_rd_rvalid[c][1];
      cb_rvalid[c]    = ch_rd_rvalid[c][2];
    end
  end

  dma_engine #(.AW(AW), .HAS_DEST(1'b1), .ODD16_EN(1'b0)) u_pci_dma (
    .clk, .rst_n, .fifo_wr(pci_dma_wr), .fifo_wdata(dma_wdata),
    .fifo_count(pci_dma_count), .fifo_full(),
    .rd_valid(pci_rd_valid), .rd_addr(pci_rd_addr), .rd_ready(pci_rd_ready),
    .rd_rvalid(pci_rvalid), .rd_rdata(ch_rdata),
    .out_valid(pci_out_valid), .out_data(pci_out_data), .out_keep(),
    .out_sof(pci_out_sof), .out_last(pci_out_last), .out_addr(pci_out_addr),
    .out_ready(pci_out_ready), .busy(), .resp_count()
  );

  dma_engine #(.AW(AW), .HAS_DEST(1'b0), .ODD16_EN(1'b1)) u_gbe_dma (
    .clk, .rst_n, .fifo_wr(gbe_dma_wr), .fifo_wdata(dma_wdata),
    .fifo_count(gbe_dma_count), .fifo_full(),
    .rd_valid(gbe_rd_valid), .rd_addr(gbe_rd_addr), .rd_ready(gbe_rd_ready),
    .rd_rvalid(gbe_rvalid), .rd_rdata(ch_rdata),
    .out_valid(g_valid), .out_data(g_data), .out_keep(g_keep),
    .out_sof(), .out_last(g_last), .out_addr(),
    .out_ready(g_ready), .busy(), .resp_count()
  );

  msg_dpr_if u_msg (
    .clk, .rst_n, .lb_wr, .lb_addr, .lb_wdata,
    .cpu_rd(msg_rd), .cpu_addr(msg_addr), .cpu_rdata(msg_rdata),
    .desc_pop(msg_desc_pop), .desc_head(msg_desc_head), .desc_empty(),
    .desc_count(msg_desc_count), .lost_desc(msg_lost)
  );

  gbe_rx_mac u_rx_mac (
    .clk, .rst_n, .rxd(gmii_rxd), .rx_dv(gmii_rx_dv), .rx_er(gmii_rx_er),
    .out_valid(rx_valid), .out_data(rx_data), .out_sof(rx_sof), .out_eof(rx_eof),
    .out_good(rx_good), .crc_err_count()
  );

  gbe_rx_buffer #(.RING_AW(RING_AW)) u_rx_buf (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_data), .in_sof(rx_sof),
    .in_eof(rx_eof), .in_good(rx_good),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .desc_pop(gbe_desc_pop), .desc_head(gbe_desc_head), .desc_empty(),
    .desc_count(gbe_desc_count), .cpu_rd_ptr_wr(gbe_rd_ptr_wr), .cpu_rd_ptr(gbe_rd_ptr),
    .cpu_rd_valid(s_rd_valid), .cpu_rd_addr(s_rd_addr), .cpu_rd_ready(s_rd_ready),
    .cpu_rvalid(s_rvalid), .cpu_rdata(s_rdata), .occupancy(gbe_occupancy),
    .fc_req, .drop_count(gbe_drops), .frame_count()
  );

  gbe_tx_mac u_tx_mac (
    .clk, .rst_n, .in_valid(g_valid), .in_data(g_data), .in_keep(g_keep),
    .in_last(g_last), .in_ready(g_ready), .fc_req, .txd(gmii_txd), .tx_en(gmii_tx_en),
    .frame_count(), .pause_count()
  );

  cpu_if #(.AW(AW), .RING_AW(RING_AW)) u_cpu (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata,
    .cfg_page_log2, .cfg_emulate, .gen_enable, .gen_words, .gen_run, .gen_first_l1id,
    .gen_load,
    .msg_rd, .msg_addr, .msg_rdata, .msg_desc_pop, .msg_desc_head, .msg_desc_count,
    .msg_lost,
    .fpf_wr, .fpf_wdata, .fpf_count, .upf_pop, .upf_head, .upf_count, .frag_count,
    .pci_dma_wr, .gbe_dma_wr, .dma_wdata, .pci_dma_count, .gbe_dma_count,
    .gbe_desc_pop, .gbe_desc_head, .gbe_desc_count, .gbe_rd_ptr_wr, .gbe_rd_ptr,
    .gbe_occupancy, .gbe_drops,
    .sram_rd_valid(s_rd_valid), .sram_rd_addr(s_rd_addr), .sram_rd_ready(s_rd_ready),
    .sram_rvalid(s_rvalid), .sram_rdata(s_rdata),
    .buf_wr_valid(cb_wr_valid), .buf_addr(cb_addr), .buf_wdata(cb_wdata),
    .buf_wr_ready(cb_wr_ready), .buf_rd_valid(cb_rd_valid), .buf_rd_ready(cb_rd_ready),
    .buf_rvalid(cb_rvalid), .buf_rdata(ch_rdata)
  );
endmodule

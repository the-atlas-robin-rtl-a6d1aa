// rol_channel: the complete FPGA input path of one read-out link.
//
// Each link owns its resources so that the three channels never block each
// other: a 256-word data FIFO that decouples the link from the buffer, the
// free page FIFO (1k page numbers, filled by the CPU), the used page FIFO
// (256 four-word page records, read by the CPU), the input handler that
// stores fragments page by page, and the buffer arbiter that shares the
// buffer memory port between this input and the readers. A multiplexer in
// front of the data FIFO selects either the link or the internal fragment
// generator (emulation mode). link_xoff is raised while the data FIFO holds
// more than DATA_DEPTH - XOFF_MARGIN words; it is the flow-control request
// towards the link source.
//
// FIFO sizes follow the design. The XOFF margin, the generator multiplexer
// and the register-level interface are this design's own choices.
module rol_channel
  import robin_pkg::*;
#(
  parameter int unsigned AW          = BUF_AW,
  parameter int unsigned DATA_DEPTH  = DATA_FIFO_DEPTH,
  parameter int unsigned FPF_D       = FPF_DEPTH,
  parameter int unsigned UPF_D       = UPF_DEPTH,
  parameter int unsigned XOFF_MARGIN = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            cfg_page_log2,
  input  logic                  cfg_emulate,
  // link side
  input  logic                  link_valid,
  input  link_word_t            link_word,
  output logic                  link_xoff,
  output logic                  link_overflow,  // word lost: FIFO was full
  // generator
  input  logic                  gen_enable,
  input  logic [15:0]           gen_words,
  input  logic [31:0]           gen_run,
  input  logic [31:0]           gen_first_l1id,
  input  logic                  gen_load,
  // CPU: free pages in, used pages out
  input  logic                  fpf_wr,
  input  logic [PAGE_NUM_W-1:0] fpf_wdata,
  output logic [$clog2(FPF_D+1)-1:0] fpf_count,
  input  logic                  upf_pop,
  output upf_record_t           upf_head,
  output logic                  upf_empty,
  output logic [$clog2(UPF_D+1)-1:0] upf_count,
  output logic [31:0]           frag_count,
  // CPU buffer path
  input  logic                  cpu_wr_valid,
  input  logic [AW-1:0]         cpu_wr_addr,
  input  logic [31:0]           cpu_wr_data,
  output logic                  cpu_wr_ready,
  // readers: 0 PCI DMA, 1 GbE DMA, 2 CPU
  input  logic [2:0]            rd_valid,
  input  logic [2:0][AW-1:0]    rd_addr,
  output logic [2:0]            rd_ready,
  output logic [2:0]            rd_rvalid,
  output logic [31:0]           rd_rdata,
  // buffer memory
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [AW-1:0]         mem_addr,
  output logic [31:0]           mem_wdata,
  input  logic [31:0]           mem_rdata
);
  localparam int unsigned DCW = $clog2(DATA_DEPTH + 1);

  logic        df_wr, df_full, df_empty, df_pop;
  link_word_t  df_in, df_out;
  logic [DCW-1:0] df_count;
  logic        gen_valid, gen_ready;
  link_word_t  gen_word;
  logic        fpf_full, fpf_empty, fpf_pop;
  logic [PAGE_NUM_W-1:0] fpf_head;
  logic        upf_full, upf_push;
  upf_record_t upf_rec;
  logic        h_wr_valid, h_wr_ready;
  logic [AW-1:0] h_wr_addr;
  logic [31:0] h_wr_data;

  frag_generator u_gen (
    .clk, .rst_n, .enable(gen_enable && cfg_emulate), .cfg_words(gen_words),
    .cfg_run(gen_run), .cfg_first_l1id(gen_first_l1id), .load(gen_load),
    .out_valid(gen_valid), .out_word(gen_word), .out_ready(gen_ready), .frag_count()
  );

  assign gen_ready = cfg_emulate && !df_full;
  assign df_wr = cfg_emulate ? (gen_valid && !df_full) : (link_valid && !df_full);
  assign df_in = cfg_emulate ? gen_word : link_word;
  assign link_overflow = !cfg_emulate && link_valid && df_full;
  assign link_xoff = (df_count > DCW'(DATA_DEPTH - XOFF_MARGIN));

  sync_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(DATA_DEPTH)) u_data_fifo (
    .clk, .rst_n, .wr_en(df_wr), .wr_data(df_in), .rd_en(df_pop), .rd_data(df_out),
    .full(df_full), .empty(df_empty), .count(df_count)
  );

  sync_fifo #(.WIDTH(PAGE_NUM_W), .DEPTH(FPF_D)) u_fpf (
    .clk, .rst_n, .wr_en(fpf_wr && !fpf_full), .wr_data(fpf_wdata), .rd_en(fpf_pop),
    .rd_data(fpf_head), .full(fpf_full), .empty(fpf_empty), .count(fpf_count)
  );

  sync_fifo #(.WIDTH($bits(upf_record_t)), .DEPTH(UPF_D)) u_upf (
    .clk, .rst_n, .wr_en(upf_push), .wr_data(upf_rec), .rd_en(upf_pop && !upf_empty),
    .rd_data(upf_head), .full(upf_full), .empty(upf_empty), .count(upf_count)
  );

  input_handler #(.AW(AW)) u_handler (
    .clk, .rst_n, .cfg_page_log2,
    .in_valid(!df_empty), .in_word(df_out), .in_pop(df_pop),
    .fpf_empty, .fpf_page(fpf_head), .fpf_pop,
    .upf_full, .upf_push, .upf_rec,
    .wr_valid(h_wr_valid), .wr_addr(h_wr_addr), .wr_data(h_wr_data), .wr_ready(h_wr_ready),
    .frag_count
  );

  buffer_arbiter #(.AW(AW), .NRD(3)) u_arb (
    .clk, .rst_n,
    .wr_valid(h_wr_valid), .wr_addr(h_wr_addr), .wr_data(h_wr_data), .wr_ready(h_wr_ready),
    .cpu_wr_valid, .cpu_wr_addr, .cpu_wr_data, .cpu_wr_ready,
    .rd_valid, .rd_addr, .rd_ready, .rd_rvalid, .rd_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );
endmodule

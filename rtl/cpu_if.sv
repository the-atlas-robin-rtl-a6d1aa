// cpu_if: the FPGA side of the CPU's external bus.
//
// All communication between the processor and the FPGA runs through the
// FIFOs and dual-ported memories of the FPGA; this block decodes the CPU's
// word addresses onto them and returns read data with an acknowledge.
// Word address map (cpu_addr, 20 bits):
//   0x00000-0x007FF  R  PCI message memory
//   0x01000          R  message descriptor FIFO head      W  pop
//   0x01001          R  descriptor count [5:0], lost descriptors [31:16]
//   0x02000+0x10*c   W  free page FIFO of ROL c           R  FPF count
//   0x02004..07+0x10*c R used page record word 0..3 of ROL c (page info,
//                       L1ID, status, run number)
//   0x02008+0x10*c   W  pop used page record              R  UPF count
//   0x02009+0x10*c   R  fragments stored by ROL c
//   0x03000          RW control: [3:0] page size log2 (words), [6:4] emulation
//                       per ROL, [7] generator enable
//   0x03001/2        RW generator fragment words / run number
//   0x03003          W  generator first L1ID (loads all generators)
//   0x04000 / 0x05000 W PCI / GbE DMA FIFO               R  fill level
//   0x06000          R  GbE packet descriptor head        W  pop
//   0x06001          R  packet descriptor count           W  ring read pointer
//   0x06002 / 0x06003 R ring occupancy / dropped frames
//   0x07000          W  buffer path address {ROL [25:24], word [23:0]}
//   0x07001          W  buffer path write data (one buffer write)
//   0x07002          W  start buffer read                 R  read data
//   0x80000-0xFFFFF  R  network SRAM, word address [16:0]
// A request is a one-cycle cpu_req; cpu_ack follows one cycle later for
// registers and the message memory, and as soon as the buffer or SRAM has
// granted the access for the buffer path and the SRAM window (the CPU path
// takes the idle slots of the buffer and SRAM, so it can interfere with
// the real-time paths, as intended only for self-test and emulation). One
// request may be outstanding. The map is this design's own choice.
module cpu_if
  import robin_pkg::*;
#(
  parameter int unsigned AW      = BUF_AW,
  parameter int unsigned RING_AW = 17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [19:0]        cpu_addr,
  input  logic [31:0]        cpu_wdata,
  output logic               cpu_ack,
  output logic [31:0]        cpu_rdata,
  // configuration
  output logic [3:0]         cfg_page_log2,
  output logic [NUM_ROL-1:0] cfg_emulate,
  output logic               gen_enable,
  output logic [15:0]        gen_words,
  output logic [31:0]        gen_run,
  output logic [31:0]        gen_first_l1id,
  output logic               gen_load,
  // message memory and descriptor FIFO
  output logic               msg_rd,
  output logic [10:0]        msg_addr,
  input  logic [31:0]        msg_rdata,
  output logic               msg_desc_pop,
  input  logic [31:0]        msg_desc_head,
  input  logic [5:0]         msg_desc_count,
  input  logic [15:0]        msg_lost,
  // ROL channels
  output logic [NUM_ROL-1:0] fpf_wr,
  output logic [PAGE_NUM_W-1:0] fpf_wdata,
  input  logic [NUM_ROL-1:0][10:0] fpf_count,
  output logic [NUM_ROL-1:0] upf_pop,
  input  upf_record_t [NUM_ROL-1:0] upf_head,
  input  logic [NUM_ROL-1:0][8:0]  upf_count,
  input  logic [NUM_ROL-1:0][31:0] frag_count,
  // DMA FIFOs
  output logic               pci_dma_wr,
  output logic               gbe_dma_wr,
  output logic [31:0]        dma_wdata,
  input  logic [9:0]         pci_dma_count,
  input  logic [9:0]         gbe_dma_count,
  // GbE receive buffer
  output logic               gbe_desc_pop,
  input  logic [31:0]        gbe_desc_head,
  input  logic [5:0]         gbe_desc_count,
  output logic               gbe_rd_ptr_wr,
  output logic [RING_AW:0]   gbe_rd_ptr,
  input  logic [RING_AW:0]   gbe_occupancy,
  input  logic [15:0]        gbe_drops,
  output logic               sram_rd_valid,
  output logic [RING_AW-1:0] sram_rd_addr,
  input  logic               sram_rd_ready,
  input  logic               sram_rvalid,
  input  logic [31:0]        sram_rdata,
  // buffer path
  output logic [NUM_ROL-1:0] buf_wr_valid,
  output logic [AW-1:0]      buf_addr,
  output logic [31:0]        buf_wdata,
  input  logic [NUM_ROL-1:0] buf_wr_ready,
  output logic [NUM_ROL-1:0] buf_rd_valid,
  input  logic [NUM_ROL-1:0] buf_rd_ready,
  input  logic [NUM_ROL-1:0] buf_rvalid,
  input  logic [NUM_ROL-1:0][31:0] buf_rdata
);
  typedef enum logic [2:0] {C_IDLE, C_REG, C_SRAM, C_SRAM_D, C_BW, C_BR, C_BR_D} cstate_e;
  cstate_e state;

  logic [1:0]  buf_ch;
  logic [31:0] buf_rd_q, rdata_q;
  logic [19:0] addr_q;
  logic        is_msg;
  logic [1:0]  ch_sel;
  logic [3:0]  reg_sel;

  assign is_msg  = (cpu_addr[19:11] == 9'h0);
  assign ch_sel  = cpu_addr[5:4];
  assign reg_sel = cpu_addr[3:0];

  // message memory is read synchronously, in the same cycle as the request
  assign msg_rd   = cpu_req && !cpu_we && is_msg;
  assign msg_addr = cpu_addr[10:0];

  assign sram_rd_valid = (state == C_SRAM);
  assign sram_rd_addr  = addr_q[RING_AW-1:0];
  always_comb begin
    buf_wr_valid = '0;
    buf_rd_valid = '0;
    if (state == C_BW) buf_wr_valid[buf_ch] = 1'b1;
    if (state == C_BR) buf_rd_valid[buf_ch] = 1'b1;
  end

  // register read multiplexer
  always_comb begin
    rdata_q = '0;
    case (addr_q[19:12])
      8'h01: rdata_q = addr_q[0] ? {msg_lost, 10'h0, msg_desc_count} : msg_desc_head;
      8'h02: if (addr_q[5:4] < 2'(NUM_ROL)) begin
        case (addr_q[3:0])
          4'h0: rdata_q = 32'(fpf_count[addr_q[5:4]]);
          4'h4: rdata_q = upf_head[addr_q[5:4]][31:0];
          4'h5: rdata_q = upf_head[addr_q[5:4]][63:32];
          4'h6: rdata_q = upf_head[addr_q[5:4]][95:64];
          4'h7: rdata_q = upf_head[addr_q[5:4]][127:96];
          4'h8: rdata_q = 32'(upf_count[addr_q[5:4]]);
          4'h9: rdata_q = frag_count[addr_q[5:4]];
          default: ;
        endcase
      end
      8'h03: case (addr_q[1:0])
        2'd0: rdata_q = {24'h0, gen_enable, 3'(cfg_emulate), cfg_page_log2};
        2'd1: rdata_q = 32'(gen_words);
        2'd2: rdata_q = gen_run;
        default: rdata_q = gen_first_l1id;
      endcase
      8'h04: rdata_q = 32'(pci_dma_count);
      8'h05: rdata_q = 32'(gbe_dma_count);
      8'h06: case (addr_q[1:0])
        2'd0: rdata_q = gbe_desc_head;
        2'd1: rdata_q = 32'(gbe_desc_count);
        2'd2: rdata_q = 32'(gbe_occupancy);
        default: rdata_q = 32'(gbe_drops);
      endcase
      8'h07: rdata_q = buf_rd_q;
      default: rdata_q = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      cpu_ack <= 1'b0;
      cpu_rdata <= '0;
      addr_q <= '0;
      cfg_page_log2 <= 4'd9;        // 2 kB pages
      cfg_emulate <= '0;
      gen_enable <= 1'b0;
      gen_words <= 16'd256;
      gen_run <= '0;
      gen_first_l1id <= '0;
      gen_load <= 1'b0;
      msg_desc_pop <= 1'b0;
      fpf_wr <= '0;
      fpf_wdata <= '0;
      upf_pop <= '0;
      pci_dma_wr <= 1'b0;
      gbe_dma_wr <= 1'b0;
      dma_wdata <= '0;
      gbe_desc_pop <= 1'b0;
      gbe_rd_ptr_wr <= 1'b0;
      gbe_rd_ptr <= '0;
      buf_ch <= '0;
      buf_addr <= '0;
      buf_wdata <= '0;
      buf_rd_q <= '0;
    end else begin
      cpu_ack <= 1'b0;
      gen_load <= 1'b0;
      msg_desc_pop <= 1'b0;
      fpf_wr <= '0;
      upf_pop <= '0;
      pci_dma_wr <= 1'b0;
      gbe_dma_wr <= 1'b0;
      gbe_desc_pop <= 1'b0;
      gbe_rd_ptr_wr <= 1'b0;
      case (state)
        C_IDLE: if (cpu_req) begin
          addr_q <= cpu_addr;
          state <= C_REG;
          if (cpu_addr[19]) begin
            if (!cpu_we) state <= C_SRAM;
          end else if (cpu_we) begin
            case (cpu_addr[19:12])
              8'h01: msg_desc_pop <= 1'b1;
              8'h02: if (ch_sel < 2'(NUM_ROL)) begin
                if (reg_sel == 4'h0) begin
                  fpf_wr[ch_sel] <= 1'b1;
                  fpf_wdata <= PAGE_NUM_W'(cpu_wdata);
                end
                if (reg_sel == 4'h8) upf_pop[ch_sel] <= 1'b1;
              end
              8'h03: case (cpu_addr[1:0])
                2'd0: begin
                  cfg_page_log2 <= (cpu_wdata[3:0] < 4'd8) ? 4'd8 : cpu_wdata[3:0];
                  cfg_emulate <= cpu_wdata[4 +: NUM_ROL];
                  gen_enable <= cpu_wdata[7];
                end
                2'd1: gen_words <= cpu_wdata[15:0];
                2'd2: gen_run <= cpu_wdata;
                default: begin
                  gen_first_l1id <= cpu_wdata;
                  gen_load <= 1'b1;
                end
              endcase
              8'h04: begin pci_dma_wr <= 1'b1; dma_wdata <= cpu_wdata; end
              8'h05: begin gbe_dma_wr <= 1'b1; dma_wdata <= cpu_wdata; end
              8'h06: begin
                if (cpu_addr[1:0] == 2'd0) gbe_desc_pop <= 1'b1;
                if (cpu_addr[1:0] == 2'd1) begin
                  gbe_rd_ptr_wr <= 1'b1;
                  gbe_rd_ptr <= (RING_AW+1)'(cpu_wdata);
                end
              end
              8'h07: case (cpu_addr[1:0])
                2'd0: begin
                  buf_ch <= (cpu_wdata[25:24] < 2'(NUM_ROL)) ? cpu_wdata[25:24] : 2'd0;
                  buf_addr <= AW'(cpu_wdata[23:0]);
                end
                2'd1: begin
                  buf_wdata <= cpu_wdata;
                  state <= C_BW;
                end
                2'd2: state <= C_BR;
                default: ;
              endcase
              default: ;
            endcase
          end
        end
        C_REG: begin
          cpu_ack <= 1'b1;
          cpu_rdata <= (addr_q[19:11] == 9'h0) ? msg_rdata : rdata_q;
          state <= C_IDLE;
        end
        C_SRAM: if (sram_rd_ready) state <= C_SRAM_D;
        C_SRAM_D: if (sram_rvalid) begin
          cpu_ack <= 1'b1;
          cpu_rdata <= sram_rdata;
          state <= C_IDLE;
        end
        C_BW: if (buf_wr_ready[buf_ch]) begin
          cpu_ack <= 1'b1;
          buf_addr <= buf_addr + 1'b1;
          state <= C_IDLE;
        end
        C_BR: if (buf_rd_ready[buf_ch]) state <= C_BR_D;
        C_BR_D: if (buf_rvalid[buf_ch]) begin
          cpu_ack <= 1'b1;
          buf_rd_q <= buf_rdata[buf_ch];
          buf_addr <= buf_addr + 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
                                      cpu_req |-> state == C_IDLE);
endmodule

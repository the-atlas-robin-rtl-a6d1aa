// dma_engine: builds responses from a CPU-written DMA FIFO and buffer data.
//
// The CPU writes a descriptor and then any header words into the 512-word
// DMA FIFO; several responses can be queued this way. The engine pops the
// descriptor, forwards the given number of header words from the FIFO to
// the output, and then appends the given number of words read from the
// selected ROL buffer, starting at the buffer offset. PCI and GbE each have
// an engine of their own. Descriptor words (own layout):
//   word 0: [9:0] header words, [17:16] ROL channel, [20] odd16 (GbE only:
//           the last header word carries only its lower 16 bits)
//   word 1: [24:0] buffer data words
//   word 2: [23:0] buffer word offset
//   word 3: destination byte address (only when HAS_DEST, the PCI engine)
// The output is a word stream with valid/ready, a byte keep mask, sof/last
// markers and, for PCI, the destination byte address of each word.
//
// Timing: header words move one per cycle; buffer words one per read slot
// granted by the channel's arbiter (at best one every second cycle), with
// one read outstanding; the next read is issued while the held word is
// being accepted. From the design: FIFO size, descriptor contents,
// header-then-buffer order, odd 16-bit header termination for GbE.
module dma_engine
  import robin_pkg::*;
#(
  parameter int unsigned AW       = BUF_AW,
  parameter int unsigned DEPTH    = DMA_FIFO_DEPTH,
  parameter bit          HAS_DEST = 1'b1,
  parameter bit          ODD16_EN = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU side of the DMA FIFO
  input  logic                 fifo_wr,
  input  logic [31:0]          fifo_wdata,
  output logic [$clog2(DEPTH+1)-1:0] fifo_count,
  output logic                 fifo_full,
  // buffer read ports, one per ROL
  output logic [NUM_ROL-1:0]   rd_valid,
  output logic [AW-1:0]        rd_addr,
  input  logic [NUM_ROL-1:0]   rd_ready,
  input  logic [NUM_ROL-1:0]   rd_rvalid,
  input  logic [NUM_ROL-1:0][31:0] rd_rdata,
  // output stream
  output logic                 out_valid,
  output logic [31:0]          out_data,
  output logic [3:0]           out_keep,
  output logic                 out_sof,
  output logic                 out_last,
  output logic [31:0]          out_addr,
  input  logic                 out_ready,
  output logic                 busy,
  output logic [31:0]          resp_count
);
  typedef enum logic [2:0] {D_W0, D_W1, D_W2, D_W3, D_HDR, D_BUF} dstate_e;
  dstate_e state;

  logic        f_empty, f_pop;
  logic [31:0] f_head;
  logic [9:0]  hdr_left;
  logic [24:0] buf_left;
  logic [AW-1:0] buf_ptr;
  logic [1:0]  rol;
  logic        odd16, first;
  logic [31:0] dest;
  logic        pending, hold_v;
  logic [31:0] hold_d;
  logic        fire;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr && !fifo_full), .wr_data(fifo_wdata), .rd_en(f_pop),
    .rd_data(f_head), .full(fifo_full), .empty(f_empty), .count(fifo_count)
  );

  assign busy = (state != D_W0);
  assign fire = out_valid && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_data  = f_head;
    out_keep  = 4'hF;
    out_last  = 1'b0;
    f_pop     = 1'b0;
    case (state)
      D_W0, D_W1, D_W2, D_W3: f_pop = !f_empty;
      D_HDR: begin
        out_valid = !f_empty;
        out_last  = (hdr_left == 10'd1) && (buf_left == '0);
        if (ODD16_EN && odd16 && hdr_left == 10'd1) out_keep = 4'h3;
        f_pop = fire;
      end
      D_BUF: begin
        out_valid = hold_v;
        out_data  = hold_d;
        out_last  = (buf_left == 25'd1);
      end
      default: ;
    endcase
  end
  assign out_sof  = first;
  assign out_addr = dest;
  assign rd_addr  = buf_ptr;

  always_comb begin
    rd_valid = '0;
    if (state == D_BUF && !pending && (!hold_v || out_ready) && buf_left > 25'(hold_v))
      rd_valid[rol] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_W0;
      hdr_left <= '0;
      buf_left <= '0;
      buf_ptr <= '0;
      rol <= '0;
      odd16 <= 1'b0;
      first <= 1'b0;
      dest <= '0;
      pending <= 1'b0;
      hold_v <= 1'b0;
      hold_d <= '0;
      resp_count <= '0;
    end else begin
      if (fire) begin
        first <= 1'b0;
        dest <= dest + 32'd4;
      end
      case (state)
        D_W0: if (!f_empty) begin
          hdr_left <= f_head[9:0];
          rol      <= (f_head[17:16] < 2'(NUM_ROL)) ? f_head[17:16] : 2'd0;
          odd16    <= f_head[20];
          state    <= D_W1;
        end
        D_W1: if (!f_empty) begin
          buf_left <= f_head[24:0];
          state    <= D_W2;
        end
        D_W2: if (!f_empty) begin
          buf_ptr <= AW'(f_head);
          first   <= 1'b1;
          dest    <= '0;
          if (HAS_DEST) state <= D_W3;
          else if (hdr_left != '0) state <= D_HDR;
          else if (buf_left != '0) state <= D_BUF;
          else begin
            state <= D_W0;
            first <= 1'b0;
          end
        end
        D_W3: if (!f_empty) begin
          dest <= f_head;
          if (hdr_left != '0) state <= D_HDR;
          else if (buf_left != '0) state <= D_BUF;
          else begin
            state <= D_W0;
            first <= 1'b0;
          end
        end
        D_HDR: if (fire) begin
          hdr_left <= hdr_left - 1'b1;
          if (hdr_left == 10'd1) begin
            if (buf_left != '0) state <= D_BUF;
            else begin
              state <= D_W0;
              resp_count <= resp_count + 1'b1;
            end
          end
        end
        D_BUF: begin
          if (rd_valid[rol] && rd_ready[rol]) begin
            pending <= 1'b1;
            buf_ptr <= buf_ptr + 1'b1;
          end
          if (pending && rd_rvalid[rol]) begin
            pending <= 1'b0;
            hold_v <= 1'b1;
            hold_d <= rd_rdata[rol];
          end
          if (fire) begin
            hold_v <= 1'b0;
            buf_left <= buf_left - 1'b1;
            if (buf_left == 25'd1) begin
              state <= D_W0;
              resp_count <= resp_count + 1'b1;
            end
          end
        end
        default: state <= D_W0;
      endcase
    end
  end

  a_hold_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_valid && !out_ready |=> out_valid);
endmodule

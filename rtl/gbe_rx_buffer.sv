// gbe_rx_buffer: stores received Ethernet frames in the external network
// SRAM, organised as a ring buffer, and queues one descriptor per frame.
//
// Bytes from the receive MAC are packed little-endian into 32-bit words and
// written at the ring's write pointer. At the end of a good frame a
// descriptor {byte size [31:17], word offset [16:0]} is pushed into the
// packet descriptor FIFO; a frame with a bad check sequence, one that does
// not fit into the ring or finds the FIFO full is dropped by rewinding the
// write pointer (counted in drop_count). Every frame starts on a word
// boundary. The CPU frees space by writing its read pointer (cpu_rd_ptr_wr)
// once it has consumed frames, and reads frame data through the SRAM read
// port, which is served whenever the frame writer does not need the SRAM
// (read data one cycle after the accepted request). A flow-control request
// (fc_req) is raised while the number of queued descriptors or the ring
// occupancy is at or above a fixed threshold; the transmit MAC turns it into
// a pause message. From the design: direct transfer into the SRAM ring,
// descriptor FIFO with size and offset, flow control on either threshold.
// Own choices: the threshold values, the descriptor layout, the drop rule.
module gbe_rx_buffer #(
  parameter int unsigned RING_AW     = 17,   // 512 kB SRAM = 128k words
  parameter int unsigned DESC_D      = 32,
  parameter int unsigned FC_DESC_TH  = 24,
  parameter int unsigned FC_OCC_TH   = 3 * (1 << RING_AW) / 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the receive MAC
  input  logic               in_valid,
  input  logic [7:0]         in_data,
  input  logic               in_sof,
  input  logic               in_eof,
  input  logic               in_good,
  // SRAM port
  output logic               sram_en,
  output logic               sram_we,
  output logic [RING_AW-1:0] sram_addr,
  output logic [31:0]        sram_wdata,
  input  logic [31:0]        sram_rdata,
  // CPU side
  input  logic               desc_pop,
  output logic [31:0]        desc_head,
  output logic               desc_empty,
  output logic [$clog2(DESC_D+1)-1:0] desc_count,
  input  logic               cpu_rd_ptr_wr,
  input  logic [RING_AW:0]   cpu_rd_ptr,
  input  logic               cpu_rd_valid,
  input  logic [RING_AW-1:0] cpu_rd_addr,
  output logic               cpu_rd_ready,
  output logic               cpu_rvalid,
  output logic [31:0]        cpu_rdata,
  output logic [RING_AW:0]   occupancy,
  output logic               fc_req,
  output logic [15:0]        drop_count,
  output logic [31:0]        frame_count
);
  localparam int unsigned RING_WORDS = 1 << RING_AW;

  logic [RING_AW:0] wr_ptr, frm_start, rd_ptr;
  logic [31:0] pack;
  logic [1:0]  bpos;
  logic [15:0] fbytes;
  logic        in_frame, overflow;
  logic        word_wr;          // a packed word is waiting for the SRAM
  logic [31:0] word_d;
  logic [RING_AW:0] word_ptr;
  logic        desc_full, desc_push;
  logic [31:0] desc_d;
  logic        rv_q;

  assign occupancy = wr_ptr - rd_ptr;
  assign fc_req = (desc_count >= $bits(desc_count)'(FC_DESC_TH)) ||
                  (occupancy >= (RING_AW+1)'(FC_OCC_TH));

  // SRAM: frame writes first, CPU reads otherwise
  assign sram_en      = word_wr || cpu_rd_valid;
  assign sram_we      = word_wr;
  assign sram_addr    = word_wr ? word_ptr[RING_AW-1:0] : cpu_rd_addr;
  assign sram_wdata   = word_d;
  assign cpu_rd_ready = !word_wr;
  assign cpu_rvalid   = rv_q;
  assign cpu_rdata    = sram_rdata;

  sync_fifo #(.WIDTH(32), .DEPTH(DESC_D)) u_desc (
    .clk, .rst_n, .wr_en(desc_push), .wr_data(desc_d), .rd_en(desc_pop && !desc_empty),
    .rd_data(desc_head), .full(desc_full), .empty(desc_empty), .count(desc_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      frm_start <= '0;
      rd_ptr <= '0;
      pack <= '0;
      bpos <= '0;
      fbytes <= '0;
      in_frame <= 1'b0;
      overflow <= 1'b0;
      word_wr <= 1'b0;
      word_d <= '0;
      word_ptr <= '0;
      desc_push <= 1'b0;
      desc_d <= '0;
      drop_count <= '0;
      frame_count <= '0;
      rv_q <= 1'b0;
    end else begin
      rv_q <= cpu_rd_valid && !word_wr;
      word_wr <= 1'b0;
      desc_push <= 1'b0;
      if (cpu_rd_ptr_wr) rd_ptr <= cpu_rd_ptr;
      if (in_valid) begin
        logic [31:0] p;
        logic [RING_AW:0] wp;
        p  = in_sof ? 32'h0 : pack;
        wp = in_sof ? frm_start : wr_ptr;
        p[8*bpos +: 8] = in_data;
        if (in_sof) begin
          in_frame <= 1'b1;
          overflow <= 1'b0;
          fbytes <= 16'd1;
          p = {24'h0, in_data};
        end else begin
          fbytes <= fbytes + 1'b1;
        end
        pack <= p;
        if ((in_sof ? 2'd0 : bpos) == 2'd3) begin
          // word complete: write it if the ring has room
          if ((wp - rd_ptr) < (RING_AW+1)'(RING_WORDS)) begin
            word_wr <= 1'b1;
            word_d <= p;
            word_ptr <= wp;
            wr_ptr <= wp + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
          bpos <= 2'd0;
        end else begin
          bpos <= (in_sof ? 2'd0 : bpos) + 1'b1;
          wr_ptr <= wp;
        end
      end
      if (in_eof && in_frame) begin
        logic [RING_AW:0] endp;
        in_frame <= 1'b0;
        bpos <= 2'd0;
        endp = wr_ptr;
        if (bpos != 2'd0) begin   // flush the partial last word
          if ((wr_ptr - rd_ptr) < (RING_AW+1)'(RING_WORDS)) begin
            word_wr <= 1'b1;
            word_d <= pack;
            word_ptr <= wr_ptr;
            endp = wr_ptr + 1'b1;
          end
        end
        if (in_good && !overflow && !desc_full &&
            ((bpos == 2'd0) || ((wr_ptr - rd_ptr) < (RING_AW+1)'(RING_WORDS)))) begin
          desc_push <= 1'b1;
          desc_d <= {fbytes[14:0], 17'(frm_start[RING_AW-1:0])};
          frm_start <= endp;
          wr_ptr <= endp;
          frame_count <= frame_count + 1'b1;
        end else begin
          wr_ptr <= frm_start;      // drop: rewind
          drop_count <= drop_count + 1'b1;
        end
      end
    end
  end

  a_eof_alone: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && in_eof));
endmodule

// msg_dpr_if: PCI message input, a dual-ported message memory plus a
// message descriptor FIFO.
//
// The host sends a message in two steps over the PCI bridge's local bus:
// first it writes the message words into the 2 kWord (8 kB) dual-ported
// memory, then it writes one 32-bit descriptor (offset and length of the
// message) into the 32-entry descriptor FIFO. The CPU sees a message as
// soon as the descriptor FIFO is non-empty and reads the message words from
// the memory through its own port, which allows burst (pre-fetching) reads.
// Local-bus addresses: word addresses 0..DPR_WORDS-1 select the memory,
// address DPR_WORDS selects the descriptor FIFO; writes to a full FIFO are
// dropped and counted in lost_desc. CPU memory reads return data one cycle
// after cpu_rd. Sizes follow the design; the address map is own choice.
module msg_dpr_if
  import robin_pkg::*;
#(
  parameter int unsigned DPR_WORDS = MSG_DPR_WORDS,
  parameter int unsigned FIFO_D    = MSG_FIFO_DEPTH,
  localparam int unsigned DAW = $clog2(DPR_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // local bus (host) write side
  input  logic           lb_wr,
  input  logic [DAW:0]   lb_addr,
  input  logic [31:0]    lb_wdata,
  // CPU side
  input  logic           cpu_rd,
  input  logic [DAW-1:0] cpu_addr,
  output logic [31:0]    cpu_rdata,
  input  logic           desc_pop,
  output logic [31:0]    desc_head,
  output logic           desc_empty,
  output logic [$clog2(FIFO_D+1)-1:0] desc_count,
  output logic [15:0]    lost_desc
);
  logic [31:0] dpr [DPR_WORDS];
  logic desc_full, desc_wr;

  assign desc_wr = lb_wr && lb_addr[DAW];

  always_ff @(posedge clk) begin
    if (lb_wr && !lb_addr[DAW]) dpr[lb_addr[DAW-1:0]] <= lb_wdata;
    if (cpu_rd) cpu_rdata <= dpr[cpu_addr];
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_D)) u_desc (
    .clk, .rst_n, .wr_en(desc_wr && !desc_full), .wr_data(lb_wdata),
    .rd_en(desc_pop && !desc_empty), .rd_data(desc_head), .full(desc_full),
    .empty(desc_empty), .count(desc_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lost_desc <= '0;
    else if (desc_wr && desc_full) lost_desc <= lost_desc + 1'b1;
  end
endmodule

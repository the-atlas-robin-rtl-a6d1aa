// buffer_arbiter: shares the single port of one ROL buffer memory between
// the write path (link input) and the read paths (DMA engines, CPU).
//
// The buffer is used in a virtual dual-ported way with a fixed 1:1 time
// slice: cycles alternate between a write slot and a read slot, so the
// link input is guaranteed half of the memory cycles whatever the readers
// do. In the write slot the input handler's write is performed; if it has
// none, a CPU write (self-test / emulation path) may take the slot. In the
// read slot one of the readers (PCI DMA, GbE DMA, CPU) is served, chosen
// round-robin among those requesting. The memory is a synchronous port with
// a read latency of one cycle: rd_rvalid[i] and rd_rdata follow one cycle
// after the accepted request rd_valid[i] && rd_ready[i].
//
// From the design: the fixed 1:1 time-slice arbitration of write and read,
// the CPU path that competes with the other two. Own choices: round-robin
// among readers, CPU writes only in idle write slots, one-cycle latency.
module buffer_arbiter #(
  parameter int unsigned AW = robin_pkg::BUF_AW,
  parameter int unsigned NRD = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // link write path
  input  logic                wr_valid,
  input  logic [AW-1:0]       wr_addr,
  input  logic [31:0]         wr_data,
  output logic                wr_ready,
  // CPU write path
  input  logic                cpu_wr_valid,
  input  logic [AW-1:0]       cpu_wr_addr,
  input  logic [31:0]         cpu_wr_data,
  output logic                cpu_wr_ready,
  // read paths
  input  logic [NRD-1:0]      rd_valid,
  input  logic [NRD-1:0][AW-1:0] rd_addr,
  output logic [NRD-1:0]      rd_ready,
  output logic [NRD-1:0]      rd_rvalid,
  output logic [31:0]         rd_rdata,
  // memory port
  output logic                mem_en,
  output logic                mem_we,
  output logic [AW-1:0]       mem_addr,
  output logic [31:0]         mem_wdata,
  input  logic [31:0]         mem_rdata
);
  localparam int unsigned RW = (NRD > 1) ? $clog2(NRD) : 1;
  logic write_slot;
  logic [RW-1:0] last_rd, pick;
  logic pick_ok;
  logic [NRD-1:0] rvalid_q;

  // round-robin pick, starting after the reader served last
  always_comb begin
    pick = '0;
    pick_ok = 1'b0;
    for (int k = 1; k <= NRD; k++) begin
      int unsigned c;
      c = (int'(last_rd) + k) % NRD;
      if (!pick_ok && rd_valid[c]) begin
        pick = RW'(c);
        pick_ok = 1'b1;
      end
    end
  end

  always_comb begin
    wr_ready     = write_slot;
    cpu_wr_ready = write_slot && !wr_valid;
    rd_ready     = '0;
    if (!write_slot && pick_ok) rd_ready[pick] = 1'b1;
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = wr_data;
    if (write_slot) begin
      if (wr_valid) begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = wr_addr; mem_wdata = wr_data;
      end else if (cpu_wr_valid) begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = cpu_wr_addr; mem_wdata = cpu_wr_data;
      end
    end else if (pick_ok) begin
      mem_en = 1'b1;
      mem_addr = rd_addr[pick];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_slot <= 1'b1;
      last_rd <= RW'(NRD - 1);
      rvalid_q <= '0;
    end else begin
      write_slot <= !write_slot;
      rvalid_q <= rd_ready;
      if (!write_slot && pick_ok) last_rd <= pick;
    end
  end

  assign rd_rvalid = rvalid_q;
  assign rd_rdata  = mem_rdata;

  a_slots: assert property (@(posedge clk) disable iff (!rst_n)
                            !(mem_we && (|rd_ready)));
  a_onehot_rd: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_ready));
endmodule

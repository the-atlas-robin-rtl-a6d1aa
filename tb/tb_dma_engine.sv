// tb_dma_engine: queues several responses (header only, buffer only, both,
// all three channels) into a PCI-style engine (with destination address)
// and a GbE-style engine (odd 16-bit header end), with randomly stalled
// buffer read grants and output ready, and checks every output word, its
// keep mask, sof/last markers and PCI destination address. It also checks
// the one-word-per-two-cycles buffer read rate with an always-ready sink.
module tb_dma_engine;
  import robin_pkg::*;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] bufword(int ch, logic [AW-1:0] a);
    return {8'(ch + 1), 8'hA5, 16'(a)};
  endfunction

  typedef struct { logic [31:0] d; logic [3:0] k; bit sof; bit last; logic [31:0] a; } ow_t;

  // ---- two engines with their own buffer models
  logic        fifo_wr [2];
  logic [31:0] fifo_wdata [2];
  logic [NUM_ROL-1:0] rd_valid [2], rd_ready [2], rd_rvalid [2];
  logic [AW-1:0] rd_addr [2];
  logic [NUM_ROL-1:0][31:0] rd_rdata [2];
  logic out_valid [2], out_sof [2], out_last [2], out_ready [2];
  logic [31:0] out_data [2], out_addr [2];
  logic [3:0] out_keep [2];
  logic [31:0] resp_count [2];
  bit always_ready, slot;

  dma_engine #(.AW(AW), .DEPTH(512), .HAS_DEST(1'b1), .ODD16_EN(1'b0)) u_pci (
    .clk, .rst_n, .fifo_wr(fifo_wr[0]), .fifo_wdata(fifo_wdata[0]), .fifo_count(), .fifo_full(),
    .rd_valid(rd_valid[0]), .rd_addr(rd_addr[0]), .rd_ready(rd_ready[0]),
    .rd_rvalid(rd_rvalid[0]), .rd_rdata(rd_rdata[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_keep(out_keep[0]),
    .out_sof(out_sof[0]), .out_last(out_last[0]), .out_addr(out_addr[0]),
    .out_ready(out_ready[0]), .busy(), .resp_count(resp_count[0]));
  dma_engine #(.AW(AW), .DEPTH(512), .HAS_DEST(1'b0), .ODD16_EN(1'b1)) u_gbe (
    .clk, .rst_n, .fifo_wr(fifo_wr[1]), .fifo_wdata(fifo_wdata[1]), .fifo_count(), .fifo_full(),
    .rd_valid(rd_valid[1]), .rd_addr(rd_addr[1]), .rd_ready(rd_ready[1]),
    .rd_rvalid(rd_rvalid[1]), .rd_rdata(rd_rdata[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_keep(out_keep[1]),
    .out_sof(out_sof[1]), .out_last(out_last[1]), .out_addr(out_addr[1]),
    .out_ready(out_ready[1]), .busy(), .resp_count(resp_count[1]));

  ow_t expq [2][$];
  int got [2] = '{0, 0};
  int bufreads = 0, first_rd = -1, last_rd = -1, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    slot <= !slot;
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < NUM_ROL; c++) begin
        rd_rvalid[e][c] <= rd_valid[e][c] && rd_ready[e][c];
        if (rd_valid[e][c] && rd_ready[e][c]) begin
          rd_rdata[e][c] <= bufword(c, rd_addr[e]);
          if (e == 0) begin
            bufreads++;
            if (first_rd < 0) first_rd = cyc;
            last_rd = cyc;
          end
        end
      end
      if (out_valid[e] && out_ready[e]) begin
        ow_t x;
        got[e]++;
        if (expq[e].size() == 0) check(0, "unexpected output word");
        else begin
          x = expq[e].pop_front();
          check(out_data[e] == x.d, $sformatf("eng %0d data %h exp %h", e, out_data[e], x.d));
          check(out_keep[e] == x.k, $sformatf("eng %0d keep", e));
          check(out_sof[e] == x.sof && out_last[e] == x.last, $sformatf("eng %0d sof/last", e));
          if (e == 0) check(out_addr[e] == x.a, "pci destination address");
        end
      end
    end
  end

  always @(negedge clk) begin
    for (int e = 0; e < 2; e++) begin
      out_ready[e] = always_ready || ($urandom_range(0, 3) != 0);
      // the grant appears only in "read slots", every second cycle, at random
      for (int c = 0; c < NUM_ROL; c++)
        rd_ready[e][c] = always_ready ? slot : (slot && $urandom_range(0, 2) != 0);
    end
  end

  task automatic wr(input int e, input logic [31:0] d);
    @(negedge clk);
    fifo_wr[e] = 1; fifo_wdata[e] = d;
    @(negedge clk);
    fifo_wr[e] = 0;
  endtask

  task automatic response(input int e, input int nh, input int nb, input int ch, input logic [AW-1:0] off,
                          input bit odd16, input logic [31:0] dest);
    int n;
    n = nh + nb;
    wr(e, {11'h0, odd16, 2'b0, 2'(ch), 6'h0, 10'(nh)});
    wr(e, 32'(nb));
    wr(e, 32'(off));
    if (e == 0) wr(e, dest);
    for (int i = 0; i < nh; i++) begin
      ow_t x;
      x.d = 32'hBEEF0000 + 32'(i);
      x.k = (e == 1 && odd16 && i == nh - 1) ? 4'h3 : 4'hF;
      x.sof = (i == 0); x.last = (i == n - 1); x.a = dest + 32'(4 * i);
      expq[e].push_back(x);
      wr(e, x.d);
    end
    for (int i = 0; i < nb; i++) begin
      ow_t x;
      x.d = bufword(ch, off + AW'(i));
      x.k = 4'hF;
      x.sof = (nh == 0 && i == 0); x.last = (nh + i == n - 1); x.a = dest + 32'(4 * (nh + i));
      expq[e].push_back(x);
    end
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((expq[0].size() > 0 || expq[1].size() > 0) && t < 100000) begin
      @(posedge clk);
      t++;
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    always_ready = 0;
    slot = 0;
    for (int e = 0; e < 2; e++) begin
      fifo_wr[e] = 0; fifo_wdata[e] = 0; rd_rvalid[e] = '0; rd_rdata[e] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    response(0, 3, 20, 0, 16'h0100, 0, 32'h8000_0000);
    response(0, 0, 7, 2, 16'h2000, 0, 32'h9000_0010);
    response(0, 5, 0, 1, 16'h0000, 0, 32'hA000_0000);
    response(0, 1, 300, 1, 16'h4000, 0, 32'h0001_0000);
    response(1, 4, 10, 1, 16'h0300, 1, 0);
    response(1, 3, 6, 2, 16'h0500, 0, 0);
    response(1, 1, 0, 0, 16'h0000, 1, 0);
    drain();
    check(expq[0].size() == 0 && expq[1].size() == 0, "all words delivered");
    check(resp_count[0] == 4 && resp_count[1] == 3, "response counts");
    // rate: 100 buffer words with an always-ready sink and a grant every second cycle
    always_ready = 1;
    bufreads = 0; first_rd = -1;
    response(0, 0, 100, 0, 16'h1000, 0, 32'h0);
    drain();
    check(bufreads == 100, "buffer reads");
    check(last_rd - first_rd == 198, $sformatf("one buffer word per two cycles (%0d)", last_rd - first_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gbe_rx_buffer: feeds frames into a small ring (256 words) and checks
// the SRAM contents (packed little-endian, wrapping at the ring end), each
// descriptor (size and offset), dropping of bad frames and of frames that
// do not fit, the flow-control request on both thresholds and its release
// when the CPU moves the read pointer, and CPU reads through the SRAM port.
module tb_gbe_rx_buffer;
  localparam int RAW = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof, in_eof, in_good;
  logic [7:0] in_data;
  logic sram_en, sram_we;
  logic [RAW-1:0] sram_addr, cpu_rd_addr;
  logic [31:0] sram_wdata, sram_rdata, desc_head, cpu_rdata, frame_count;
  logic desc_pop, desc_empty, cpu_rd_ptr_wr, cpu_rd_valid, cpu_rd_ready, cpu_rvalid, fc_req;
  logic [3:0] desc_count;
  logic [RAW:0] cpu_rd_ptr, occupancy;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  gbe_rx_buffer #(.RING_AW(RAW), .DESC_D(8), .FC_DESC_TH(6), .FC_OCC_TH(200)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] sram [1 << RAW];
  always_ff @(posedge clk) if (sram_en) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    else sram_rdata <= sram[sram_addr];
  end

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

  typedef logic [7:0] bytes_t[$];
  bytes_t sent[$];

  task automatic frame(input int n, input bit good, output bytes_t p);
    p = {};
    for (int i = 0; i < n; i++) p.push_back(8'($urandom));
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1; in_data = p[i]; in_sof = (i == 0);
      @(negedge clk); in_valid = 0; in_sof = 0;     // GMII pace is slower than one byte/cycle here
    end
    @(negedge clk); in_eof = 1; in_good = good;
    @(negedge clk); in_eof = 0; in_good = 0;
    repeat (2) @(negedge clk);
  endtask

  // check a frame through the CPU read port
  task automatic check_stored(input bytes_t p, input string tag);
    int off, size;
    check(!desc_empty, {tag, ": descriptor present"});
    off = int'(desc_head[16:0]);
    size = int'(desc_head[31:17]);
    check(size == p.size(), $sformatf("%s: size %0d/%0d", tag, size, p.size()));
    for (int w = 0; w < (p.size() + 3) / 4; w++) begin
      logic [31:0] d;
      @(negedge clk); cpu_rd_valid = 1; cpu_rd_addr = RAW'(off + w);
      while (!cpu_rd_ready) @(negedge clk);
      @(negedge clk); cpu_rd_valid = 0;
      check(cpu_rvalid, {tag, ": rvalid"});
      d = cpu_rdata;
      for (int b = 0; b < 4; b++) if (4*w + b < p.size())
        check(d[8*b +: 8] == p[4*w + b], $sformatf("%s: byte %0d", tag, 4*w + b));
    end
    @(negedge clk); desc_pop = 1; @(negedge clk); desc_pop = 0;
  endtask

  initial begin
    bytes_t a, b, c, d, e;
    in_valid = 0; in_sof = 0; in_eof = 0; in_good = 0; in_data = 0;
    desc_pop = 0; cpu_rd_ptr_wr = 0; cpu_rd_ptr = 0; cpu_rd_valid = 0; cpu_rd_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(64, 1, a);          // 16 words at 0
    frame(101, 0, b);         // bad: dropped
    frame(101, 1, c);         // 26 words at 16
    check(drop_count == 1, "bad frame dropped");
    check(desc_count == 2 && occupancy == 42, $sformatf("two stored, occupancy %0d", occupancy));
    check(!fc_req, "no flow control yet");
    frame(70, 1, d);          // 18 words at 42
    for (int i = 0; i < 2; i++) begin
      frame(64, 1, e);
      sent.push_back(e);
    end
    check(!fc_req, "five descriptors: below threshold");
    frame(64, 1, e);
    sent.push_back(e);
    check(fc_req && occupancy < 200, "flow control on descriptor count");
    check_stored(a, "a");
    check_stored(c, "c");
    check_stored(d, "d");
    foreach (sent[i]) check_stored(sent[i], $sformatf("small %0d", i));
    sent = {};
    check(!fc_req || occupancy >= 200, "descriptor threshold released");
    // release everything, then fill past the occupancy threshold
    @(negedge clk); cpu_rd_ptr_wr = 1; cpu_rd_ptr = dut.wr_ptr; @(negedge clk); cpu_rd_ptr_wr = 0;
    check(occupancy == 0, "ring empty after release");
    for (int i = 0; i < 3; i++) begin
      frame(240, 1, e);       // 60 words each, wraps around the ring end
      sent.push_back(e);
    end
    check(occupancy == 180 && !fc_req, "180 words queued");
    frame(100, 1, e);         // 25 words: 205 >= 200 threshold
    sent.push_back(e);
    check(fc_req, "flow control on occupancy");
    frame(240, 1, e);         // does not fit: dropped (and FIFO full)
    check(drop_count == 2, "frame that does not fit is dropped");
    foreach (sent[i]) check_stored(sent[i], $sformatf("wrap %0d", i));
    check(frame_count == 10, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

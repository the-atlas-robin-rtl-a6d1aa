// tb_buffer_arbiter: checks the fixed 1:1 time slice (link writes exactly
// every second cycle even with all readers busy), CPU writes only in idle
// write slots, round-robin service of the three readers, and read data one
// cycle after the grant, against a memory model.
module tb_buffer_arbiter;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, cpu_wr_valid, cpu_wr_ready;
  logic [AW-1:0] wr_addr, cpu_wr_addr;
  logic [31:0] wr_data, cpu_wr_data, rd_rdata;
  logic [2:0] rd_valid, rd_ready, rd_rvalid;
  logic [2:0][AW-1:0] rd_addr;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  buffer_arbiter #(.AW(AW), .NRD(3)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] mem [1 << AW];
  always_ff @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) mem_rdata <= mem[mem_addr];
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wr_cnt = 0, cpu_cnt = 0, last_wr = -1, cyc = 0;
  int rd_cnt[3] = '{0, 0, 0};
  logic [2:0] pend;
  logic [AW-1:0] pend_addr [3];
  logic [31:0] model [1 << AW];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // returned data of the previous cycle's grant
    for (int i = 0; i < 3; i++) if (pend[i]) begin
      check(rd_rvalid[i], "rvalid one cycle after grant");
      check(rd_rdata == model[pend_addr[i]], "read data");
    end
    for (int i = 0; i < 3; i++) if (!pend[i]) check(!rd_rvalid[i], "no spurious rvalid");
    pend = rd_ready & rd_valid;
    for (int i = 0; i < 3; i++) if (pend[i]) begin
      pend_addr[i] = rd_addr[i];
      rd_cnt[i]++;
    end
    if (wr_valid && wr_ready) begin
      if (last_wr >= 0) check(cyc - last_wr == 2, "write every second cycle");
      last_wr = cyc;
      model[wr_addr] = wr_data;
      wr_cnt++;
      check(!cpu_wr_ready, "cpu write blocked in a used write slot");
    end
    if (cpu_wr_valid && cpu_wr_ready) begin
      model[cpu_wr_addr] = cpu_wr_data;
      cpu_cnt++;
    end
    check(!((wr_valid && wr_ready) && (|rd_ready)), "read and write never share a cycle");
  end

  initial begin
    pend = '0;
    wr_valid = 0; cpu_wr_valid = 0; rd_valid = '0;
    wr_addr = 0; wr_data = 0; cpu_wr_addr = 0; cpu_wr_data = 0; rd_addr = '0;
    for (int i = 0; i < (1 << AW); i++) begin
      mem[i] = 32'(i) * 3;
      model[i] = 32'(i) * 3;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: continuous link writes, all readers requesting
    for (int i = 0; i < 400; i++) begin
      wr_valid = 1;
      rd_valid = 3'b111;
      rd_addr[0] = AW'($urandom); rd_addr[1] = AW'($urandom); rd_addr[2] = AW'($urandom);
      @(posedge clk);
      if (wr_valid && wr_ready) begin
        wr_addr = AW'($urandom);
        wr_data = $urandom;
      end
      @(negedge clk);
    end
    check(wr_cnt >= 199 && wr_cnt <= 201, $sformatf("link got half the cycles: %0d", wr_cnt));
    for (int i = 0; i < 3; i++)
      check(rd_cnt[i] >= 64 && rd_cnt[i] <= 69, $sformatf("reader %0d fair share %0d", i, rd_cnt[i]));
    // phase 2: no link writes: the CPU gets the write slots
    wr_valid = 0;
    rd_valid = 3'b000;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      cpu_wr_valid = 1;
      cpu_wr_addr = AW'(i);
      cpu_wr_data = 32'hC0DE0000 + i;
      do @(posedge clk); while (!cpu_wr_ready);
      @(negedge clk);
    end
    cpu_wr_valid = 0;
    check(cpu_cnt == 100, "cpu writes done");
    // read them back through reader 2
    for (int i = 0; i < 100; i++) begin
      rd_valid = 3'b100;
      rd_addr[2] = AW'(i);
      do @(posedge clk); while (!rd_ready[2]);
      @(negedge clk);
      rd_valid = 0;
      @(negedge clk);
      check(rd_rdata == 32'hC0DE0000 + i, "cpu data read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

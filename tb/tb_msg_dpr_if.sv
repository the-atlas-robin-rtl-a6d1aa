// tb_msg_dpr_if: the host writes messages into the message memory and then
// their descriptors; the CPU side checks descriptor order and count, reads
// the words back (one-cycle read latency), and a 33rd descriptor into the
// full 32-entry FIFO is counted as lost.
module tb_msg_dpr_if;
  logic clk = 0, rst_n = 0;
  logic lb_wr, cpu_rd, desc_pop, desc_empty;
  logic [11:0] lb_addr;
  logic [10:0] cpu_addr;
  logic [31:0] lb_wdata, cpu_rdata, desc_head;
  logic [5:0] desc_count;
  logic [15:0] lost_desc;
  int checks = 0, failures = 0;

  msg_dpr_if dut (.*);
  always #5 clk = ~clk;

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

  task automatic lbw(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); lb_wr = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk); lb_wr = 0;
  endtask

  logic [31:0] model [2048];
  initial begin
    lb_wr = 0; cpu_rd = 0; desc_pop = 0; lb_addr = 0; cpu_addr = 0; lb_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 33 messages of 62 words each, at consecutive offsets
    for (int m = 0; m < 33; m++) begin
      for (int i = 0; i < 62; i++) begin
        model[m * 62 + i] = $urandom;
        lbw(12'(m * 62 + i), model[m * 62 + i]);
      end
      lbw(12'h800, {16'd62, 16'(m * 62)});
    end
    check(desc_count == 6'd32, "descriptor FIFO holds 32");
    check(lost_desc == 16'd1, "33rd descriptor lost");
    for (int m = 0; m < 32; m++) begin
      @(negedge clk);
      check(!desc_empty && desc_head == {16'd62, 16'(m * 62)}, "descriptor order");
      for (int i = 0; i < 62; i++) begin
        cpu_rd = 1; cpu_addr = 11'(desc_head[15:0] + 16'(i));
        @(negedge clk);
        cpu_rd = 0;
        check(cpu_rdata == model[m * 62 + i], "message word");
      end
      desc_pop = 1; @(negedge clk); desc_pop = 0;
    end
    check(desc_empty && desc_count == 0, "all descriptors consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

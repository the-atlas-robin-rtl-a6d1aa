// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, count, full and empty, and that a full FIFO ignores writes.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wr_data, rd_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == 5'(model.size()), "count");
      check(full == (model.size() == 16), "full");
      check(empty == (model.size() == 0), "empty");
      if (!empty) check(rd_data == model[0], "head data");
      // bias towards filling in the first half, draining in the second
      wr_en = !full && ($urandom_range(0, 99) < ((i % 400) < 200 ? 70 : 30));
      rd_en = !empty && ($urandom_range(0, 99) < ((i % 400) < 200 ? 30 : 70));
      wr_data = 16'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

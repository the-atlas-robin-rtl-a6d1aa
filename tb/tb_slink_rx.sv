// tb_slink_rx: sends data and control words as character pairs with and
// without idles between them, one pair with mismatched control flags, and
// checks the rebuilt words, the error count, the error flag on the word
// after the bad pair and the flow-control pass-back.
module tb_slink_rx;
  import robin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] rxd, err_count;
  logic rx_dv, rx_ctl, xoff_req, tx_xoff, word_valid;
  link_word_t word;
  int checks = 0, failures = 0;
  link_word_t exp_q[$];

  slink_rx dut (.*);
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

  always @(posedge clk) if (rst_n && word_valid) begin
    if (exp_q.size() == 0) check(0, "unexpected word");
    else check(word == exp_q.pop_front(), "word");
  end

  task automatic send(input logic c, input logic [31:0] d, input bit idle, input bit exp = 1,
                      input bit err = 0);
    @(negedge clk); rx_dv = 1; rx_ctl = c; rxd = d[15:0];
    @(negedge clk); rx_dv = 1; rx_ctl = c; rxd = d[31:16];
    if (exp) exp_q.push_back('{err: err, ctrl: c, data: d});
    if (idle) begin @(negedge clk); rx_dv = 0; end
  endtask

  initial begin
    rxd = 0; rx_dv = 0; rx_ctl = 0; xoff_req = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(1, {CTRL_BOF, 16'h0}, 1);
    for (int i = 0; i < 50; i++) send(0, $urandom, i % 3 == 0);
    // a pair whose halves disagree: dropped
    @(negedge clk); rx_dv = 1; rx_ctl = 1; rxd = 16'h1234;
    @(negedge clk); rx_dv = 1; rx_ctl = 0; rxd = 16'h5678;
    @(negedge clk); rx_dv = 0;
    send(1, {CTRL_EOF, 16'h0}, 1, 1, 1);   // the next word carries the error
    send(0, 32'h0BADF00D, 1);               // and only that one
    @(negedge clk); rx_dv = 0;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all words seen");
    check(err_count == 1, "one link error");
    xoff_req = 1;
    repeat (2) @(negedge clk);
    check(tx_xoff, "xoff passed back");
    xoff_req = 0;
    repeat (2) @(negedge clk);
    check(!tx_xoff, "xoff released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

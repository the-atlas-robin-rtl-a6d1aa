// tb_frag_generator: collects generated fragments under random back-pressure
// and checks their framing, header words, payload pattern, L1ID sequence
// from the loaded start value, the minimum length and the fragment count.
module tb_frag_generator;
  import robin_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable, load, out_valid, out_ready;
  logic [15:0] cfg_words;
  logic [31:0] cfg_run, cfg_first_l1id, frag_count;
  link_word_t out_word;
  int checks = 0, failures = 0;

  frag_generator dut (.*);
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

  link_word_t got[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_word);
  always @(negedge clk) out_ready = $urandom_range(0, 2) != 0;

  initial begin
    int p;
    logic [31:0] l1;
    enable = 0; load = 0; cfg_words = 16'd20; cfg_run = 32'd4711; cfg_first_l1id = 32'h0500_0010;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    enable = 1;
    wait (frag_count == 3);
    cfg_words = 16'd2;          // below the header size: clamps to 4
    wait (frag_count == 5);
    enable = 0;
    repeat (40) @(negedge clk);
    check(frag_count == 5, "generator stops at a fragment boundary");
    p = 0;
    l1 = 32'h0500_0010;
    for (int f = 0; f < 5; f++) begin
      int n;
      n = (f < 3) ? 20 : 4;
      check(got[p].ctrl && got[p].data[31:16] == CTRL_BOF, "BOF"); p++;
      check(!got[p].ctrl && got[p].data == HDR_MARKER, "marker"); p++;
      check(got[p].data == 32'(n), "length"); p++;
      check(got[p].data == 32'd4711, "run"); p++;
      check(got[p].data == l1, "l1id"); p++;
      for (int i = 4; i < n; i++) begin
        check(!got[p].ctrl && got[p].data == l1 + 32'(i), "payload"); p++;
      end
      check(got[p].ctrl && got[p].data[31:16] == CTRL_EOF, "EOF"); p++;
      l1++;
    end
    check(p == got.size(), "no extra words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

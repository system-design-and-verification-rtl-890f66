// tb_pyr_zero_filter: self-checking test of the pyramid zero filter.
//
// 500 random cycles of idle slots, zero results, non-zero results and stray
// input data.  Every non-zero result must appear one cycle later unchanged,
// everything else must vanish, and the two counters must match the numbers
// of words seen and kept.
module tb_pyr_zero_filter;
  import flow_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  flow_word_t top_in, bot_out, prev;
  logic [15:0] n_in, n_out;
  int seen = 0, kept = 0;
  bit keep_prev;

  pyr_zero_filter dut (.clk, .rst_n, .top_in, .bot_out, .n_in, .n_out);

  initial begin
    top_in = FLOW_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    keep_prev = 0;
    prev = FLOW_IDLE;
    for (int n = 0; n < 500; n++) begin
      top_in = FLOW_IDLE;
      case ($urandom_range(0, 3))
        0: ;
        1: top_in = '{valid: 1'b1, is_result: 1'b1, tag: tag_t'($urandom), data: '0};
        2: top_in = '{valid: 1'b1, is_result: 1'b1, tag: tag_t'($urandom), data: data_t'($urandom_range(1, 65535))};
        3: top_in = '{valid: 1'b1, is_result: 1'b0, tag: tag_t'($urandom), data: data_t'($urandom_range(1, 65535))};
      endcase
      #1;
      if (keep_prev) check(bot_out == prev, $sformatf("non-zero result passed (%0d)", n));
      else           check(!bot_out.valid, $sformatf("word dropped (%0d)", n));
      if (top_in.valid) seen++;
      keep_prev = top_in.valid && top_in.is_result && top_in.data != 0;
      if (keep_prev) kept++;
      prev = top_in;
      @(negedge clk);
    end
    top_in = FLOW_IDLE;
    @(negedge clk);
    check(n_in == 16'(seen) && n_out == 16'(kept), $sformatf("counters %0d/%0d, expected %0d/%0d", n_in, n_out, seen, kept));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

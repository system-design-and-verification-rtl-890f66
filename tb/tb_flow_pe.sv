// tb_flow_pe: self-checking test of one 3D-Flow processor and its bypass
// switch (algorithm of 6 cycles, sets of 2 words, threshold 50).
//
// A scripted sequence, with the expected bottom-port word of every cycle
// worked out by hand:
//   cycles 1-2   set A (30, 25; tag 1) is fetched, switch in 'i';
//   cycles 3-4   set B (tag 2) arrives while busy and is bypassed;
//   cycle  7     a result from a layer above is bypassed, so A's first
//                result waits one cycle;
//   cycles 9-10  set C (10, 20; tag 3) is fetched while A's second result
//                leaves in the freed slot; C is below threshold: zeros;
//   cycles 20-21 set D is fetched, then results from above occupy the bottom
//                port in cycles 26-30 and D's results wait until 31-32.
// The counters of fetched, sent and bypassed words are checked at the end.
module tb_flow_pe;
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

  flow_word_t top_in, bot_out;
  logic sw_i, busy, exclude;
  logic [15:0] n_in, n_res, n_bd, n_br;

  flow_pe #(.SET_WORDS(2), .ALGO_CYCLES(6)) dut (
    .clk, .rst_n, .threshold(16'd50), .exclude, .top_in, .bot_out, .sw_i, .busy,
    .n_input(n_in), .n_result(n_res), .n_byp_data(n_bd), .n_byp_res(n_br));

  function automatic flow_word_t w(bit res, int tag, int d);
    return '{valid: 1'b1, is_result: res, tag: tag_t'(tag), data: data_t'(d)};
  endfunction

  localparam int N = 48;
  flow_word_t drive [N+1];
  flow_word_t expect_out [N+2];
  bit         expect_sw [N+1];

  initial begin
    for (int c = 0; c <= N; c++) begin
      drive[c] = FLOW_IDLE;
      expect_sw[c] = 0;
    end
    for (int c = 0; c <= N + 1; c++) expect_out[c] = FLOW_IDLE;
    drive[1] = w(0, 1, 30);  drive[2] = w(0, 1, 25);  expect_sw[1] = 1; expect_sw[2] = 1;
    drive[3] = w(0, 2, 70);  drive[4] = w(0, 2, 71);
    expect_out[4] = w(0, 2, 70); expect_out[5] = w(0, 2, 71);
    drive[7] = w(1, 9, 99);  expect_out[8] = w(1, 9, 99);
    expect_out[9] = w(1, 1, 30); expect_out[10] = w(1, 1, 25);
    drive[9] = w(0, 3, 10);  drive[10] = w(0, 3, 20); expect_sw[9] = 1; expect_sw[10] = 1;
    // C starts at 9, ends at 14: results leave at 15, 16
    expect_out[16] = w(1, 3, 0); expect_out[17] = w(1, 3, 0);
    drive[20] = w(0, 4, 200); drive[21] = w(0, 4, 1); expect_sw[20] = 1; expect_sw[21] = 1;
    for (int c = 26; c <= 30; c++) begin
      drive[c] = w(1, 20 + c, c);
      expect_out[c+1] = w(1, 20 + c, c);
    end
    expect_out[32] = w(1, 4, 200); expect_out[33] = w(1, 4, 1);
    // excluded from cycle 38: set E (tag 5) is bypassed although the processor is idle
    drive[40] = w(0, 5, 90); drive[41] = w(0, 5, 91);
    expect_out[41] = w(0, 5, 90); expect_out[42] = w(0, 5, 91);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 1; c <= N; c++) begin
      top_in = drive[c];
      exclude = (c >= 38);
      #1;
      check(sw_i == expect_sw[c], $sformatf("cycle %0d: switch 'i' = %0b, expected %0b", c, sw_i, expect_sw[c]));
      check(bot_out == expect_out[c], $sformatf("cycle %0d: bottom port %p, expected %p", c, bot_out, expect_out[c]));
      if (c == 3) check(busy, "busy while the algorithm runs");
      if (c == 8) check(!busy, "idle after the algorithm ends");
      @(negedge clk);
    end
    check(n_in == 6, $sformatf("input counter %0d", n_in));
    check(n_res == 6, $sformatf("result counter %0d", n_res));
    check(n_bd == 4, $sformatf("bypass data counter %0d", n_bd));
    check(n_br == 6, $sformatf("bypass result counter %0d", n_br));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    top_in = FLOW_IDLE;
    exclude = 0;
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flow_algo: self-checking test of the stand-in trigger algorithm
// (5-cycle run, sets of 2 words).
//
// For 200 random sets and thresholds it checks that `done` comes exactly 5
// cycles after `start` (counting the start cycle as 1) when the result
// buffer is free, or in the first cycle after `res_full` falls otherwise,
// and that the result equals the words when their sum reaches the threshold
// and zeros otherwise.
module tb_flow_algo;
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

  localparam int A = 5;
  logic start, wr_en, res_full, busy, done;
  logic [0:0] wr_idx;
  data_t wr_data, threshold;
  data_t res [2];

  flow_algo #(.SET_WORDS(2), .ALGO_CYCLES(A)) dut (
    .clk, .rst_n, .start, .wr_en, .wr_idx, .wr_data, .threshold, .res_full,
    .busy, .done, .res);

  initial begin
    data_t w0, w1;
    int hold, waited;
    logic [17:0] sum;
    start = 0; wr_en = 0; wr_idx = 0; wr_data = 0; res_full = 0; threshold = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      w0 = data_t'($urandom); w1 = data_t'($urandom);
      threshold = data_t'($urandom);
      if (n % 4 == 0) begin w0 = 10; w1 = data_t'(n); threshold = data_t'(10 + n); end  // sum equals threshold
      hold = (n % 3 == 0) ? int'($urandom_range(1, 4)) : 0;
      sum = 18'(w0) + 18'(w1);
      // cycle 1: start with word 0
      start = 1; wr_en = 1; wr_idx = 0; wr_data = w0;
      #1 check(!done, "no done at start");
      @(negedge clk);
      start = 0; wr_idx = 1; wr_data = w1;
      // cycles 2 .. A-1: running
      for (int c = 2; c < A; c++) begin
        #1 check(busy && !done, $sformatf("set %0d: busy, no done in cycle %0d", n, c));
        @(negedge clk);
        wr_en = 0;
      end
      // cycle A: done unless the result buffer is full
      res_full = (hold != 0);
      waited = 0;
      while (hold != 0) begin
        #1 check(!done, $sformatf("set %0d: done while the result buffer is full", n));
        @(negedge clk);
        hold--; waited++;
        res_full = (hold != 0);
      end
      #1 check(done, $sformatf("set %0d: done in cycle %0d", n, A + waited));
      if (sum >= 18'(threshold))
        check(res[0] == w0 && res[1] == w1, $sformatf("set %0d: accepted result", n));
      else
        check(res[0] == 0 && res[1] == 0, $sformatf("set %0d: rejected result", n));
      @(negedge clk);
      #1 check(!busy && !done, $sformatf("set %0d: idle after done", n));
    end
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

// tb_fe_derandomizer: self-checking test of the derandomizing FIFO
// (4 events of 32 bits).
//
// Random accepts arrive at bunch crossings; the reader pops at random, slower
// than the accepts for a while so that the FIFO fills.  A queue models the
// FIFO: an accept is stored only when the model holds fewer than 4 events,
// otherwise it must be counted as lost.  Every event read must be the oldest
// stored one, and both counters must match the model.
module tb_fe_derandomizer;
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

  logic bx_en, l1a, ev_valid, pop, empty, full;
  logic [31:0] ev_data, rd_data;
  logic [15:0] n_stored, n_lost;
  logic [31:0] model [$];
  int stored = 0, lost = 0, reads = 0;

  fe_derandomizer #(.WIDTH(32), .DEPTH(4)) dut (
    .clk, .rst_n, .bx_en, .l1a, .ev_valid, .ev_data, .pop, .rd_data, .empty, .full,
    .n_stored, .n_lost);

  initial begin
    bx_en = 0; l1a = 0; ev_valid = 0; ev_data = 0; pop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      bx_en = (n % 2 == 0);
      ev_valid = (n > 10);
      ev_data = $urandom;
      l1a = ($urandom_range(0, 3) == 0);
      pop = (n < 600) ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 2) == 0);
      #1;
      check(empty == (model.size() == 0) && full == (model.size() == 4), $sformatf("flags at %0d", n));
      if (pop && model.size() > 0) begin
        check(rd_data == model[0], $sformatf("read %0d: oldest event", reads));
        reads++;
      end
      // update the model as the clock edge will
      if (bx_en && l1a && ev_valid) begin
        if (model.size() == 4) lost++;
        else begin stored++; end
      end
      begin
        bit do_pop, do_push;
        logic [31:0] d;
        do_pop  = pop && model.size() > 0;
        do_push = bx_en && l1a && ev_valid && model.size() < 4;
        d = ev_data;
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(d);
      end
      @(negedge clk);
    end
    check(n_stored == 16'(stored) && n_lost == 16'(lost),
          $sformatf("counters %0d/%0d, expected %0d/%0d", n_stored, n_lost, stored, lost));
    check(lost > 0, "accepts found the FIFO full");
    check(reads > 100, "events read");
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

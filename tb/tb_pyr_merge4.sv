// tb_pyr_merge4: self-checking test of the pyramid 4:1 channel-reduction node
// (buffers of 4 words).
//
// Phase 1: sparse random words on the four inputs.  Every word must come out
// once, with the number of its input as `src`, in the order it entered that
// input, and the node must not lose any.  Phase 2: all four inputs send a
// word every cycle for 20 cycles; the output drains one word per cycle, so
// the buffers overflow and the lost words must equal the words in minus the
// words out.  Round-robin service is checked by requiring that no input is
// served twice while another input has a word waiting in phase 2.
module tb_pyr_merge4;
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

  flow_word_t top_in [4];
  cand_t bot_out;
  logic overflow;
  logic [15:0] n_overflow;

  pyr_merge4 #(.FIFO_DEPTH(4)) dut (.clk, .rst_n, .top_in, .bot_out, .overflow, .n_overflow);

  logic [27:0] q [4][$];   // {tag, data} expected per input
  int words_in = 0, words_out = 0;
  int last_src = -1;
  int streak_ok = 1;

  bit phase2 = 0;
  int rr_checked = 0;

  always @(negedge clk) if (rst_n) begin
    if (bot_out.valid) words_out++;
    if (bot_out.valid && !phase2) begin
      if (q[bot_out.src].size() == 0) check(0, "word from an input with nothing pending");
      else begin
        logic [27:0] e;
        e = q[bot_out.src].pop_front();
        check({bot_out.tag, bot_out.data} == e, $sformatf("word order on input %0d", bot_out.src));
      end
    end
  end

  initial begin
    int phase2_in, ovr0;
    for (int i = 0; i < 4; i++) top_in[i] = FLOW_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 4; i++) begin
        top_in[i] = FLOW_IDLE;
        if ($urandom_range(0, 9) == 0) begin
          top_in[i] = '{valid: 1'b1, is_result: 1'b1, tag: tag_t'($urandom), data: data_t'($urandom)};
          q[i].push_back({top_in[i].tag, top_in[i].data});
          words_in++;
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) top_in[i] = FLOW_IDLE;
    repeat (20) @(negedge clk);
    check(words_in == words_out && n_overflow == 0,
      $sformatf("phase 1: %0d in, %0d out, %0d lost", words_in, words_out, n_overflow));
    // phase 2: overload, model the buffer occupancy to know which words are kept
    ovr0 = int'(n_overflow);
    phase2 = 1;
    phase2_in = 0;
    words_out = 0;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 4; i++) begin
        top_in[i] = '{valid: 1'b1, is_result: 1'b1, tag: tag_t'(n), data: data_t'(i)};
        phase2_in++;
      end
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) top_in[i] = FLOW_IDLE;
    repeat (30) @(negedge clk);
    check(int'(n_overflow) - ovr0 > 0, "overflow seen under overload");
    check(rr_checked > 10, "round robin observed");
    check(int'(n_overflow) - ovr0 + words_out == phase2_in,
      $sformatf("phase 2: %0d in, %0d out, %0d lost", phase2_in, words_out, int'(n_overflow) - ovr0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase 2 round robin: with every input waiting, outputs take turns
  always @(negedge clk) if (rst_n && phase2 && bot_out.valid) begin
    if (last_src >= 0 && words_out < 20) begin
      check(int'(bot_out.src) == (last_src + 1) % 4,
        $sformatf("round robin: input %0d after %0d", bot_out.src, last_src));
      rr_checked++;
    end
    last_src = int'(bot_out.src);
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

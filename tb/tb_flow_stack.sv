// tb_flow_stack: self-checking test of the 3D-Flow stack.
//
// Part A runs the three-layer example of the 3D-Flow scheme: a set of two
// words every 8 cycles, an algorithm of 24 cycles.  It checks the cycles in
// which each layer's switch is in position 'i' (layer 1 at 1,2 / 25,26,
// layer 2 at 10,11 / 34,35, layer 3 at 19,20 / 43,44, counting the first
// input word as cycle 1), that every result leaves the stack ALGO + LAYERS
// cycles after its word entered, and the per-layer counters.
// Part B runs the default stack (10 layers, 20 cycles, a set every 2 cycles)
// and checks the same latency for every set.  Part C sends sets faster than
// the stack can process and checks that the overrun is reported, that every
// input word ends as a result or an overrun, and that results are correct.
// Part D excludes layer 2 from service and checks that the two other layers
// take every set when sets come every 12 cycles.
module tb_flow_stack;
  import flow_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- DUT A: 3 layers, 24-cycle algorithm ----------------
  localparam int LA = 3, AA = 24;
  flow_word_t a_in, a_out;
  logic a_ovr;
  logic [15:0] a_novr;
  logic [LA-1:0] a_busy, a_fetch;
  logic [15:0] a_ni [LA], a_nr [LA], a_nbd [LA], a_nbr [LA];
  data_t thr_a = 16'd100;
  logic [LA-1:0] a_excl = '0;

  flow_stack #(.N_LAYERS(LA), .SET_WORDS(2), .ALGO_CYCLES(AA)) dut_a (
    .clk, .rst_n, .threshold(thr_a), .exclude(a_excl), .top_in(a_in), .res_out(a_out),
    .overrun(a_ovr), .n_overrun(a_novr), .layer_busy(a_busy), .layer_fetch(a_fetch),
    .n_input(a_ni), .n_result(a_nr), .n_byp_data(a_nbd), .n_byp_res(a_nbr));

  // ---------------- DUT B: default sizes ----------------
  flow_word_t b_in, b_out;
  logic b_ovr;
  logic [15:0] b_novr;
  logic [9:0] b_busy, b_fetch;
  logic [15:0] b_ni [10], b_nr [10], b_nbd [10], b_nbr [10];
  data_t thr_b = 16'd300;

  flow_stack dut_b (
    .clk, .rst_n, .threshold(thr_b), .exclude(10'b0), .top_in(b_in), .res_out(b_out),
    .overrun(b_ovr), .n_overrun(b_novr), .layer_busy(b_busy), .layer_fetch(b_fetch),
    .n_input(b_ni), .n_result(b_nr), .n_byp_data(b_nbd), .n_byp_res(b_nbr));

  // expected result words, indexed by the cycle they must appear in
  data_t exp_a [int];
  tag_t  exp_a_tag [int];
  data_t exp_b [int];
  tag_t  exp_b_tag [int];
  // results by tag for part C
  data_t ref_c [int];
  int    n_res_a = 0, n_res_b = 0;

  function automatic data_t algo_ref(data_t w0, data_t w1, data_t thr, int j);
    logic [17:0] s = 18'(w0) + 18'(w1);
    if (s >= 18'(thr)) return (j == 0) ? w0 : w1;
    return '0;
  endfunction

  // reference example: cycles in which each layer fetches
  int fetch_cycles [LA][$] = '{'{1,2,25,26,49,50}, '{10,11,34,35}, '{19,20,43,44}};
  int t0;  // cycle counter value of example cycle 1
  bit part_c = 0;
  int c_words_in = 0, c_results = 0;

  // Driving at the falling edge, checking after the inputs settle.
  initial begin
    data_t w0, w1;
    int s, j;
    a_in = FLOW_IDLE;
    b_in = FLOW_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t0 = cyc;
    // Part A: 7 sets, one every 8 cycles; Part B in parallel: a set every 2 cycles
    for (int c = 1; c <= 160; c++) begin
      a_in = FLOW_IDLE;
      if (c <= 56 && ((c - 1) % 8) < 2) begin
        s = (c - 1) / 8;
        j = (c - 1) % 8;
        w0 = data_t'(40 + 13 * s);
        w1 = data_t'(30 + 7 * s);
        a_in = '{valid: 1'b1, is_result: 1'b0, tag: tag_t'(s), data: (j == 0) ? w0 : w1};
        exp_a[cyc + AA + LA] = algo_ref(w0, w1, thr_a, j);
        exp_a_tag[cyc + AA + LA] = tag_t'(s);
      end
      b_in = FLOW_IDLE;
      if (c <= 120) begin
        s = (c - 1) / 2;
        j = (c - 1) % 2;
        w0 = data_t'($urandom_range(0, 300));
        w1 = data_t'($urandom_range(0, 300));
        if (j == 1) w0 = b_in_prev0;
        b_in = '{valid: 1'b1, is_result: 1'b0, tag: tag_t'(s), data: (j == 0) ? w0 : w1};
        if (j == 0) b_in_prev0 = w0;
        else begin
          exp_b[cyc - 1 + AA_B + 10] = algo_ref(b_in_prev0, w1, thr_b, 0);
          exp_b_tag[cyc - 1 + AA_B + 10] = tag_t'(s);
          exp_b[cyc + AA_B + 10] = algo_ref(b_in_prev0, w1, thr_b, 1);
          exp_b_tag[cyc + AA_B + 10] = tag_t'(s);
        end
      end
      #1;
      for (int l = 0; l < LA; l++) begin
        bit want;
        want = 0;
        foreach (fetch_cycles[l][k]) if (fetch_cycles[l][k] == c) want = 1;
        if (c <= 56) check(a_fetch[l] == want,
          $sformatf("example cycle %0d layer %0d switch 'i'=%0b, expected %0b", c, l + 1, a_fetch[l], want));
      end
      @(negedge clk);
    end
    // counters of the example: 7 sets, layer 1 takes sets 0,3,6
    check(a_ni[0] == 6 && a_ni[1] == 4 && a_ni[2] == 4, "input counters of the example");
    check(a_nbd[0] == 8 && a_nbd[1] == 4 && a_nbd[2] == 0, "bypass-data counters of the example");
    check(a_nr[0] == 6 && a_nr[1] == 4 && a_nr[2] == 4, "result counters of the example");
    check(a_nbr[0] == 0 && a_nbr[1] == 6 && a_nbr[2] == 10, "bypass-result counters of the example");
    check(a_novr == 0 && b_novr == 0, "no overrun at the nominal rates");
    check(n_res_a == 14, $sformatf("example produced %0d result words, expected 14", n_res_a));
    check(n_res_b == 120, $sformatf("default stack produced %0d result words, expected 120", n_res_b));

    // Part C: a set every 4 cycles into the 3-layer, 24-cycle stack
    part_c = 1;
    for (int c = 0; c < 200; c++) begin
      a_in = FLOW_IDLE;
      if (c < 160 && (c % 4) < 2) begin
        s = 100 + c / 4;
        w0 = data_t'(60 + (s % 5) * 9);
        w1 = data_t'(20 + (s % 3) * 11);
        a_in = '{valid: 1'b1, is_result: 1'b0, tag: tag_t'(s), data: (c % 4 == 0) ? w0 : w1};
        ref_c[s * 2 + (c % 4)] = algo_ref(w0, w1, thr_a, c % 4);
        c_words_in++;
      end
      @(negedge clk);
    end
    check(a_novr > 0, "overrun reported when sets come too fast");
    check(c_results + int'(a_novr) == c_words_in,
      $sformatf("results %0d + overrun %0d != words in %0d", c_results, a_novr, c_words_in));

    // Part D: layer 2 excluded; a set every 12 cycles still fits the two
    // remaining layers (2 x 12 >= 24): no overrun, layer 2 fetches nothing
    begin
      int ovr0, ni1, res0;
      a_excl = 3'b010;
      repeat (40) @(negedge clk);
      ovr0 = int'(a_novr); ni1 = int'(a_ni[1]); res0 = c_results;
      for (int c = 0; c < 12 * 12 + 40; c++) begin
        a_in = FLOW_IDLE;
        if (c < 12 * 12 && (c % 12) < 2) begin
          s = 200 + c / 12;
          w0 = data_t'(70 + (s % 4) * 5);
          w1 = data_t'(25 + (s % 6) * 3);
          a_in = '{valid: 1'b1, is_result: 1'b0, tag: tag_t'(s), data: (c % 12 == 0) ? w0 : w1};
          ref_c[s * 2 + (c % 12)] = algo_ref(w0, w1, thr_a, c % 12);
        end
        #1 check(!a_fetch[1], "excluded layer never fetches");
        @(negedge clk);
      end
      check(int'(a_novr) == ovr0, "no overrun with one layer excluded at a rate the others can hold");
      check(int'(a_ni[1]) == ni1, "excluded layer fetched nothing");
      check(c_results - res0 == 24, $sformatf("%0d results with a layer excluded, expected 24", c_results - res0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int AA_B = 20;
  data_t b_in_prev0;
  int c_word_idx [int];

  // output monitors
  always @(negedge clk) if (rst_n) begin
    if (!part_c) begin
      if (exp_a.exists(cyc)) begin
        check(a_out.valid && a_out.is_result && a_out.data == exp_a[cyc] && a_out.tag == exp_a_tag[cyc],
          $sformatf("stack A result at cycle %0d: got v=%0b d=%0d tag=%0d, expected d=%0d tag=%0d",
                    cyc - t0 + 1, a_out.valid, a_out.data, a_out.tag, exp_a[cyc], exp_a_tag[cyc]));
        n_res_a++;
      end else begin
        check(!a_out.valid, $sformatf("stack A unexpected word at cycle %0d", cyc - t0 + 1));
      end
    end else if (a_out.valid) begin
      int k;
      k = int'(a_out.tag) * 2 + (c_word_idx.exists(int'(a_out.tag)) ? 1 : 0);
      c_word_idx[int'(a_out.tag)] = 1;
      check(ref_c.exists(k) && ref_c[k] == a_out.data, $sformatf("part C result for tag %0d", a_out.tag));
      c_results++;
    end
    if (exp_b.exists(cyc)) begin
      check(b_out.valid && b_out.data == exp_b[cyc] && b_out.tag == exp_b_tag[cyc],
        $sformatf("stack B result at cycle %0d: got v=%0b d=%0d tag=%0d, expected d=%0d tag=%0d",
                  cyc, b_out.valid, b_out.data, b_out.tag, exp_b[cyc], exp_b_tag[cyc]));
      n_res_b++;
    end else if (b_out.valid) begin
      check(1'b0, $sformatf("stack B unexpected word at cycle %0d", cyc));
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

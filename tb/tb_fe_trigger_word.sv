// tb_fe_trigger_word: self-checking test of trigger word formatting, at the
// default size (80 channels, 4 towers, sets of two 16-bit words).
//
// The format table selects random channels.  For 60 bunch crossings with
// random samples (spacing alternating between 2 and 3 clock cycles) it checks
// that every tower sends word 0 = {ch[sel[t][0]], ch[sel[t][1]]} in the cycle
// after `bx_en` and word 1 = {ch[sel[t][2]], ch[sel[t][3]]} in the cycle
// after that, both tagged with the crossing number, and that nothing is sent
// in between.
module tb_fe_trigger_word;
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

  logic bx_en;
  tag_t bcid;
  logic [7:0] ch [80];
  logic [6:0] sel [4][4];
  flow_word_t tw [4];

  fe_trigger_word dut (.clk, .rst_n, .bx_en, .bcid, .ch, .sel, .tw);

  initial begin
    logic [7:0] snap [80];
    int gap;
    bx_en = 0; bcid = 0;
    for (int c = 0; c < 80; c++) ch[c] = 0;
    for (int t = 0; t < 4; t++) for (int b = 0; b < 4; b++) sel[t][b] = 7'($urandom_range(0, 79));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      for (int c = 0; c < 80; c++) begin ch[c] = 8'($urandom); snap[c] = ch[c]; end
      bcid = tag_t'(n * 7);
      bx_en = 1;
      @(negedge clk);
      bx_en = 0;
      for (int c = 0; c < 80; c++) ch[c] = 8'($urandom);  // must not matter any more
      for (int t = 0; t < 4; t++)
        check(tw[t].valid && !tw[t].is_result && tw[t].tag == tag_t'(n * 7) &&
              tw[t].data == {snap[sel[t][0]], snap[sel[t][1]]},
              $sformatf("crossing %0d tower %0d word 0", n, t));
      gap = (n % 2 == 0) ? 2 : 3;
      @(negedge clk);
      if (gap == 3) begin
        for (int t = 0; t < 4; t++)
          check(tw[t].valid && tw[t].tag == tag_t'(n * 7) &&
                tw[t].data == {snap[sel[t][2]], snap[sel[t][3]]},
                $sformatf("crossing %0d tower %0d word 1", n, t));
        @(negedge clk);
        for (int t = 0; t < 4; t++) check(!tw[t].valid, "idle after the set");
      end else begin
        // next crossing starts now; word 1 is checked in this cycle
        for (int t = 0; t < 4; t++)
          check(tw[t].valid && tw[t].data == {snap[sel[t][2]], snap[sel[t][3]]},
                $sformatf("crossing %0d tower %0d word 1 (back to back)", n, t));
      end
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

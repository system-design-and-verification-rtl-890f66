// tb_global_decision: self-checking test of the look-up-table decision unit.
//
// The 256-entry table is loaded with random bits through the write port.
// Then 600 candidates are sent, in bursts sharing a bunch-crossing number.
// A model of the table predicts, one cycle after each candidate, whether an
// accept for that crossing must be issued: the addressed bit is set and the
// crossing has not already been accepted just before.  Candidate and accept
// counters are checked at the end.  Reset must clear the table.
module tb_global_decision;
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

  logic lut_we, lut_wdata, acc_valid;
  logic [7:0] lut_addr;
  cand_t cand;
  tag_t acc_tag;
  logic [15:0] n_cand, n_accept;

  global_decision dut (.clk, .rst_n, .lut_we, .lut_addr, .lut_wdata, .cand,
                       .acc_valid, .acc_tag, .n_cand, .n_accept);

  bit model [256];
  bit exp_v;
  tag_t exp_tag, last;
  bit have_last;
  int n_c = 0, n_a = 0;

  initial begin
    logic [7:0] a;
    tag_t tag;
    lut_we = 0; lut_addr = 0; lut_wdata = 0; cand = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      lut_we = 1; lut_addr = 8'(i); lut_wdata = 1'($urandom_range(0, 2) == 0);
      model[i] = lut_wdata;
      @(negedge clk);
    end
    lut_we = 0;
    have_last = 0; exp_v = 0;
    tag = '0;
    for (int n = 0; n < 600; n++) begin
      cand = '0;
      if ($urandom_range(0, 3) != 0) begin
        if ($urandom_range(0, 2) == 0) tag = tag + 1'b1;
        cand.valid = 1; cand.tag = tag;
        cand.src = 2'($urandom); cand.data = data_t'($urandom);
        n_c++;
      end
      #1 check(acc_valid == exp_v && (!exp_v || acc_tag == exp_tag),
               $sformatf("candidate %0d: accept %0b tag %0d, expected %0b tag %0d", n, acc_valid, acc_tag, exp_v, exp_tag));
      a = {cand.src, cand.data[15:10]};
      exp_v = cand.valid && model[a] && !(have_last && last == cand.tag);
      exp_tag = cand.tag;
      if (exp_v) begin last = cand.tag; have_last = 1; n_a++; end
      @(negedge clk);
    end
    cand = '0;
    #1 check(acc_valid == exp_v, "last accept");
    @(negedge clk);
    check(n_cand == 16'(n_c) && n_accept == 16'(n_a),
          $sformatf("counters %0d/%0d, expected %0d/%0d", n_cand, n_accept, n_c, n_a));
    check(n_a > 20, "accepts happened");
    // reset clears the table
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      cand = '{valid: 1'b1, src: 2'(i), tag: tag_t'(i), data: data_t'(i << 10)};
      @(negedge clk);
      check(!acc_valid, "no accept from a cleared table");
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

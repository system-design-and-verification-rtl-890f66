// tb_fe_pipeline_buffer: self-checking test of the pipeline buffer, at the
// default depth of 160 bunch crossings and a 64-bit entry.
//
// 500 crossings of random data, one every two clock cycles.  After crossing
// n the output must hold the data of crossing n - 160, and `dout_valid` must
// be low during the first 160 crossings and high afterwards.
module tb_fe_pipeline_buffer;
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

  localparam int D = 160;
  logic bx_en, dout_valid;
  logic [63:0] din, dout;
  logic [63:0] hist [int];

  fe_pipeline_buffer #(.WIDTH(64), .DEPTH(D)) dut (.clk, .rst_n, .bx_en, .din, .dout, .dout_valid);

  initial begin
    bx_en = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      din = {$urandom, $urandom};
      hist[n] = din;
      bx_en = 1;
      @(negedge clk);
      bx_en = 0;
      din = '1;
      if (n >= D) check(dout == hist[n - D], $sformatf("crossing %0d: output is not crossing %0d", n, n - D));
      // dout_valid follows one crossing behind the first full turn
      check(dout_valid == (n >= D), $sformatf("crossing %0d: dout_valid %0b", n, dout_valid));
      @(negedge clk);
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

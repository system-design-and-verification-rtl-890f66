// tb_fe_input_sync: self-checking test of the input synchronization, at the
// default size (80 channels, delays 0..15).
//
// Each channel gets a random delay.  Every bunch crossing (one every two
// clock cycles) all channels get random samples, kept in a history.  After
// each crossing n, channel c must show the sample of crossing n - dly[c].
module tb_fe_input_sync;
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

  localparam int NC = 80;
  logic bx_en;
  logic [7:0] din [NC], dout [NC];
  logic [3:0] dly [NC];
  logic [7:0] hist [int][NC];

  fe_input_sync dut (.clk, .rst_n, .bx_en, .din, .dly, .dout);

  initial begin
    int bad;
    bx_en = 0;
    for (int c = 0; c < NC; c++) begin
      din[c] = 0;
      dly[c] = 4'(c % 16);
    end
    for (int c = 0; c < NC; c++) begin
      int j;
      logic [3:0] t;
      j = $urandom_range(0, NC - 1);
      t = dly[c]; dly[c] = dly[j]; dly[j] = t;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      for (int c = 0; c < NC; c++) begin
        din[c] = 8'($urandom);
        hist[n][c] = din[c];
      end
      bx_en = 1;
      @(negedge clk);
      bx_en = 0;
      bad = 0;
      for (int c = 0; c < NC; c++) begin
        logic [7:0] e;
        e = (n - int'(dly[c]) >= 0) ? hist[n - int'(dly[c])][c] : 8'h0;
        if (dout[c] != e) bad++;
      end
      check(bad == 0, $sformatf("crossing %0d: %0d channels wrong", n, bad));
      for (int c = 0; c < NC; c++) din[c] = 8'($urandom);  // ignored between crossings
      @(negedge clk);
      bad = 0;
      for (int c = 0; c < NC; c++)
        if (dout[c] != ((n - int'(dly[c]) >= 0) ? hist[n - int'(dly[c])][c] : 8'h0)) bad++;
      check(bad == 0, $sformatf("crossing %0d: output changed without bx_en", n));
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

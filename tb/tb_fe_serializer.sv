// tb_fe_serializer: self-checking test of the DAQ serializer at the default
// event size (652 bits into 41 words of 16 bits).
//
// The testbench plays the derandomizer: a queue of random events, made
// available at random times.  Each event must come out as 41 consecutive
// words, most significant first, with `ser_sof` on the first and `ser_eof`
// on the last, and back-to-back events must follow without a gap.
module tb_fe_serializer;
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

  localparam int EW = 652, NW = 41;
  logic [EW-1:0] ev_data;
  logic ev_empty, ev_pop, ser_valid, ser_sof, ser_eof;
  logic [15:0] ser_data;
  logic [EW-1:0] src [$];
  logic [NW*16-1:0] cur;
  int widx = -1, events = 0, gapless = 0;

  fe_serializer dut (.clk, .rst_n, .ev_data, .ev_empty, .ev_pop, .ser_valid, .ser_sof, .ser_eof, .ser_data);

  always_comb begin
    ev_empty = (src.size() == 0);
    ev_data  = ev_empty ? '0 : src[0];
  end

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (ser_valid) begin
      if (ser_sof) begin
        check(widx == -1 || widx == NW, "start of event only after the previous one ended");
        if (widx == NW) gapless++;
        widx = 0;
      end
      if (widx >= 0 && widx < NW) begin
        check(ser_data == cur[(NW-1-widx)*16 +: 16], $sformatf("event %0d word %0d", events, widx));
        check(ser_eof == (widx == NW - 1), $sformatf("event %0d eof at word %0d", events, widx));
        widx++;
        if (widx == NW) events++;
      end else check(0, "word outside an event");
    end else begin
      if (widx == NW) widx = -1;
      check(widx == -1, "gap inside an event");
    end
  end

  logic [EW-1:0] sent [$];
  always @(posedge clk) if (rst_n && ev_pop) begin
    sent.push_back(src[0]);
    src.pop_front();
  end
  always @(negedge clk) if (rst_n && ser_valid && ser_sof) begin
    cur = (NW*16)'(sent.pop_front());
    check(ser_data == cur[NW*16-1 -: 16], "first word");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      logic [EW-1:0] e;
      for (int k = 0; k < (EW + 31) / 32; k++) e[k*32 +: 32] = $urandom;
      src.push_back(e);
      if (n % 3 == 0) begin
        for (int k = 0; k < (EW + 31) / 32; k++) e[k*32 +: 32] = $urandom;
        src.push_back(e);
      end
      repeat ($urandom_range(10, 90)) @(negedge clk);
    end
    wait (src.size() == 0);
    repeat (NW + 5) @(negedge clk);
    check(events == 40, $sformatf("%0d events sent, expected 40", events));
    check(gapless > 0, "back-to-back events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

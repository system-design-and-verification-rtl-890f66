// tb_fe_interface: self-checking test of the front-end interface at its
// default size (80 channels, 4 towers, pipeline of 160 crossings,
// derandomizer of 16 events, 16-bit DAQ words).
//
// Random samples every bunch crossing (every 2 clock cycles), random channel
// delays and a random trigger-word format.  A model built from the sample
// history predicts, for the crossing numbered k:
//   - the synchronized channels: channel c holds the sample of crossing
//     k - 1 - dly[c] (zero before the first crossing);
//   - the trigger words sent to each tower, tagged k;
//   - the DAQ event {k, channels}, sent when `l1a` is high at crossing
//     k + 161 (the pipeline depth plus one).
// About one crossing in thirty is accepted (below the rate the DAQ link drains); every accepted event must come
// out of the DAQ link complete and in order.
module tb_fe_interface;
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

  localparam int NC = 80, D = 160, NW = 41;
  logic bx_en, l1a;
  logic [7:0] adc [NC];
  logic [3:0] dly [NC];
  logic [6:0] sel [4][4];
  flow_word_t tw [4];
  tag_t bcid;
  logic ser_valid, ser_sof, ser_eof, dr_full;
  logic [15:0] ser_data, n_stored, n_lost;

  fe_interface dut (.clk, .rst_n, .bx_en, .adc, .dly, .sel, .l1a, .tw, .bcid,
    .ser_valid, .ser_sof, .ser_eof, .ser_data, .dr_full, .n_stored, .n_lost);

  logic [7:0] hist [int][NC];

  function automatic logic [7:0] synced(int k, int c);
    int src;
    src = k - 1 - int'(dly[c]);
    return (src >= 0) ? hist[src][c] : 8'h0;
  endfunction

  int acc_tags [$];
  logic [NW*16-1:0] rx;
  int rx_n = -1, events = 0;

  // DAQ receiver
  always @(negedge clk) if (rst_n && ser_valid) begin
    if (ser_sof) rx_n = 0;
    rx[(NW-1-rx_n)*16 +: 16] = ser_data;
    rx_n++;
    if (ser_eof) begin
      check(rx_n == NW, "event length");
      if (acc_tags.size() == 0) check(0, "unexpected event");
      else begin
        int k, bad;
        k = acc_tags.pop_front();
        check(rx[NW*16-4-1 -: TAG_W] == tag_t'(k), $sformatf("event tag %0d, expected %0d", rx[NW*16-5 -: TAG_W], k));
        bad = 0;
        for (int c = 0; c < NC; c++) if (rx[(NC-1-c)*8 +: 8] != synced(k, c)) bad++;
        check(bad == 0, $sformatf("event %0d: %0d channels wrong", k, bad));
      end
      events++;
    end
  end

  initial begin
    int words_ok;
    bx_en = 0; l1a = 0;
    for (int c = 0; c < NC; c++) begin adc[c] = 0; dly[c] = 4'($urandom); end
    for (int t = 0; t < 4; t++) for (int b = 0; b < 4; b++) sel[t][b] = 7'($urandom_range(0, NC - 1));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 900; n++) begin
      for (int c = 0; c < NC; c++) begin adc[c] = 8'($urandom); hist[n][c] = adc[c]; end
      l1a = (n > D + 1) && ($urandom_range(0, 29) == 0);
      if (l1a) acc_tags.push_back(n - D - 1);
      bx_en = 1;
      #1 check(bcid == tag_t'(n), "crossing counter");
      @(negedge clk);
      bx_en = 0; l1a = 0;
      words_ok = 1;
      for (int t = 0; t < 4; t++)
        if (!(tw[t].valid && tw[t].tag == tag_t'(n) &&
              tw[t].data == {synced(n, int'(sel[t][0])), synced(n, int'(sel[t][1]))})) words_ok = 0;
      @(negedge clk);
      for (int t = 0; t < 4; t++)
        if (!(tw[t].valid && tw[t].tag == tag_t'(n) &&
              tw[t].data == {synced(n, int'(sel[t][2])), synced(n, int'(sel[t][3]))})) words_ok = 0;
      check(words_ok == 1, $sformatf("crossing %0d: trigger words", n));
    end
    repeat (NW * 20) @(negedge clk);
    check(acc_tags.size() == 0 && events > 10, $sformatf("%0d events received, %0d missing", events, acc_tags.size()));
    check(n_lost == 0 && int'(n_stored) == events, "derandomizer counters");
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

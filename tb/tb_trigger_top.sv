// tb_trigger_top: end-to-end test of the trigger slice at its default size
// (80 channels, 4 towers, 10-layer stacks, 20-cycle algorithm, a bunch
// crossing every 2 clock cycles, pipeline of 160 crossings).
//
// Phase 1, 1200 crossings of random samples with random channel delays and
// trigger-word format (samples mostly small, 3 % large), fixed thresholds
// and a sparse look-up table.  A model of the slice
// (synchronization, trigger words, sum-against-threshold algorithm, zero
// filter, table look-up) predicts which crossings are accepted.  The
// testbench closes the loop the way the timing system would: an accept for
// crossing k is returned as `l1a` at crossing k + 161, when k leaves the
// pipeline buffer.  Checked: every accept is predicted and every predicted
// crossing is accepted; every accepted event arrives on the DAQ link with
// the right content; each stack processed every set (no overrun); each layer
// fetched one set in ten.
// Phase 2 overloads the slice: all thresholds zero (every set accepted) so
// the 4:1 pyramid node overflows, and a burst of accepts fills the
// derandomizer so that accepts are lost; one processor of tower 0 is
// excluded from service, so that stack overruns.  Checked: all three happen
// and are counted consistently.
// Each mechanism (set fetch, data bypass, result bypass, zero filtering,
// accept, event stored, pyramid overflow, accept lost, overrun) is counted and must
// occur at least once.
module tb_trigger_top;
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

  localparam int NC = 80, NT = 4, NL = 10, D = 160, NW = 41;
  localparam int N1 = 1200;

  logic bx_en, l1a, lut_we, lut_wdata;
  logic [7:0] adc [NC];
  logic [3:0] dly [NC];
  logic [6:0] sel [NT][4];
  data_t threshold [NT];
  logic [NL-1:0] exclude [NT];
  logic [7:0] lut_addr;
  tag_t bcid, acc_tag;
  logic ser_valid, ser_sof, ser_eof, dr_full, acc_valid, merge_overflow;
  logic [15:0] ser_data, n_stored, n_lost, n_cand, n_accept, n_merge_overflow;
  logic [NL-1:0] layer_fetch [NT], layer_busy [NT];
  logic [NT-1:0] overrun;
  logic [15:0] n_overrun [NT], n_results [NT], n_nonzero [NT];
  logic [15:0] n_layer_input [NT][NL], n_layer_result [NT][NL], n_layer_byp_data [NT][NL], n_layer_byp_res [NT][NL];

  trigger_top dut (
    .clk, .rst_n, .bx_en, .adc, .dly, .sel, .threshold, .exclude, .lut_we, .lut_addr, .lut_wdata,
    .l1a, .bcid, .ser_valid, .ser_sof, .ser_eof, .ser_data, .dr_full, .n_stored, .n_lost,
    .acc_valid, .acc_tag, .n_cand, .n_accept, .layer_fetch, .layer_busy, .overrun,
    .n_overrun, .n_results, .n_nonzero, .n_layer_input, .n_layer_result, .n_layer_byp_data,
    .n_layer_byp_res, .merge_overflow, .n_merge_overflow);

  // ---------------- model ----------------
  logic [7:0] hist [int][NC];
  bit lut_model [256];
  bit predicted [int];
  int n_pred_nonzero [NT];

  function automatic logic [7:0] synced(int k, int c);
    int src;
    src = k - 1 - int'(dly[c]);
    return (src >= 0) ? hist[src][c] : 8'h0;
  endfunction

  function automatic data_t word_of(int k, int t, int j);
    return {synced(k, int'(sel[t][2*j])), synced(k, int'(sel[t][2*j+1]))};
  endfunction

  task automatic predict(int k);
    bit acc;
    data_t w0, w1;
    acc = 0;
    for (int t = 0; t < NT; t++) begin
      w0 = word_of(k, t, 0);
      w1 = word_of(k, t, 1);
      if (18'(w0) + 18'(w1) >= 18'(threshold[t])) begin
        if (w0 != 0) begin n_pred_nonzero[t]++; if (lut_model[{2'(t), w0[15:10]}]) acc = 1; end
        if (w1 != 0) begin n_pred_nonzero[t]++; if (lut_model[{2'(t), w1[15:10]}]) acc = 1; end
      end
    end
    if (acc) predicted[k] = 1;
  endtask

  // ---------------- accept loop and DAQ receiver ----------------
  bit phase2 = 0;
  bit l1a_at [int];
  bit accepted [int];
  int acc_q [$];      // tags expected on the DAQ link, in order
  int crossing = -1;
  int m_fetch = 0, m_byp_data = 0, m_byp_res = 0, m_zero = 0, m_accept = 0,
      m_stored = 0, m_overflow = 0, m_lost = 0, m_overrun = 0;

  always @(negedge clk) if (rst_n && acc_valid) begin
    m_accept++;
    if (!phase2) begin
      check(predicted.exists(int'(acc_tag)), $sformatf("accept of crossing %0d not predicted", acc_tag));
      if (!accepted.exists(int'(acc_tag))) begin
        accepted[int'(acc_tag)] = 1;
        l1a_at[int'(acc_tag) + D + 1] = 1;
      end
    end
  end

  logic [NW*16-1:0] rx;
  int rx_n = 0, events = 0;
  always @(negedge clk) if (rst_n && ser_valid) begin
    if (ser_sof) rx_n = 0;
    rx[(NW-1-rx_n)*16 +: 16] = ser_data;
    rx_n++;
    if (ser_eof) begin
      events++;
      if (!phase2) begin
        if (acc_q.size() == 0) check(0, "DAQ event nobody accepted");
        else begin
          int k, bad;
          k = acc_q.pop_front();
          check(int'(rx[NW*16-5 -: TAG_W]) == k, $sformatf("DAQ event tag %0d, expected %0d", rx[NW*16-5 -: TAG_W], k));
          bad = 0;
          for (int c = 0; c < NC; c++) if (rx[(NC-1-c)*8 +: 8] != synced(k, c)) bad++;
          check(bad == 0, $sformatf("DAQ event %0d: %0d channels wrong", k, bad));
        end
      end
    end
  end

  always @(negedge clk) if (rst_n)
    for (int t = 0; t < NT; t++) m_fetch += $countones(layer_fetch[t]);

  task automatic crossing_step(int n, bit rnd);
    // mostly small samples, a few large ones, as in a detector at low occupancy
    for (int c = 0; c < NC; c++) begin
      adc[c] = ($urandom_range(0, 99) < 3) ? 8'($urandom_range(16, 255)) : 8'($urandom_range(0, 15));
      hist[n][c] = adc[c];
    end
    if (rnd) l1a = 1;
    else     l1a = !phase2 && l1a_at.exists(n);
    if (l1a && !phase2) acc_q.push_back(n - D - 1);
    bx_en = 1;
    @(negedge clk);
    bx_en = 0; l1a = 0;
    @(negedge clk);
  endtask

  initial begin
    int lost0, stored0, ovf0;
    bx_en = 0; l1a = 0; lut_we = 0; lut_addr = 0; lut_wdata = 0;
    for (int c = 0; c < NC; c++) begin adc[c] = 0; dly[c] = 4'($urandom); end
    for (int t = 0; t < NT; t++) begin
      exclude[t] = '0;
      for (int b = 0; b < 4; b++) sel[t][b] = 7'($urandom_range(0, NC - 1));
      n_pred_nonzero[t] = 0;
    end
    // a set passes a stack only if a large sample sits in a high byte; the
    // table accepts candidates whose top byte is 240 or more, so a few per
    // cent of the crossings are accepted, below the rate the DAQ link drains
    for (int t = 0; t < NT; t++) threshold[t] = data_t'(20000 + 1000 * t);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      lut_we = 1; lut_addr = 8'(i); lut_wdata = (i % 64 >= 60);
      lut_model[i] = lut_wdata;
      @(negedge clk);
    end
    lut_we = 0;
    @(negedge clk);

    // ---------------- phase 1 ----------------
    for (int n = 0; n < N1; n++) begin
      check(bcid == tag_t'(n), "crossing counter");
      predict(n);
      crossing_step(n, 0);
    end
    // let the last accepts and events drain (no new accepts: data keep flowing)
    for (int n = N1; n < N1 + D + 60; n++) begin
      predict(n);
      crossing_step(n, 0);
    end
    repeat (NW * 20) @(negedge clk);
    begin
      int missing = 0;
      foreach (predicted[k]) if (k < N1 && !accepted.exists(k)) missing++;
      check(missing == 0, $sformatf("%0d predicted accepts missing", missing));
      check(accepted.num() > 20, $sformatf("only %0d crossings accepted", accepted.num()));
    end
    check(acc_q.size() == 0, $sformatf("%0d DAQ events missing", acc_q.size()));
    check(int'(n_stored) == events && n_lost == 0, "derandomizer counters in phase 1");
    check(n_merge_overflow == 0, "no pyramid overflow in phase 1");
    for (int t = 0; t < NT; t++) begin
      check(n_overrun[t] == 0, $sformatf("tower %0d: no stack overrun", t));
      check(int'(n_results[t]) == 2 * (N1 + D + 60), $sformatf("tower %0d: %0d result words", t, n_results[t]));
      check(int'(n_nonzero[t]) == n_pred_nonzero[t],
            $sformatf("tower %0d: %0d non-zero results, expected %0d", t, n_nonzero[t], n_pred_nonzero[t]));
      for (int l = 0; l < NL; l++) begin
        int ni;
        ni = int'(n_layer_input[t][l]);
        check(ni == 2 * (N1 + D + 60) / NL, $sformatf("tower %0d layer %0d fetched %0d words", t, l, ni));
        if (l > 0) m_byp_res += int'(n_layer_byp_res[t][l]);
        m_byp_data += int'(n_layer_byp_data[t][l]);
      end
      m_zero += int'(n_results[t]) - int'(n_nonzero[t]);
    end
    m_stored = int'(n_stored);

    // ---------------- phase 2: overload ----------------
    phase2 = 1;
    for (int t = 0; t < NT; t++) threshold[t] = '0;
    exclude[0] = NL'(1) << 3;   // tower 0 loses layer 4: its stack can no longer keep up
    lost0 = int'(n_lost); stored0 = int'(n_stored); ovf0 = int'(n_merge_overflow);
    for (int n = N1 + D + 60; n < N1 + D + 160; n++) crossing_step(n, (n % 100) < 40);
    repeat (200) @(negedge clk);
    m_overflow = int'(n_merge_overflow) - ovf0;
    m_lost = int'(n_lost) - lost0;
    m_overrun = int'(n_overrun[0]);
    check(int'(n_overrun[1]) + int'(n_overrun[2]) + int'(n_overrun[3]) == 0, "no overrun in towers with all layers");
    check(int'(n_lost) - lost0 + int'(n_stored) - stored0 == 40, "every accept stored or counted lost");

    $display("mechanisms: fetch=%0d bypass_data=%0d bypass_result=%0d zero_filtered=%0d accept=%0d stored=%0d pyramid_overflow=%0d accept_lost=%0d overrun=%0d",
             m_fetch, m_byp_data, m_byp_res, m_zero, m_accept, m_stored, m_overflow, m_lost, m_overrun);
    check(m_fetch > 0, "set fetch happened");
    check(m_byp_data > 0, "data bypass happened");
    check(m_byp_res > 0, "result bypass happened");
    check(m_zero > 0, "zero filtering happened");
    check(m_accept > 0, "accept happened");
    check(m_stored > 0, "event stored happened");
    check(m_overflow > 0, "pyramid overflow happened");
    check(m_lost > 0, "accept lost (derandomizer full) happened");
    check(m_overrun > 0, "stack overrun after excluding a processor happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

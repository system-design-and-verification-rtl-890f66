// flow_pe: one 3D-Flow processor with its intrinsic bypass switch.
//
// Words enter at the top port and leave, one layer later, from a registered
// bottom port; a stack is a chain of these nodes.  The switch has two
// positions.  In position 'i' the processor fetches the words of one input set
// (SET_WORDS words) into its algorithm.  In position 'b' a word from the top
// port is moved unchanged to the bottom port: input data meant for a
// processor further down, or a result of a processor further up.
//
// A processor fetches a set when it is idle at the first word of that set
// (the first idle processor takes the set); otherwise the whole set is
// bypassed.  Set boundaries are found by counting the input data words that
// pass the top port, as each processor counts input data, results, bypass
// data and bypass results.  When the algorithm ends, its SET_WORDS results
// are sent out of the bottom port in cycles in which no bypassed word needs
// it; in regular operation these are exactly the cycles in which the
// processor fetches its next set, so a result takes the place of the datum
// it has just fetched.  Bypassed words always have priority.
//
// A processor whose `exclude` input is high (set by the supervising host for
// a processor found faulty) fetches no new set: its switch stays in 'b' and
// the stack works on with one processor less.  A set it is fetching and a
// result it holds are still completed.
//
// Timing: top port to bottom port is one cycle for bypassed words.  A result
// leaves ALGO_CYCLES cycles after the first word of its set was fetched, if
// the bottom port is free.  The per-processor counters are outputs for the
// supervising host.  Fetch on idle and result slot priority are choices of
// this design; the switch positions, the registered bottom port, the
// counters and the exclusion follow the 3D-Flow description.
module flow_pe
  import flow_pkg::*;
#(
  parameter int unsigned SET_WORDS   = 2,
  parameter int unsigned ALGO_CYCLES = 20,
  parameter int unsigned CNT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            threshold,   // algorithm parameter (program)
  input  logic             exclude,     // processor taken out of service: always 'b'
  input  flow_word_t       top_in,
  output flow_word_t       bot_out,
  output logic             sw_i,        // switch in position 'i' this cycle
  output logic             busy,        // algorithm running
  output logic [CNT_W-1:0] n_input,     // input data words fetched
  output logic [CNT_W-1:0] n_result,    // result words sent
  output logic [CNT_W-1:0] n_byp_data,  // input data words bypassed
  output logic [CNT_W-1:0] n_byp_res    // result words bypassed
);
  localparam int unsigned IDX_W = (SET_WORDS > 1) ? $clog2(SET_WORDS) : 1;

  logic [IDX_W-1:0] seen_idx;   // position of the next data word within its set
  logic             fetching;   // current set is being fetched
  logic             algo_busy, algo_done;
  data_t            algo_res [SET_WORDS];
  data_t            res_buf  [SET_WORDS];
  tag_t             set_tag, res_tag;
  logic [IDX_W:0]   res_left;   // result words still to be sent
  logic [IDX_W-1:0] res_idx;

  logic is_data, first_word, take, pass, send;

  assign is_data    = top_in.valid && !top_in.is_result;
  assign first_word = (seen_idx == '0);
  assign take       = is_data && (first_word ? !(algo_busy || fetching || exclude) : fetching);
  assign pass       = top_in.valid && !take;
  assign send       = !pass && (res_left != '0);
  assign sw_i       = take;
  assign busy       = algo_busy;

  flow_algo #(.SET_WORDS(SET_WORDS), .ALGO_CYCLES(ALGO_CYCLES)) u_algo (
    .clk, .rst_n,
    .start    (take && first_word),
    .wr_en    (take),
    .wr_idx   (seen_idx),
    .wr_data  (top_in.data),
    .threshold,
    .res_full (res_left != '0),
    .busy     (algo_busy),
    .done     (algo_done),
    .res      (algo_res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen_idx   <= '0;
      fetching   <= 1'b0;
      set_tag    <= '0;
      res_tag    <= '0;
      res_left   <= '0;
      res_idx    <= '0;
      bot_out    <= FLOW_IDLE;
      n_input    <= '0;
      n_result   <= '0;
      n_byp_data <= '0;
      n_byp_res  <= '0;
      for (int i = 0; i < SET_WORDS; i++) res_buf[i] <= '0;
    end else begin
      // set framing
      if (is_data) begin
        seen_idx <= (seen_idx == IDX_W'(SET_WORDS - 1)) ? '0 : seen_idx + 1'b1;
        if (take && first_word) set_tag <= top_in.tag;
        fetching <= take && (seen_idx != IDX_W'(SET_WORDS - 1));
      end

      // bottom port (registered)
      if (pass) begin
        bot_out <= top_in;
      end else if (send) begin
        bot_out <= '{valid: 1'b1, is_result: 1'b1, tag: res_tag, data: res_buf[res_idx]};
      end else begin
        bot_out <= FLOW_IDLE;
      end

      // result buffer
      if (send) begin
        res_left <= res_left - 1'b1;
        res_idx  <= (res_idx == IDX_W'(SET_WORDS - 1)) ? '0 : res_idx + 1'b1;
      end
      if (algo_done) begin
        for (int i = 0; i < SET_WORDS; i++) res_buf[i] <= algo_res[i];
        res_tag  <= set_tag;
        res_left <= (IDX_W+1)'(SET_WORDS);
        res_idx  <= '0;
      end

      // counters
      if (take) n_input <= n_input + 1'b1;
      if (send) n_result <= n_result + 1'b1;
      if (pass && !top_in.is_result) n_byp_data <= n_byp_data + 1'b1;
      if (pass && top_in.is_result)  n_byp_res  <= n_byp_res + 1'b1;
    end
  end

  // A new result may only be loaded once the previous one has left.
  assert property (@(posedge clk) disable iff (!rst_n) algo_done |-> res_left == '0);
endmodule

// flow_algo: the trigger algorithm executed by one 3D-Flow processor.
//
// Each processor runs the whole first-level algorithm on one set of input
// words; the run takes a fixed ALGO_CYCLES clock cycles, counted from the
// cycle the first word of the set was fetched.  The real processor is
// programmable and its program is not part of this RTL: this module is a
// stand-in with the same timing.  The stand-in algorithm accepts a set when
// the sum of its words reaches `threshold`; an accepted set returns its words
// as results, a rejected set returns zeros (downstream, zero means "nothing
// found").  The threshold stands for the program loaded by the supervising
// host.
//
// Interface: `start` with the first word; words arrive on `wr_en`/`wr_idx`/
// `wr_data` (all SET_WORDS of them before the run ends).  `done` pulses in the
// cycle the result is handed over on `res`; it is held back while `res_full`
// is high (the previous result has not yet left the processor).
module flow_algo
  import flow_pkg::*;
#(
  parameter int unsigned SET_WORDS   = 2,
  parameter int unsigned ALGO_CYCLES = 20,
  localparam int unsigned IDX_W      = (SET_WORDS > 1) ? $clog2(SET_WORDS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         wr_en,
  input  logic [IDX_W-1:0]             wr_idx,
  input  data_t                        wr_data,
  input  data_t                        threshold,
  input  logic                         res_full,
  output logic                         busy,
  output logic                         done,
  output data_t                        res [SET_WORDS]
);
  localparam int unsigned CNT_W = $clog2(ALGO_CYCLES + 1);
  localparam int unsigned SUM_W = DATA_W + $clog2(SET_WORDS) + 1;

  data_t            words [SET_WORDS];
  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] sum;
  logic             accept;

  always_comb begin
    sum = '0;
    for (int i = 0; i < SET_WORDS; i++) sum += SUM_W'(words[i]);
    accept = (sum >= SUM_W'(threshold));
    for (int i = 0; i < SET_WORDS; i++) res[i] = accept ? words[i] : '0;
  end

  // The run is over once ALGO_CYCLES cycles have elapsed since `start`.
  assign done = busy && (cnt >= CNT_W'(ALGO_CYCLES - 1)) && !res_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      for (int i = 0; i < SET_WORDS; i++) words[i] <= '0;
    end else begin
      if (wr_en) words[wr_idx] <= wr_data;
      if (start) begin
        busy <= 1'b1;
        cnt  <= CNT_W'(1);
      end else if (done) begin
        busy <= 1'b0;
      end else if (busy && cnt < CNT_W'(ALGO_CYCLES - 1)) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (ALGO_CYCLES >= SET_WORDS)
      else $error("flow_algo: the run must outlast the fetch of a set");
  end
endmodule

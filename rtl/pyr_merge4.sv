// pyr_merge4: pyramid channel-reduction node, four inputs to one output.
//
// From the second pyramid layer on, data of four sources are routed to one,
// so each layer has a quarter of the channels of the layer above.  Since the
// zero filter has removed nearly all words, the four inputs share one output
// word per cycle.  Each input has a FIFO_DEPTH-word buffer; the output takes
// the oldest word of the non-empty buffers in round-robin order and labels it
// with the input it came from (`src`).  A word that arrives at a full buffer
// is dropped and counted in `n_overflow` (and `overflow` pulses).
// Latency: one cycle through the buffer plus one register at the output when
// there is no contention.  The buffering and the arbitration are choices of
// this design; the 4:1 reduction follows the 3D-Flow pyramid.
module pyr_merge4
  import flow_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned CNT_W      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  flow_word_t       top_in [4],
  output cand_t            bot_out,
  output logic             overflow,
  output logic [CNT_W-1:0] n_overflow
);
  localparam int unsigned EW = TAG_W + DATA_W;

  logic [EW-1:0] fifo_q   [4];
  logic [3:0]    empty, full, push, pop;
  logic [1:0]    rr;        // input with the highest priority this cycle
  logic [1:0]    grant;
  logic          any;

  for (genvar i = 0; i < 4; i++) begin : g_in
    assign push[i] = top_in[i].valid && top_in[i].is_result;
    sync_fifo #(.WIDTH(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push    (push[i]),
      .wr_data ({top_in[i].tag, top_in[i].data}),
      .pop     (pop[i]),
      .rd_data (fifo_q[i]),
      .full    (full[i]),
      .empty   (empty[i]),
      .count   ()
    );
  end

  always_comb begin
    any   = 1'b0;
    grant = rr;
    for (int k = 0; k < 4; k++) begin
      if (!any && !empty[2'(rr + 2'(k))]) begin
        any   = 1'b1;
        grant = 2'(rr + 2'(k));
      end
    end
    pop = '0;
    if (any) pop[grant] = 1'b1;
    overflow = |(push & full);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr         <= '0;
      bot_out    <= '0;
      n_overflow <= '0;
    end else begin
      bot_out.valid <= any;
      bot_out.src   <= grant;
      {bot_out.tag, bot_out.data} <= fifo_q[grant];
      if (any) rr <= grant + 1'b1;
      n_overflow <= n_overflow + CNT_W'($countones(push & full));
    end
  end
endmodule

// pyr_zero_filter: first pyramid layer below a 3D-Flow stack.
//
// A stack sends a non-zero result for every datum its algorithm accepted and
// zero otherwise.  This node drops every zero value received at its top port
// and passes the few non-zero results on, registered (one cycle latency).
// Input data words (not results) are not expected here and are dropped too.
// `n_in` and `n_out` count the words seen and kept.
module pyr_zero_filter
  import flow_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  flow_word_t       top_in,
  output flow_word_t       bot_out,
  output logic [CNT_W-1:0] n_in,
  output logic [CNT_W-1:0] n_out
);
  logic keep;
  assign keep = top_in.valid && top_in.is_result && (top_in.data != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bot_out <= FLOW_IDLE;
      n_in    <= '0;
      n_out   <= '0;
    end else begin
      bot_out <= keep ? top_in : FLOW_IDLE;
      if (top_in.valid) n_in <= n_in + 1'b1;
      if (keep)         n_out <= n_out + 1'b1;
    end
  end
endmodule

// flow_stack: a stack of N_LAYERS 3D-Flow processors for one channel.
//
// The processors are chained bottom port to top port.  Input sets enter the
// top layer at most one word per cycle; every layer either fetches a set (if
// idle) or passes it down through its bypass switch, so sets are handed out
// round-robin to the layers and each processor may spend up to
// N_LAYERS x (cycles between sets) on its algorithm.  Each layer registers its
// bottom port, so a word advances one layer per cycle whatever the number of
// layers.
//
// The bottom of the last layer carries results only.  An input datum that
// reaches it found every processor busy: the set is lost, `overrun` pulses and
// `n_overrun` counts the words.  Results leave on `res_out` (is_result set).
// Layers set in `exclude` bypass everything; the remaining layers share the
// sets, so the stack keeps up while ALGO_CYCLES <= (layers in service) x
// (cycles between sets).
// Latency from a set entering to its result leaving is ALGO_CYCLES plus the
// number of layers, when the bottom ports are free.
module flow_stack
  import flow_pkg::*;
#(
  parameter int unsigned N_LAYERS    = 10,
  parameter int unsigned SET_WORDS   = 2,
  parameter int unsigned ALGO_CYCLES = 20,
  parameter int unsigned CNT_W       = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  data_t               threshold,
  input  logic [N_LAYERS-1:0] exclude,      // layers taken out of service
  input  flow_word_t          top_in,
  output flow_word_t          res_out,
  output logic                overrun,
  output logic [CNT_W-1:0]    n_overrun,
  output logic [N_LAYERS-1:0] layer_busy,
  output logic [N_LAYERS-1:0] layer_fetch,  // switch of each layer in position 'i'
  output logic [CNT_W-1:0]    n_input    [N_LAYERS],
  output logic [CNT_W-1:0]    n_result   [N_LAYERS],
  output logic [CNT_W-1:0]    n_byp_data [N_LAYERS],
  output logic [CNT_W-1:0]    n_byp_res  [N_LAYERS]
);
  flow_word_t link [N_LAYERS+1];
  assign link[0] = top_in;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    flow_pe #(.SET_WORDS(SET_WORDS), .ALGO_CYCLES(ALGO_CYCLES), .CNT_W(CNT_W)) u_pe (
      .clk, .rst_n, .threshold,
      .exclude    (exclude[l]),
      .top_in     (link[l]),
      .bot_out    (link[l+1]),
      .sw_i       (layer_fetch[l]),
      .busy       (layer_busy[l]),
      .n_input    (n_input[l]),
      .n_result   (n_result[l]),
      .n_byp_data (n_byp_data[l]),
      .n_byp_res  (n_byp_res[l])
    );
  end

  always_comb begin
    res_out = link[N_LAYERS];
    overrun = res_out.valid && !res_out.is_result;
    if (overrun) res_out = FLOW_IDLE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       n_overrun <= '0;
    else if (overrun) n_overrun <= n_overrun + 1'b1;
  end
endmodule

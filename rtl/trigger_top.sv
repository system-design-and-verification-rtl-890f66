// trigger_top: one slice of a programmable first-level trigger built on
// 3D-Flow stacks.
//
// Pipeline of the slice (one clock, `clk`, at the processor rate; a new bunch
// crossing every time `bx_en` is high, every INTERVAL cycles):
//   Stage 2  fe_interface: synchronizes the N_CH = 80 sensor channels, builds
//            one trigger word per tower (N_TOWERS = 4), keeps all channels in
//            the pipeline buffer and sends events accepted by `l1a` through
//            the derandomizer to the DAQ link (ser_*).
//   Stage 3  one flow_stack of N_LAYERS 3D-Flow processors per tower.  Each
//            processor runs the whole algorithm (ALGO_CYCLES cycles) on one
//            crossing; the bypass switches hand crossings to the processors
//            in turn, so the algorithm may take up to N_LAYERS crossings.
//   Stage 4  pyramid: a pyr_zero_filter per tower removes zero results, then
//            pyr_merge4 reduces the four towers to one channel.
//   Stage 5  global_decision: a programmable look-up table turns candidates
//            into accepted bunch-crossing numbers (acc_valid, acc_tag).
// The analog-to-digital conversion (Stage 1) is outside: `adc` carries its
// samples.  The global accept `l1a` enters from outside: the distribution of
// the decision back to the front ends at a fixed latency is not part of this
// slice.  `l1a` refers to the crossing leaving the pipeline buffer, which is
// PIPE_DEPTH + 1 crossings after it entered.
// The monitoring outputs give, per tower and layer, the counts of input
// words fetched, results sent, data bypassed and results bypassed, as the
// supervising host reads them from every processor.
// Configuration (delays, trigger-word format, thresholds, look-up table,
// processors excluded from service) stands for what the supervising host
// loads.  The stage order and the 10-layer, 20-step, 80 MHz-on-40 MHz defaults
// follow the original 3D-Flow design; the word formats and the configuration
// ports are choices of this design.
module trigger_top
  import flow_pkg::*;
#(
  parameter int unsigned FE_CH       = 80,
  parameter int unsigned CH_W        = 8,
  parameter int unsigned N_TOWERS    = 4,
  parameter int unsigned SET_WORDS   = 2,
  parameter int unsigned N_LAYERS    = 10,
  parameter int unsigned ALGO_CYCLES = 20,
  parameter int unsigned MAX_DLY     = 16,
  parameter int unsigned PIPE_DEPTH  = 160,
  parameter int unsigned DR_DEPTH    = 16,
  parameter int unsigned SER_W       = 16,
  parameter int unsigned MERGE_DEPTH = 8,
  parameter int unsigned LUT_AW      = 8,
  parameter int unsigned CNT_W       = 16,
  localparam int unsigned BYTES      = SET_WORDS * DATA_W / CH_W,
  localparam int unsigned SEL_W      = $clog2(FE_CH),
  localparam int unsigned DW         = $clog2(MAX_DLY)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bx_en,
  input  logic [CH_W-1:0]     adc       [FE_CH],
  // configuration
  input  logic [DW-1:0]       dly       [FE_CH],
  input  logic [SEL_W-1:0]    sel       [N_TOWERS][BYTES],
  input  data_t               threshold [N_TOWERS],
  input  logic [N_LAYERS-1:0] exclude   [N_TOWERS],
  input  logic                lut_we,
  input  logic [LUT_AW-1:0]   lut_addr,
  input  logic                lut_wdata,
  // global accept and DAQ link
  input  logic                l1a,
  output tag_t                bcid,
  output logic                ser_valid,
  output logic                ser_sof,
  output logic                ser_eof,
  output logic [SER_W-1:0]    ser_data,
  output logic                dr_full,
  output logic [CNT_W-1:0]    n_stored,
  output logic [CNT_W-1:0]    n_lost,
  // trigger decision
  output logic                acc_valid,
  output tag_t                acc_tag,
  output logic [CNT_W-1:0]    n_cand,
  output logic [CNT_W-1:0]    n_accept,
  // monitoring
  output logic [N_LAYERS-1:0] layer_fetch [N_TOWERS],
  output logic [N_LAYERS-1:0] layer_busy  [N_TOWERS],
  output logic [N_TOWERS-1:0] overrun,
  output logic [CNT_W-1:0]    n_overrun   [N_TOWERS],
  output logic [CNT_W-1:0]    n_results   [N_TOWERS],
  output logic [CNT_W-1:0]    n_nonzero   [N_TOWERS],
  output logic [CNT_W-1:0]    n_layer_input    [N_TOWERS][N_LAYERS],
  output logic [CNT_W-1:0]    n_layer_result   [N_TOWERS][N_LAYERS],
  output logic [CNT_W-1:0]    n_layer_byp_data [N_TOWERS][N_LAYERS],
  output logic [CNT_W-1:0]    n_layer_byp_res  [N_TOWERS][N_LAYERS],
  output logic                merge_overflow,
  output logic [CNT_W-1:0]    n_merge_overflow
);
  flow_word_t tw       [N_TOWERS];
  flow_word_t stack_out[N_TOWERS];
  flow_word_t filt_out [4];
  cand_t      cand;

  fe_interface #(
    .N_CH(FE_CH), .CH_W(CH_W), .N_TOWERS(N_TOWERS), .SET_WORDS(SET_WORDS),
    .MAX_DLY(MAX_DLY), .PIPE_DEPTH(PIPE_DEPTH), .DR_DEPTH(DR_DEPTH),
    .SER_W(SER_W), .CNT_W(CNT_W)
  ) u_fe (
    .clk, .rst_n, .bx_en, .adc, .dly, .sel, .l1a, .tw, .bcid,
    .ser_valid, .ser_sof, .ser_eof, .ser_data, .dr_full, .n_stored, .n_lost
  );

  for (genvar t = 0; t < N_TOWERS; t++) begin : g_tower
    flow_stack #(.N_LAYERS(N_LAYERS), .SET_WORDS(SET_WORDS),
                 .ALGO_CYCLES(ALGO_CYCLES), .CNT_W(CNT_W)) u_stack (
      .clk, .rst_n,
      .threshold   (threshold[t]),
      .exclude     (exclude[t]),
      .top_in      (tw[t]),
      .res_out     (stack_out[t]),
      .overrun     (overrun[t]),
      .n_overrun   (n_overrun[t]),
      .layer_busy  (layer_busy[t]),
      .layer_fetch (layer_fetch[t]),
      .n_input     (n_layer_input[t]),
      .n_result    (n_layer_result[t]),
      .n_byp_data  (n_layer_byp_data[t]),
      .n_byp_res   (n_layer_byp_res[t])
    );

    pyr_zero_filter #(.CNT_W(CNT_W)) u_filter (
      .clk, .rst_n,
      .top_in  (stack_out[t]),
      .bot_out (filt_out[t]),
      .n_in    (n_results[t]),
      .n_out   (n_nonzero[t])
    );
  end

  // Unused inputs of the 4:1 node (fewer than four towers) stay idle.
  for (genvar t = N_TOWERS; t < 4; t++) begin : g_idle
    assign filt_out[t] = FLOW_IDLE;
  end

  pyr_merge4 #(.FIFO_DEPTH(MERGE_DEPTH), .CNT_W(CNT_W)) u_merge (
    .clk, .rst_n,
    .top_in     (filt_out),
    .bot_out    (cand),
    .overflow   (merge_overflow),
    .n_overflow (n_merge_overflow)
  );

  global_decision #(.LUT_AW(LUT_AW), .CNT_W(CNT_W)) u_dec (
    .clk, .rst_n, .lut_we, .lut_addr, .lut_wdata, .cand,
    .acc_valid, .acc_tag, .n_cand, .n_accept
  );

  initial begin
    assert (N_TOWERS <= 4) else $error("trigger_top: one 4:1 pyramid node serves at most four towers");
  end
endmodule

// fe_interface: digital interface from the detector to the trigger and DAQ.
//
// The front-end stage of the trigger slice, running at one bunch crossing per
// `bx_en`.  Four functions are chained:
//   a) fe_input_sync registers all N_CH sensor channels and delays each one by
//      its configured number of crossings (dly);
//   b) fe_trigger_word builds each tower's trigger word (format table sel) and
//      sends it to that tower's 3D-Flow stack as one input set (tw);
//   c) fe_pipeline_buffer keeps every crossing's channels, with its
//      bunch-crossing number, for PIPE_DEPTH crossings;
//   d) fe_derandomizer stores the crossing leaving the pipeline buffer when
//      the global accept l1a is high at that crossing and it is not full, and
//      fe_serializer sends the stored events to the DAQ as SER_W-bit words.
// An event on the DAQ link is {bunch-crossing number, channel 0, ...,
// channel N_CH-1}, most significant word first.  The bunch-crossing number
// counts `bx_en` from reset and wraps.
// The four functions and their configurable sizes follow the original 3D-Flow
// design; the sizes themselves, the event format and the crossing counter are
// choices of this design.
module fe_interface
  import flow_pkg::*;
#(
  parameter int unsigned N_CH       = 80,
  parameter int unsigned CH_W       = 8,
  parameter int unsigned N_TOWERS   = 4,
  parameter int unsigned SET_WORDS  = 2,
  parameter int unsigned MAX_DLY    = 16,
  parameter int unsigned PIPE_DEPTH = 160,
  parameter int unsigned DR_DEPTH   = 16,
  parameter int unsigned SER_W      = 16,
  parameter int unsigned CNT_W      = 16,
  localparam int unsigned BYTES     = SET_WORDS * DATA_W / CH_W,
  localparam int unsigned SEL_W     = $clog2(N_CH),
  localparam int unsigned DW        = $clog2(MAX_DLY)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bx_en,
  input  logic [CH_W-1:0]  adc [N_CH],
  input  logic [DW-1:0]    dly [N_CH],
  input  logic [SEL_W-1:0] sel [N_TOWERS][BYTES],
  input  logic             l1a,
  output flow_word_t       tw  [N_TOWERS],
  output tag_t             bcid,
  output logic             ser_valid,
  output logic             ser_sof,
  output logic             ser_eof,
  output logic [SER_W-1:0] ser_data,
  output logic             dr_full,
  output logic [CNT_W-1:0] n_stored,
  output logic [CNT_W-1:0] n_lost
);
  localparam int unsigned EV_W = TAG_W + N_CH * CH_W;

  logic [CH_W-1:0] synced [N_CH];
  logic [EV_W-1:0] ev_in, ev_out, dr_q;
  logic            ev_valid, dr_empty, dr_pop;

  always_ff @(posedge clk) begin
    if (!rst_n)     bcid <= '0;
    else if (bx_en) bcid <= bcid + 1'b1;
  end

  fe_input_sync #(.N_CH(N_CH), .CH_W(CH_W), .MAX_DLY(MAX_DLY)) u_sync (
    .clk, .rst_n, .bx_en, .din(adc), .dly, .dout(synced)
  );

  fe_trigger_word #(.N_CH(N_CH), .CH_W(CH_W), .N_TOWERS(N_TOWERS),
                    .SET_WORDS(SET_WORDS)) u_tw (
    .clk, .rst_n, .bx_en, .bcid, .ch(synced), .sel, .tw
  );

  always_comb begin
    ev_in[EV_W-1 -: TAG_W] = bcid;
    for (int c = 0; c < N_CH; c++) ev_in[(N_CH-1-c)*CH_W +: CH_W] = synced[c];
  end

  fe_pipeline_buffer #(.WIDTH(EV_W), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk, .rst_n, .bx_en, .din(ev_in), .dout(ev_out), .dout_valid(ev_valid)
  );

  fe_derandomizer #(.WIDTH(EV_W), .DEPTH(DR_DEPTH), .CNT_W(CNT_W)) u_dr (
    .clk, .rst_n, .bx_en, .l1a, .ev_valid, .ev_data(ev_out),
    .pop(dr_pop), .rd_data(dr_q), .empty(dr_empty), .full(dr_full),
    .n_stored, .n_lost
  );

  fe_serializer #(.EV_W(EV_W), .SER_W(SER_W)) u_ser (
    .clk, .rst_n, .ev_data(dr_q), .ev_empty(dr_empty), .ev_pop(dr_pop),
    .ser_valid, .ser_sof, .ser_eof, .ser_data
  );
endmodule

// fe_trigger_word: trigger word formatting of the front-end interface.
//
// For each of N_TOWERS trigger towers a trigger word of SET_WORDS x DATA_W
// bits is built from the synchronized sensor channels.  The extraction format
// is a table: byte b of tower t's word is channel sel[t][b] (byte 0 is the
// most significant byte of word 0).  At every bunch crossing (`bx_en`) the
// words are captured together with the bunch-crossing number and sent to the
// tower's 3D-Flow stack as one input set: word 0 in the cycle after
// `bx_en`, the others in the cycles that follow.  Bunch crossings must
// therefore be at least SET_WORDS cycles apart.
// Building the word from the sensor signals follows the original 3D-Flow
// design; the byte-select format and the word-serial transfer are choices of
// this design.
module fe_trigger_word
  import flow_pkg::*;
#(
  parameter int unsigned N_CH      = 80,
  parameter int unsigned CH_W      = 8,
  parameter int unsigned N_TOWERS  = 4,
  parameter int unsigned SET_WORDS = 2,
  localparam int unsigned BYTES    = SET_WORDS * DATA_W / CH_W,
  localparam int unsigned SEL_W    = $clog2(N_CH),
  localparam int unsigned IDX_W    = (SET_WORDS > 1) ? $clog2(SET_WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bx_en,
  input  tag_t             bcid,
  input  logic [CH_W-1:0]  ch  [N_CH],
  input  logic [SEL_W-1:0] sel [N_TOWERS][BYTES],
  output flow_word_t       tw  [N_TOWERS]
);
  localparam int unsigned BPW = DATA_W / CH_W;  // bytes per word

  logic [CH_W-1:0] held [N_TOWERS][BYTES];
  tag_t            held_tag;
  logic [IDX_W:0]  left;   // words of the current set still to send
  logic [IDX_W-1:0] widx;

  logic [CH_W-1:0] cur [N_TOWERS][BYTES];
  always_comb begin
    for (int t = 0; t < N_TOWERS; t++)
      for (int b = 0; b < BYTES; b++) cur[t][b] = ch[sel[t][b]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_tag <= '0;
      left     <= '0;
      widx     <= '0;
      for (int t = 0; t < N_TOWERS; t++) begin
        tw[t] <= FLOW_IDLE;
        for (int b = 0; b < BYTES; b++) held[t][b] <= '0;
      end
    end else begin
      for (int t = 0; t < N_TOWERS; t++) tw[t] <= FLOW_IDLE;
      if (bx_en) begin
        // word 0 leaves at once, the others from the held copy
        held     <= cur;
        held_tag <= bcid;
        left     <= (IDX_W+1)'(SET_WORDS - 1);
        widx     <= IDX_W'(1 % SET_WORDS);
        for (int t = 0; t < N_TOWERS; t++) begin
          tw[t].valid <= 1'b1;
          tw[t].tag   <= bcid;
          for (int j = 0; j < BPW; j++)
            tw[t].data[DATA_W-1-j*CH_W -: CH_W] <= cur[t][j];
        end
      end else if (left != '0) begin
        left <= left - 1'b1;
        widx <= widx + 1'b1;
        for (int t = 0; t < N_TOWERS; t++) begin
          tw[t].valid <= 1'b1;
          tw[t].tag   <= held_tag;
          for (int j = 0; j < BPW; j++)
            tw[t].data[DATA_W-1-j*CH_W -: CH_W] <= held[t][widx*BPW + j];
        end
      end
    end
  end

  initial begin
    assert (DATA_W % CH_W == 0) else $error("fe_trigger_word: word must hold whole channels");
  end
endmodule

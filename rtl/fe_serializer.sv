// fe_serializer: sends accepted events to the data acquisition system.
//
// Takes one event of EV_W bits from the derandomizer and sends it as
// N_WORDS = ceil(EV_W / SER_W) words of SER_W bits, one per clock cycle, most
// significant word first (the unused top bits of the first word are zero).
// `ser_sof` marks the first word of an event and `ser_eof` the last.  The
// event is popped from the derandomizer when its first word is sent, and the
// next event starts in the cycle after the last word of the previous one.
// Serializing to the DAQ follows the original 3D-Flow design; the word width
// and framing are choices of this design.
module fe_serializer #(
  parameter int unsigned EV_W  = 652,
  parameter int unsigned SER_W = 16,
  localparam int unsigned N_WORDS = (EV_W + SER_W - 1) / SER_W,
  localparam int unsigned CW      = $clog2(N_WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [EV_W-1:0]  ev_data,
  input  logic             ev_empty,
  output logic             ev_pop,
  output logic             ser_valid,
  output logic             ser_sof,
  output logic             ser_eof,
  output logic [SER_W-1:0] ser_data
);
  logic [N_WORDS*SER_W-1:0] shreg;
  logic [CW-1:0]            left;   // words still to send after the current one

  assign ev_pop = (left == '0) && !ev_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '0;
      left      <= '0;
      ser_valid <= 1'b0;
      ser_sof   <= 1'b0;
      ser_eof   <= 1'b0;
      ser_data  <= '0;
    end else if (ev_pop) begin
      ser_valid <= 1'b1;
      ser_sof   <= 1'b1;
      ser_eof   <= (N_WORDS == 1);
      ser_data  <= SER_W'(ev_data >> ((N_WORDS - 1) * SER_W));
      shreg     <= (N_WORDS*SER_W)'(ev_data) << SER_W;
      left      <= CW'(N_WORDS - 1);
    end else if (left != '0) begin
      ser_valid <= 1'b1;
      ser_sof   <= 1'b0;
      ser_eof   <= (left == CW'(1));
      ser_data  <= shreg[N_WORDS*SER_W-1 -: SER_W];
      shreg     <= shreg << SER_W;
      left      <= left - 1'b1;
    end else begin
      ser_valid <= 1'b0;
      ser_sof   <= 1'b0;
      ser_eof   <= 1'b0;
    end
  end
endmodule

// fe_derandomizer: derandomizing FIFO of the front-end interface.
//
// Accepted events arrive at random times; the FIFO holds them so that they
// can be read out at a steady rate.  At a bunch crossing (`bx_en`) with the
// global accept `l1a` high, the event leaving the pipeline buffer is stored if
// the FIFO is not full; an accept that finds the FIFO full is counted in
// `n_lost` and the event is not kept.  The readout side (`rd_data`, `empty`,
// `pop`) is first-word fall-through.
// Storing on accept only when not full follows the original 3D-Flow design;
// the default depth of 16 events is a choice of this design.
module fe_derandomizer #(
  parameter int unsigned WIDTH = 652,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bx_en,
  input  logic             l1a,
  input  logic             ev_valid,
  input  logic [WIDTH-1:0] ev_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [CNT_W-1:0] n_stored,
  output logic [CNT_W-1:0] n_lost
);
  logic accept;
  assign accept = bx_en && l1a && ev_valid;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push    (accept && !full),
    .wr_data (ev_data),
    .pop,
    .rd_data,
    .full,
    .empty,
    .count   ()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_stored <= '0;
      n_lost   <= '0;
    end else if (accept) begin
      if (full) n_lost   <= n_lost + 1'b1;
      else      n_stored <= n_stored + 1'b1;
    end
  end
endmodule

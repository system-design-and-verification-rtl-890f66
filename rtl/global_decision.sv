// global_decision: global first-level decision unit.
//
// Placed after the pyramid, where the number of channels is small.  Each
// candidate (a non-zero result of a 3D-Flow processor, with the pyramid input
// it came from and its bunch crossing) addresses a 1-bit look-up table; a set
// bit accepts the bunch crossing.  The address is the candidate's source
// input followed by the top LUT_AW-SRC_W bits of its data word.  Several
// candidates of one bunch crossing arrive back to back; an accept is issued
// once per bunch crossing (a repeat of the last accepted tag is suppressed).
// The table is written through `lut_we`/`lut_addr`/`lut_wdata`, as the
// programmable logic is loaded, and is cleared by reset.
// Timing: `acc_valid`/`acc_tag` one cycle after the candidate.
// The look-up-table form follows the original 3D-Flow design; the address
// layout and the once-per-crossing rule are choices of this design.
module global_decision
  import flow_pkg::*;
#(
  parameter int unsigned LUT_AW = 8,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lut_we,
  input  logic [LUT_AW-1:0] lut_addr,
  input  logic              lut_wdata,
  input  cand_t             cand,
  output logic              acc_valid,
  output tag_t              acc_tag,
  output logic [CNT_W-1:0]  n_cand,
  output logic [CNT_W-1:0]  n_accept
);
  logic [(1<<LUT_AW)-1:0] lut;
  logic [LUT_AW-1:0]      addr;
  logic                   have_last, hit;
  tag_t                   last_tag;

  assign addr = {cand.src, cand.data[DATA_W-1 -: (LUT_AW - SRC_W)]};
  assign hit  = cand.valid && lut[addr] && !(have_last && last_tag == cand.tag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lut       <= '0;
      have_last <= 1'b0;
      last_tag  <= '0;
      acc_valid <= 1'b0;
      acc_tag   <= '0;
      n_cand    <= '0;
      n_accept  <= '0;
    end else begin
      if (lut_we) lut[lut_addr] <= lut_wdata;
      acc_valid <= hit;
      if (hit) begin
        acc_tag   <= cand.tag;
        last_tag  <= cand.tag;
        have_last <= 1'b1;
        n_accept  <= n_accept + 1'b1;
      end
      if (cand.valid) n_cand <= n_cand + 1'b1;
    end
  end
endmodule

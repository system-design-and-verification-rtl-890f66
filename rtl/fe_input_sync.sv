// fe_input_sync: input signal synchronization of the front-end interface.
//
// Every bunch crossing (`bx_en`) the samples of all N_CH sensor channels are
// registered into a per-channel shift register of MAX_DLY stages.  Channel c
// is read out from stage dly[c], which delays it by dly[c] further bunch
// crossings; this lines up channels whose signals arrive at different times.
// `dly` is static configuration (one entry per channel).
// Timing: with dly[c] = 0 the sample appears on dout[c] after the `bx_en`
// edge that registered it; each unit of delay adds one bunch crossing.
// Registering and per-channel delay follow the original 3D-Flow design; the
// shift-register form and the delay range are choices of this design.
module fe_input_sync #(
  parameter int unsigned N_CH    = 80,
  parameter int unsigned CH_W    = 8,
  parameter int unsigned MAX_DLY = 16,
  localparam int unsigned DW     = $clog2(MAX_DLY)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bx_en,
  input  logic [CH_W-1:0] din  [N_CH],
  input  logic [DW-1:0]   dly  [N_CH],
  output logic [CH_W-1:0] dout [N_CH]
);
  logic [CH_W-1:0] sr [N_CH][MAX_DLY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++)
        for (int k = 0; k < MAX_DLY; k++) sr[c][k] <= '0;
    end else if (bx_en) begin
      for (int c = 0; c < N_CH; c++) begin
        sr[c][0] <= din[c];
        for (int k = 1; k < MAX_DLY; k++) sr[c][k] <= sr[c][k-1];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < N_CH; c++) dout[c] = sr[c][dly[c]];
  end
endmodule

// fe_pipeline_buffer: pipeline buffer of the front-end interface.
//
// Holds the data of every bunch crossing while the first-level trigger
// decides whether to keep it.  A circular memory of DEPTH entries is written
// at every `bx_en`; in the same bunch crossing the entry written DEPTH
// crossings earlier is read out before it is overwritten.  The output thus
// shows, at every bunch crossing, the crossing that is exactly DEPTH crossings
// old, which is when its global accept is due.  `dout_valid` stays low until
// the memory has been filled once.
// Timing: `dout` changes on the clock edge that ends a `bx_en` cycle.
// The buffer and its configurable depth follow the original 3D-Flow design;
// the default depth of 160 crossings (4 us at 40 MHz) is a choice of this
// design.
module fe_pipeline_buffer #(
  parameter int unsigned WIDTH = 652,
  parameter int unsigned DEPTH = 160,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bx_en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;
  logic             wrapped;

  always_ff @(posedge clk) begin
    if (bx_en) begin
      mem[ptr] <= din;
      dout     <= mem[ptr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr        <= '0;
      wrapped    <= 1'b0;
      dout_valid <= 1'b0;
    end else if (bx_en) begin
      ptr        <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
      dout_valid <= wrapped;
    end
  end
endmodule

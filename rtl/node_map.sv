// node_map: pre-computed map from the tool's position on the workpiece to
// the active node of the workpiece's finite-element model.
//
// Searching for the node nearest to the tool every step costs hundreds of
// cycles; instead the host fills this table once, at initialisation, with
// the nearest node of every map cidx, and each step costs a single read.
// Results differ from a true nearest-node search only near cidx corners.
// The position is a fix_t along the feed direction; its integer part is the
// cidx index, so the host scales the feed so that one map cidx is one unit.
// Positions below 0 use cidx 0 and positions past the end use the last cidx.
// Write port: one entry per clock. Read: node is registered, one cycle after
// rd_en.
module node_map
  import milling_pkg::*;
#(
  parameter int unsigned CELLS = 1024,
  parameter int unsigned NODES = 64
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(CELLS)-1:0] wr_cell,
  input  logic [$clog2(NODES)-1:0] wr_node,
  input  logic                     rd_en,
  input  fix_t                     pos,
  output logic [$clog2(NODES)-1:0] node
);
  localparam int unsigned CB = $clog2(CELLS);

  logic [$clog2(NODES)-1:0] map [CELLS];

  logic signed [FX_W-FX_FRAC-1:0] ipart;
  logic [CB-1:0]                  cidx;
  assign ipart = pos[FX_W-1:FX_FRAC];
  always_comb begin
    if (ipart < 0)                                     cidx = '0;
    else if (ipart > $signed((FX_W-FX_FRAC)'(CELLS - 1))) cidx = CB'(CELLS - 1);
    else                                               cidx = ipart[CB-1:0];
  end

  always_ff @(posedge clk) begin
    if (wr_en) map[wr_cell] <= wr_node;
    if (rd_en) node <= map[cidx];
  end
endmodule

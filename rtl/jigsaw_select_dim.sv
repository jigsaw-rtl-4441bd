// jigsaw_select_dim: one dimension of the select unit (combinational).
//
// A coordinate in [0, N) is split into its tile coordinate (upper bits,
// coord / T) and its relative coordinate (lower bits, coord mod T, fraction
// kept). The forward distance from the pipeline's column `col` to the sample
// is formed as relative + T - col, taken modulo T. The sample reaches a grid
// point of this column when that distance is below the window width W. When
// the integer part of the relative coordinate is below `col`, the affected
// point lies in the previous tile, so the tile coordinate is decremented,
// wrapping from 0 to nt-1 (the grid is a torus). The table address is the
// distance times L (a shift, L being a power of two), rounded to nearest, and
// folded about the window centre W*L/2 because only half of the symmetric
// kernel is stored. The fold and the saturation of the address at the last
// table entry are this design's reading of the half-table storage.
//
// Timing: purely combinational; jigsaw_select registers around it.
module jigsaw_select_dim
  import jigsaw_pkg::*;
#(
  parameter int unsigned T     = T_DEF,
  parameter int unsigned N_MAX = N_MAX_DEF,
  localparam int unsigned TB   = $clog2(T),
  localparam int unsigned TC_W = $clog2(N_MAX / T),
  localparam int unsigned DW   = TB + COORD_FRAC          // distance width
) (
  input  logic [COORD_W-1:0] coord,
  input  logic [TB-1:0]      col,
  input  logic [7:0]         nt,
  input  logic [3:0]         w,
  output logic               hit,
  output logic [TC_W-1:0]    tile,
  output logic [DW-1:0]      fdist
);

  logic [DW-1:0]   rel;
  logic [TC_W-1:0] tc;
  logic [DW-1:0]   dsum;
  logic            wrap;

  always_comb begin
    rel  = coord[DW-1:0];
    tc   = coord[DW +: TC_W];
    // relative + T - column, then modulo T (drop the carry bit)
    // (the carry out of the DW-bit sum is the modulo-T reduction)
    dsum  = rel + DW'(T << COORD_FRAC) - DW'({col, {COORD_FRAC{1'b0}}});
    fdist = dsum;
    wrap = rel[DW-1:COORD_FRAC] < col;
    hit  = 32'(fdist[DW-1:COORD_FRAC]) < 32'(w);
    if (!wrap)
      tile = tc;
    else if (tc == '0)
      tile = TC_W'(nt - 8'd1);
    else
      tile = tc - 1'b1;
  end

endmodule

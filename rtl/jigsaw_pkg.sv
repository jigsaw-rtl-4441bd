// jigsaw_pkg: types and constants shared by the JIGSAW gridding accelerator.
//
// JIGSAW grids a stream of non-uniform complex samples onto a uniform N x N
// grid using the Slice-and-Dice layout: the grid is cut into T x T virtual
// tiles that are stacked into "dice", and one pipeline owns one column of the
// dice (the same relative position in every tile). The numbers below are the
// configuration the accelerator is described with: T = 8 (64 pipelines), a
// grid of up to 1024 x 1024, 32-bit fixed-point datapath, 16-bit weights and
// a 256-entry weight table. The coordinate format (Q10.22, unsigned) and the
// value formats (Q1.15 weights, plain two's complement sample values) are this
// design's choice.
package jigsaw_pkg;

  // Virtual tile edge and largest grid edge.
  localparam int unsigned T_DEF      = 8;
  localparam int unsigned N_MAX_DEF  = 1024;
  // Coordinates: 32-bit unsigned fixed point, 10 integer and 22 fraction bits.
  localparam int unsigned COORD_W    = 32;
  localparam int unsigned COORD_FRAC = 22;
  // Datapath and weight widths.
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned WT_W       = 16;
  localparam int unsigned WT_FRAC    = 15;   // weights are Q1.15
  // Weight table: half of the symmetric kernel, W*L/2 entries at most.
  localparam int unsigned TAB_DEPTH_DEF = 256;
  localparam int unsigned TAB_AW     = 8;
  // Runtime limits: W in 1..8, L = 2**log2l with log2l in 0..6.
  localparam int unsigned W_MAX      = 8;
  localparam int unsigned LOG2L_MAX  = 6;
  // Input-to-accumulation latency in cycles (broadcast register included),
  // for the 2-D accelerator and for the 3D Slice variant.
  localparam int unsigned PIPE_DEPTH    = 12;
  localparam int unsigned PIPE_DEPTH_3D = 15;
  // Largest z extent of a 3-D grid handled slice by slice.
  localparam int unsigned NZ_MAX     = 1024;

  // One complex grid value / sample value (64 bits).
  typedef struct packed {
    logic signed [DATA_W-1:0] im;
    logic signed [DATA_W-1:0] re;
  } cplx_t;

  // One complex interpolation weight (32 bits).
  typedef struct packed {
    logic signed [WT_W-1:0] im;
    logic signed [WT_W-1:0] re;
  } wcplx_t;

  // One non-uniform sample as it arrives on the 128-bit input bus.
  typedef struct packed {
    cplx_t                val;
    logic [COORD_W-1:0]   y;
    logic [COORD_W-1:0]   x;
  } sample_t;

  // Runtime configuration.
  typedef struct packed {
    logic [7:0] nt;      // grid edge in tiles, N/T, 1..N_MAX/T
    logic [3:0] w;       // interpolation window width, 1..8
    logic [2:0] log2l;   // table oversampling factor L = 2**log2l, 0..6
  } cfg_t;

  // Slice selection of the 3D Slice variant: grid depth N_z and the slice
  // z0 that the current pass accumulates.
  typedef struct packed {
    logic [10:0] nz;     // 1..NZ_MAX
    logic [9:0]  z0;     // 0..nz-1
  } zcfg_t;

  // Table address of a forward distance d (Q.COORD_FRAC, below 8 when it
  // matters): round(d * L) folded about the window centre W*L/2, clamped to
  // the last table entry.
  function automatic logic [TAB_AW-1:0] tab_fold(input logic [31:0] d,
                                                 input logic [3:0]  w,
                                                 input logic [2:0]  log2l,
                                                 input int unsigned depth);
    logic [32:0] rounded;
    logic [10:0] idx;
    logic [10:0] centre;
    logic [10:0] fold;
    int unsigned sh;
    sh      = COORD_FRAC - 32'(log2l);
    rounded = {1'b0, d} + (33'd1 << (sh - 1));
    idx     = 11'(rounded >> sh);
    centre  = 11'(({7'd0, w} << log2l) >> 1);
    fold    = (idx >= centre) ? idx - centre : centre - idx;
    if (32'(fold) > depth - 1)
      fold = 11'(depth - 1);
    return fold[TAB_AW-1:0];
  endfunction

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_CLEAR   = 3'd1,
    ST_GRID    = 3'd2,
    ST_DRAIN   = 3'd3,
    ST_READOUT = 3'd4
  } state_t;

endpackage

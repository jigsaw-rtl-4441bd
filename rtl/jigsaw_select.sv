// jigsaw_select: select unit of one JIGSAW pipeline (2-D).
//
// For every broadcast sample it decides whether the sample touches the grid
// point this pipeline owns in some virtual tile, and if so which tile (the
// global tile address, the index into the pipeline's accumulation SRAM) and
// which two entries of the weight table (X and Y) give the kernel weight.
// Both dimensions run through jigsaw_select_dim; the hit is the AND of the two
// per-dimension tests. The global tile address is ty * (N/T) + tx, so a grid
// smaller than N_MAX packs into the low SRAM entries.
//
// Interface: in_valid/in_x/in_y carry the sample coordinates; col_x/col_y are
// the pipeline's fixed column; cfg holds N/T, W and log2(L).
// Timing: two register stages. Stage 1 forms distances, wrap-corrected tile
// coordinates and the hit; stage 2 forms the tile address (a small multiply)
// and the rounded, folded table addresses. out_* are valid two cycles after
// in_valid. The split into two stages is this design's choice.
// With DIM3 = 1 (3D Slice variant) jigsaw_select_z runs alongside: the hit
// also requires the sample to reach the current z slice, and out_tab_z gives
// the z table address. With DIM3 = 0, in_z and zcfg are not used and
// out_tab_z is tied to zero.
module jigsaw_select
  import jigsaw_pkg::*;
#(
  parameter int unsigned T         = T_DEF,
  parameter int unsigned N_MAX     = N_MAX_DEF,
  parameter int unsigned TAB_DEPTH = TAB_DEPTH_DEF,
  parameter bit          DIM3      = 1'b0,
  localparam int unsigned TB      = $clog2(T),
  localparam int unsigned TC_W    = $clog2(N_MAX / T),
  localparam int unsigned TILE_AW = 2 * TC_W,
  localparam int unsigned DW      = TB + COORD_FRAC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  logic [COORD_W-1:0] in_z,
  input  zcfg_t              zcfg,
  input  logic [TB-1:0]      col_x,
  input  logic [TB-1:0]      col_y,
  input  cfg_t               cfg,
  output logic               out_hit,
  output logic [TILE_AW-1:0] out_tile_addr,
  output logic [TAB_AW-1:0]  out_tab_x,
  output logic [TAB_AW-1:0]  out_tab_y,
  output logic [TAB_AW-1:0]  out_tab_z
);

  logic            hit_x, hit_y;
  logic [TC_W-1:0] tile_x, tile_y;
  logic [DW-1:0]   dist_x, dist_y;

  jigsaw_select_dim #(.T(T), .N_MAX(N_MAX)) u_dim_x (
    .coord(in_x), .col(col_x), .nt(cfg.nt), .w(cfg.w),
    .hit(hit_x), .tile(tile_x), .fdist(dist_x)
  );
  jigsaw_select_dim #(.T(T), .N_MAX(N_MAX)) u_dim_y (
    .coord(in_y), .col(col_y), .nt(cfg.nt), .w(cfg.w),
    .hit(hit_y), .tile(tile_y), .fdist(dist_y)
  );

  // z slice selection (3D Slice variant)
  logic hit_z2;
  if (DIM3) begin : g_z
    jigsaw_select_z #(.TAB_DEPTH(TAB_DEPTH)) u_sel_z (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_z(in_z), .zcfg(zcfg),
      .w(cfg.w), .log2l(cfg.log2l), .out_hit(hit_z2), .out_tab_z(out_tab_z)
    );
  end else begin : g_no_z
    assign hit_z2    = 1'b1;
    assign out_tab_z = '0;
  end

  logic hit_xy2;
  assign out_hit = hit_xy2 && hit_z2;

  // stage 1 registers
  logic            s1_hit;
  logic [TC_W-1:0] s1_tx, s1_ty;
  logic [DW-1:0]   s1_dx, s1_dy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_hit <= 1'b0;
      s1_tx  <= '0;
      s1_ty  <= '0;
      s1_dx  <= '0;
      s1_dy  <= '0;
    end else begin
      s1_hit <= in_valid && hit_x && hit_y;
      s1_tx  <= tile_x;
      s1_ty  <= tile_y;
      s1_dx  <= dist_x;
      s1_dy  <= dist_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_xy2       <= 1'b0;
      out_tile_addr <= '0;
      out_tab_x     <= '0;
      out_tab_y     <= '0;
    end else begin
      hit_xy2       <= s1_hit;
      out_tile_addr <= TILE_AW'(s1_ty * cfg.nt) + TILE_AW'(s1_tx);
      out_tab_x     <= tab_fold(32'(s1_dx), cfg.w, cfg.log2l, TAB_DEPTH);
      out_tab_y     <= tab_fold(32'(s1_dy), cfg.w, cfg.log2l, TAB_DEPTH);
    end
  end

endmodule

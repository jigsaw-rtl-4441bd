// jigsaw_pipeline: one JIGSAW gridding pipeline T(x,y).
//
// The pipeline owns column (col_x, col_y) of the dice: the grid point at that
// relative position in every virtual tile. Every broadcast sample passes
// through four stages: select (does the sample reach this column, in which
// tile, with which table entries), weight lookup (2-D kernel weight), and
// the multiply-accumulate pair interpolation (weight x sample value) and
// accumulation (add into the partial-sum SRAM entry of that tile). A sample
// that misses the column simply flows through as an invalid slot, so the
// pipeline accepts one sample every cycle and never stalls.
//
// Timing: with the input broadcast register in front, a sample on the input
// bus in cycle 0 is added into the SRAM at the end of cycle 11, i.e. 12
// clock edges later: select 2, weight lookup 4, interpolation 3,
// accumulation 2. The sample value and the tile address ride along in delay
// lines to meet the weight. How the 12 cycles are spread over the stages is
// this design's choice.
//
// DIM3 = 1 builds the pipeline of the 3D Slice variant: the select stage also
// checks the z slice (jigsaw_select_z) and the weight lookup multiplies in a
// z weight (jigsaw_weight_z), three more cycles, for a depth of 15. The
// grid held in the SRAM is then the z slice chosen by zcfg.z0. With DIM3 = 0,
// in_z and zcfg are not used and sel_tab_z is left unread. The assertion in jigsaw_accum uses
// rst_n in 'disable iff', which lint tools may flag as a mixed reset use.
module jigsaw_pipeline
  import jigsaw_pkg::*;
#(
  parameter int unsigned T         = T_DEF,
  parameter int unsigned N_MAX     = N_MAX_DEF,
  parameter int unsigned TAB_DEPTH = TAB_DEPTH_DEF,
  parameter bit          DIM3      = 1'b0,
  localparam int unsigned TB      = $clog2(T),
  localparam int unsigned TILE_AW = 2 * $clog2(N_MAX / T)
) (
  input  logic               clk,
  input  logic               rst_n,
  // broadcast sample (already registered by the top)
  input  logic               in_valid,
  input  sample_t            in_sample,
  input  logic [COORD_W-1:0] in_z,
  input  zcfg_t              zcfg,
  input  logic [TB-1:0]      col_x,
  input  logic [TB-1:0]      col_y,
  input  cfg_t               cfg,
  // weight table load (broadcast)
  input  logic               wt_we,
  input  logic [TAB_AW-1:0]  wt_addr,
  input  wcplx_t             wt_data,
  // SRAM maintenance and readout
  input  logic               clr_en,
  input  logic [TILE_AW-1:0] clr_addr,
  input  logic               rd_en,
  input  logic [TILE_AW-1:0] rd_addr,
  output cplx_t              rd_data,
  // an accumulation happens (for statistics)
  output logic               acc_fire
);

  localparam int unsigned ZDLY     = DIM3 ? 3 : 0;   // z weight multiply
  localparam int unsigned VAL_DLY  = 6 + ZDLY;      // select + weight lookup
  localparam int unsigned ADDR_DLY = 7 + ZDLY;      // weight lookup + interpolation

  logic               sel_hit;
  logic [TILE_AW-1:0] sel_tile;
  logic [TAB_AW-1:0]  sel_tab_x, sel_tab_y, sel_tab_z;
  logic               wxy_valid, wl_valid;
  wcplx_t             wxy, wl_w;
  logic               ip_valid;
  cplx_t              ip_val;

  cplx_t              val_dly  [VAL_DLY];
  logic [TILE_AW-1:0] addr_dly [ADDR_DLY];

  jigsaw_select #(.T(T), .N_MAX(N_MAX), .TAB_DEPTH(TAB_DEPTH), .DIM3(DIM3)) u_select (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_x         (in_sample.x),
    .in_y         (in_sample.y),
    .in_z         (in_z),
    .zcfg         (zcfg),
    .col_x        (col_x),
    .col_y        (col_y),
    .cfg          (cfg),
    .out_hit      (sel_hit),
    .out_tile_addr(sel_tile),
    .out_tab_x    (sel_tab_x),
    .out_tab_y    (sel_tab_y),
    .out_tab_z    (sel_tab_z)
  );

  jigsaw_weight_lookup #(.TAB_DEPTH(TAB_DEPTH)) u_weight (
    .clk      (clk),
    .rst_n    (rst_n),
    .wt_we    (wt_we),
    .wt_addr  (wt_addr),
    .wt_data  (wt_data),
    .in_valid (sel_hit),
    .in_tab_x (sel_tab_x),
    .in_tab_y (sel_tab_y),
    .out_valid(wxy_valid),
    .out_w    (wxy)
  );

  if (DIM3) begin : g_wz
    jigsaw_weight_z #(.TAB_DEPTH(TAB_DEPTH)) u_weight_z (
      .clk      (clk),
      .rst_n    (rst_n),
      .wt_we    (wt_we),
      .wt_addr  (wt_addr),
      .wt_data  (wt_data),
      .in_tab_z (sel_tab_z),
      .in_valid (wxy_valid),
      .in_wxy   (wxy),
      .out_valid(wl_valid),
      .out_w    (wl_w)
    );
  end else begin : g_no_wz
    assign wl_valid = wxy_valid;
    assign wl_w     = wxy;
  end

  // delay lines for the sample value and the tile address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < VAL_DLY; i++)  val_dly[i]  <= '0;
      for (int i = 0; i < ADDR_DLY; i++) addr_dly[i] <= '0;
    end else begin
      val_dly[0]  <= in_sample.val;
      for (int i = 1; i < VAL_DLY; i++)  val_dly[i]  <= val_dly[i-1];
      addr_dly[0] <= sel_tile;
      for (int i = 1; i < ADDR_DLY; i++) addr_dly[i] <= addr_dly[i-1];
    end
  end

  jigsaw_interp u_interp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (wl_valid),
    .in_w     (wl_w),
    .in_val   (val_dly[VAL_DLY-1]),
    .out_valid(ip_valid),
    .out_val  (ip_val)
  );

  jigsaw_accum #(.T(T), .N_MAX(N_MAX)) u_accum (
    .clk      (clk),
    .rst_n    (rst_n),
    .acc_valid(ip_valid),
    .acc_addr (addr_dly[ADDR_DLY-1]),
    .acc_val  (ip_val),
    .clr_en   (clr_en),
    .clr_addr (clr_addr),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (rd_data)
  );

  assign acc_fire = ip_valid;

endmodule

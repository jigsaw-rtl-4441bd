// jigsaw_top: JIGSAW 2-D non-uniform gridding accelerator.
//
// Gridding interpolates M non-uniform complex samples onto a uniform N x N
// grid: each sample adds a kernel-weighted copy of its value to the W x W grid
// points around it. JIGSAW does this in one pass with no pre-sorting: the
// grid is cut into T x T virtual tiles stacked into dice, and a T x T array of
// identical pipelines each owns one column of the dice (one relative
// position, in every tile). Every sample is broadcast to all pipelines; since
// W <= T a sample reaches at most one point per column, so the pipelines
// never interact and one sample is accepted per cycle regardless of where
// the samples fall.
//
// Interface:
//   cfg_in, cmd_*      grid size in tiles (N/T), window W, log2 of the table
//                      oversampling L; commands clear / start / readout.
//   wt_*               writes the 256-entry weight table (broadcast to all
//                      pipelines' copies), accepted while idle.
//   in_*               128-bit sample stream {value im, value re, y, x};
//                      in_ready is high during gridding, in_last ends the
//                      stream. Coordinates are unsigned Q10.22 in [0, N).
//   irq_grid           one-cycle pulse once every sample has been accumulated.
//   out_*              128-bit readout stream, two 64-bit grid points per
//                      cycle, tile by tile (see jigsaw_readout).
// A point is reached by a sample at coordinate c when 0 <= c - p < W (per
// dimension, modulo N) and its weight is the table entry at |round((c-p)*L) -
// W*L/2|: a host that wants a window centred on the sample adds W/2 to the
// coordinates.
//
// 3D Slice variant (DIM3 = 1): a 3-D grid of N x N x N_z points is gridded
// one z slice per pass. For each slice the host sets zcfg_in = {N_z, z0},
// streams all samples with their z coordinate on in_z (Q10.22), and reads the
// slice out; only samples whose window reaches slice z0 are accumulated, and
// the kernel weight includes a z factor. The pipeline is then 15 cycles
// deep. With DIM3 = 0 (the default, the 2-D accelerator) in_z and zcfg_in
// are not used.
//
// Timing: after reset the SRAMs are cleared ((N_MAX/T)^2 cycles); gridding
// of M samples takes M+12 cycles (M+15 per slice in the 3D Slice variant);
// readout takes N*N/2 cycles plus 2.
// The broadcast register, controller and readout ordering are this design's
// choices; pipeline organisation, widths and latency follow the description
// of the accelerator.
// rst_n reaches the assertions of the accumulators and controller through
// 'disable iff', which lint tools may flag as a mixed reset use.
module jigsaw_top
  import jigsaw_pkg::*;
#(
  parameter int unsigned T         = T_DEF,
  parameter int unsigned N_MAX     = N_MAX_DEF,
  parameter int unsigned TAB_DEPTH = TAB_DEPTH_DEF,
  parameter bit          DIM3      = 1'b0,
  localparam int unsigned P       = T * T,
  localparam int unsigned TB      = $clog2(T),
  localparam int unsigned TILE_AW = 2 * $clog2(N_MAX / T)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration and commands
  input  cfg_t              cfg_in,
  input  zcfg_t             zcfg_in,       // 3D Slice variant only
  input  logic              cmd_clear,
  input  logic              cmd_start,
  input  logic              cmd_readout,
  // weight table load
  input  logic              wt_we,
  input  logic [TAB_AW-1:0] wt_addr,
  input  wcplx_t            wt_data,
  // sample stream in
  input  logic              in_valid,
  input  logic              in_last,
  input  sample_t           in_data,
  input  logic [COORD_W-1:0] in_z,         // 3D Slice variant only
  output logic              in_ready,
  // gridded data out
  output logic              out_valid,
  output cplx_t [1:0]       out_data,
  output logic              out_last,
  // status
  output logic              irq_grid,
  output state_t            state,
  output logic [31:0]       sample_count,
  output logic [P-1:0]      acc_fire      // per pipeline: an accumulation this cycle
);

  cfg_t               cfg;
  zcfg_t              zcfg;
  logic               accept;
  logic               wt_we_g;
  logic               clr_en;
  logic [TILE_AW-1:0] clr_addr;
  logic               rdo_start, rdo_done;
  logic [P-1:0]       rd_en;
  logic [TILE_AW-1:0] rd_addr;
  cplx_t              rd_data [P];

  // broadcast register: one sample per cycle to every pipeline
  logic               bc_valid;
  sample_t            bc_sample;
  logic [COORD_W-1:0] bc_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_valid  <= 1'b0;
      bc_sample <= '0;
      bc_z      <= '0;
    end else begin
      bc_valid  <= accept;
      bc_sample <= in_data;
      bc_z      <= in_z;
    end
  end

  jigsaw_ctrl #(.T(T), .N_MAX(N_MAX), .LAT(DIM3 ? PIPE_DEPTH_3D : PIPE_DEPTH),
               .DIM3(DIM3)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .cmd_clear   (cmd_clear),
    .cmd_start   (cmd_start),
    .cmd_readout (cmd_readout),
    .cfg_in      (cfg_in),
    .zcfg_in     (zcfg_in),
    .in_valid    (in_valid),
    .in_last     (in_last),
    .rdo_done    (rdo_done),
    .wt_we_in    (wt_we),
    .state       (state),
    .cfg         (cfg),
    .zcfg        (zcfg),
    .in_ready    (in_ready),
    .accept      (accept),
    .wt_we       (wt_we_g),
    .clr_en      (clr_en),
    .clr_addr    (clr_addr),
    .rdo_start   (rdo_start),
    .irq_grid    (irq_grid),
    .sample_count(sample_count)
  );

  for (genvar p = 0; p < P; p++) begin : g_pipe
    jigsaw_pipeline #(.T(T), .N_MAX(N_MAX), .TAB_DEPTH(TAB_DEPTH), .DIM3(DIM3)) u_pipe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (bc_valid),
      .in_sample(bc_sample),
      .in_z     (bc_z),
      .zcfg     (zcfg),
      .col_x    (TB'(p % T)),
      .col_y    (TB'(p / T)),
      .cfg      (cfg),
      .wt_we    (wt_we_g),
      .wt_addr  (wt_addr),
      .wt_data  (wt_data),
      .clr_en   (clr_en),
      .clr_addr (clr_addr),
      .rd_en    (rd_en[p]),
      .rd_addr  (rd_addr),
      .rd_data  (rd_data[p]),
      .acc_fire (acc_fire[p])
    );
  end

  jigsaw_readout #(.T(T), .N_MAX(N_MAX)) u_readout (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (rdo_start),
    .nt       (cfg.nt),
    .rd_data  (rd_data),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .out_valid(out_valid),
    .out_data (out_data),
    .out_last (out_last),
    .done     (rdo_done)
  );

endmodule

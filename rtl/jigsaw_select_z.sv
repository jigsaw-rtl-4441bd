// jigsaw_select_z: z-dimension select of the 3D Slice variant.
//
// The 3D Slice variant grids a 3-D volume one z slice at a time: every pass
// streams all samples and accumulates only into slice z0, so the x-y
// machinery of the 2-D accelerator is reused unchanged. This unit decides
// whether a sample reaches slice z0, with the same window convention as in x
// and y: the forward distance dz = (z - z0) mod N_z must be below W. It also
// forms the z table address from dz (rounded, folded about the window centre,
// see jigsaw_pkg::tab_fold). The z extent is not tiled: the slice itself
// plays the role of the tile.
//
// Interface: in_z is Q10.22 in [0, N_z); zcfg gives N_z and z0; w and log2l
// are the window width and table oversampling of the x-y configuration (the
// same window width is used in z, a choice of this design).
// Timing: two register stages, in step with jigsaw_select.
module jigsaw_select_z
  import jigsaw_pkg::*;
#(
  parameter int unsigned TAB_DEPTH = TAB_DEPTH_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] in_z,
  input  zcfg_t              zcfg,
  input  logic [3:0]         w,
  input  logic [2:0]         log2l,
  output logic               out_hit,
  output logic [TAB_AW-1:0]  out_tab_z
);

  logic [32:0] diff, span, dz;
  logic        s1_hit;
  logic [31:0] s1_dz;

  always_comb begin
    span = {zcfg.nz, {COORD_FRAC{1'b0}}};
    diff = {1'b0, in_z} - {1'b0, zcfg.z0, {COORD_FRAC{1'b0}}};
    // z and z0 both lie in [0, N_z): one correction makes the difference
    // non-negative
    dz   = diff[32] ? diff + span : diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_hit    <= 1'b0;
      s1_dz     <= '0;
      out_hit   <= 1'b0;
      out_tab_z <= '0;
    end else begin
      s1_hit    <= in_valid && (dz < 33'({w, {COORD_FRAC{1'b0}}}));
      s1_dz     <= dz[31:0];
      out_hit   <= s1_hit;
      out_tab_z <= tab_fold(s1_dz, w, log2l, TAB_DEPTH);
    end
  end

endmodule

// jigsaw_weight_z: z weight of the 3D Slice variant.
//
// Extends the weight lookup to three dimensions: the 2-D weight wx*wy from
// jigsaw_weight_lookup is multiplied by the z weight wz, read from this
// unit's own copy of the 256-entry interpolation table with the z address
// from the select stage. The table copy is written by the same broadcast
// table writes as the x-y table; giving z its own copy (instead of a third
// port on the x-y table) is this design's choice.
//
// Timing: in_tab_z arrives together with the x-y table addresses (cycle 0);
// the z entry is read in cycle 0 and held for three cycles so it meets the
// 2-D weight, which arrives in cycle 4 on in_valid/in_wxy. The complex
// product (jigsaw_cmul, rescaled to Q1.15 and saturated) takes three more
// cycles: out_* appear three cycles after in_valid. With it the pipeline is
// 15 cycles deep instead of 12.
module jigsaw_weight_z
  import jigsaw_pkg::*;
#(
  parameter int unsigned TAB_DEPTH = TAB_DEPTH_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load
  input  logic              wt_we,
  input  logic [TAB_AW-1:0] wt_addr,
  input  wcplx_t            wt_data,
  // z address, with the x-y lookup
  input  logic [TAB_AW-1:0] in_tab_z,
  // 2-D weight, four cycles later
  input  logic              in_valid,
  input  wcplx_t            in_wxy,
  output logic              out_valid,
  output wcplx_t            out_w
);

  wcplx_t table_mem [TAB_DEPTH];
  wcplx_t wz_dly [4];

  always_ff @(posedge clk) begin
    if (wt_we)
      table_mem[wt_addr] <= wt_data;
    wz_dly[0] <= table_mem[in_tab_z];
    for (int i = 1; i < 4; i++) wz_dly[i] <= wz_dly[i-1];
  end

  jigsaw_cmul #(.AW(WT_W), .BW(WT_W), .SHIFT(WT_FRAC), .OW(WT_W)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a_re     (in_wxy.re),
    .a_im     (in_wxy.im),
    .b_re     (wz_dly[3].re),
    .b_im     (wz_dly[3].im),
    .out_valid(out_valid),
    .out_re   (out_w.re),
    .out_im   (out_w.im)
  );

endmodule

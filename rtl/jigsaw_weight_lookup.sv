// jigsaw_weight_lookup: interpolation weight lookup unit of one pipeline.
//
// Holds the pipeline's copy of the oversampled interpolation table: up to
// 256 complex weights of 16+16 bits (Q1.15), the half of the symmetric
// kernel from the window centre outwards. The table is dual-ported so the X
// and Y weights are read in the same cycle; port A also takes table writes
// (wt_we) from the host while the accelerator is idle. The two 1-D weights are
// multiplied with the 3-multiplier complex product (jigsaw_cmul) to give the
// 2-D weight, rescaled back to Q1.15 and saturated.
//
// Timing: one cycle of synchronous table read, then three cycles in the
// complex multiplier: out_* follow in_* by four cycles. Writing and reading
// the same entry in one cycle returns the old entry.
module jigsaw_weight_lookup
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
  // lookup
  input  logic              in_valid,
  input  logic [TAB_AW-1:0] in_tab_x,
  input  logic [TAB_AW-1:0] in_tab_y,
  output logic              out_valid,
  output wcplx_t            out_w
);

  wcplx_t table_mem [TAB_DEPTH];
  wcplx_t rd_x, rd_y;
  logic   rd_v;

  // port A: write or X read; port B: Y read
  always_ff @(posedge clk) begin
    if (wt_we)
      table_mem[wt_addr] <= wt_data;
    rd_x <= table_mem[in_tab_x];
    rd_y <= table_mem[in_tab_y];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_v <= 1'b0;
    else        rd_v <= in_valid;
  end

  jigsaw_cmul #(.AW(WT_W), .BW(WT_W), .SHIFT(WT_FRAC), .OW(WT_W)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_v),
    .a_re     (rd_x.re),
    .a_im     (rd_x.im),
    .b_re     (rd_y.re),
    .b_im     (rd_y.im),
    .out_valid(out_valid),
    .out_re   (out_w.re),
    .out_im   (out_w.im)
  );

endmodule

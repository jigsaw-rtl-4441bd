// jigsaw_interp: interpolation unit (the multiply half of a pipeline's MAC).
//
// Multiplies the complex 2-D kernel weight (Q1.15) by the complex sample
// value (32+32 bits, two's complement) with the 3-multiplier complex product,
// shifts the result right by 15 to drop the weight's fraction bits and
// saturates it to 32 bits. The result is the sample's contribution to one
// grid point and goes to the accumulation unit.
//
// Timing: three register stages, one product per cycle.
module jigsaw_interp
  import jigsaw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  wcplx_t in_w,
  input  cplx_t  in_val,
  output logic   out_valid,
  output cplx_t  out_val
);

  jigsaw_cmul #(.AW(DATA_W), .BW(WT_W), .SHIFT(WT_FRAC), .OW(DATA_W)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a_re     (in_val.re),
    .a_im     (in_val.im),
    .b_re     (in_w.re),
    .b_im     (in_w.im),
    .out_valid(out_valid),
    .out_re   (out_val.re),
    .out_im   (out_val.im)
  );

endmodule

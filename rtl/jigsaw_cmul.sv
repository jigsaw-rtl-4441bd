// jigsaw_cmul: pipelined complex multiplier using three real multiplies.
//
// (a_re + j a_im)(b_re + j b_im) is formed with Knuth's method:
//   k1 = b_re (a_re + a_im),  k2 = a_re (b_im - b_re),  k3 = a_im (b_re + b_im)
//   re = k1 - k3,             im = k1 + k2
// which takes three multiplications and five additions/subtractions. The
// exact product is then shifted right by SHIFT (arithmetic, truncating) to
// return to the output's fixed-point scale and saturated to OW bits.
// The weight lookup unit and the interpolation unit both use it.
//
// Timing: three register stages (pre-add, multiply, post-add with rescale);
// out_* follow in_* by three cycles, one operation per cycle. The rescale by
// truncation and the saturation are this design's choices.
module jigsaw_cmul #(
  parameter int unsigned AW    = 16,
  parameter int unsigned BW    = 16,
  parameter int unsigned SHIFT = 15,
  parameter int unsigned OW    = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);

  localparam int unsigned PW = AW + BW + 2;   // product width after pre-add
  localparam int unsigned SW = PW + 1;        // post-add width

  // stage 1: pre-additions
  logic                 s1_v;
  logic signed [AW:0]   s1_asum;
  logic signed [BW:0]   s1_bdif, s1_bsum;
  logic signed [AW-1:0] s1_are, s1_aim;
  logic signed [BW-1:0] s1_bre;

  // stage 2: three multiplications
  logic                 s2_v;
  logic signed [PW-1:0] s2_k1, s2_k2, s2_k3;

  function automatic logic signed [OW-1:0] sat(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] hi, lo;
    hi = SW'((64'sd1 <<< (OW - 1)) - 64'sd1);
    lo = -(SW'(64'sd1 <<< (OW - 1)));
    if (v > hi)      return hi[OW-1:0];
    else if (v < lo) return lo[OW-1:0];
    else             return v[OW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s1_asum   <= '0;
      s1_bdif   <= '0;
      s1_bsum   <= '0;
      s1_are    <= '0;
      s1_aim    <= '0;
      s1_bre    <= '0;
      s2_v      <= 1'b0;
      s2_k1     <= '0;
      s2_k2     <= '0;
      s2_k3     <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      s1_v      <= in_valid;
      s1_asum   <= (AW+1)'(a_re) + (AW+1)'(a_im);
      s1_bdif   <= (BW+1)'(b_im) - (BW+1)'(b_re);
      s1_bsum   <= (BW+1)'(b_re) + (BW+1)'(b_im);
      s1_are    <= a_re;
      s1_aim    <= a_im;
      s1_bre    <= b_re;

      s2_v      <= s1_v;
      s2_k1     <= PW'(s1_bre) * PW'(s1_asum);
      s2_k2     <= PW'(s1_are) * PW'(s1_bdif);
      s2_k3     <= PW'(s1_aim) * PW'(s1_bsum);

      out_valid <= s2_v;
      out_re    <= sat((SW'(s2_k1) - SW'(s2_k3)) >>> SHIFT);
      out_im    <= sat((SW'(s2_k1) + SW'(s2_k2)) >>> SHIFT);
    end
  end

endmodule

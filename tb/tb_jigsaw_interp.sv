// tb_jigsaw_interp: self-checking test of the interpolation unit.
//
// Multiplies random complex sample values (including full-scale values that
// drive the result into saturation) by random Q1.15 complex weights and
// checks each result three cycles later against a direct 64-bit complex
// product, shifted by 15 and saturated to 32 bits. Counts saturations.
module tb_jigsaw_interp;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  wcplx_t in_w;
  cplx_t in_val;
  logic out_valid;
  cplx_t out_val;

  int checks = 0, failures = 0, saturations = 0;

  jigsaw_interp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; cplx_t r; } exp_t;
  exp_t pend [3];

  initial begin
    in_valid = 0; in_w = '0; in_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) pend[k].v = 0;
    for (int i = 0; i < 10003; i++) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid !== pend[2].v || (pend[2].v && out_val !== pend[2].r)) begin
        failures++;
        if (failures < 10)
          $display("mismatch: got %0d,%0d exp %0d,%0d", out_val.re, out_val.im, pend[2].r.re, pend[2].r.im);
      end
      for (int k = 2; k > 0; k--) pend[k] = pend[k-1];
      pend[0].v = 0;
      in_valid = 0;
      if (i < 10000 && (i % 5) != 2) begin
        longint pr, pi;
        in_valid = 1;
        in_w.re = 16'($urandom); in_w.im = 16'($urandom);
        if (i % 3 == 0) begin
          in_val.re = $urandom; in_val.im = $urandom;          // full scale
        end else begin
          in_val.re = 32'($signed(20'($urandom))); in_val.im = 32'($signed(20'($urandom)));
        end
        ref_cmul(longint'(in_val.re), longint'(in_val.im), longint'(in_w.re), longint'(in_w.im),
                 15, 32, pr, pi);
        if (pr != ((longint'(in_val.re) * in_w.re - longint'(in_val.im) * in_w.im) >>> 15) ||
            pi != ((longint'(in_val.re) * in_w.im + longint'(in_val.im) * in_w.re) >>> 15))
          saturations++;
        pend[0] = '{v: 1, r: ref_contrib(in_val, in_w)};
      end
    end
    $display("saturated results: %0d", saturations);
    checks++;
    if (saturations == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

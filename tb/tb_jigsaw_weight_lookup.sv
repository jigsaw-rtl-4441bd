// tb_jigsaw_weight_lookup: self-checking test of the weight lookup unit.
//
// Loads the 256-entry table, then issues one random (X, Y) address pair per
// cycle, with idle gaps, and checks the 2-D weight four cycles later against
// a direct complex product of the two table entries. Corner pairs (entry 0
// with itself, the last entry) are included, and the latency is checked by
// requiring out_valid exactly four cycles after each request.
module tb_jigsaw_weight_lookup;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wt_we;
  logic [7:0] wt_addr;
  wcplx_t wt_data;
  logic in_valid;
  logic [7:0] in_tab_x, in_tab_y;
  logic out_valid;
  wcplx_t out_w;

  int checks = 0, failures = 0;

  jigsaw_weight_lookup #(.TAB_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; wcplx_t w; } exp_t;
  exp_t pend [4];

  initial begin
    wt_we = 0; wt_addr = 0; wt_data = '0; in_valid = 0; in_tab_x = 0; in_tab_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(posedge clk); #1;
      wt_we = 1; wt_addr = 8'(a); wt_data = tab_entry(a);
    end
    @(posedge clk); #1;
    wt_we = 0;
    for (int k = 0; k < 4; k++) pend[k].v = 0;
    for (int i = 0; i < 5004; i++) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid !== pend[3].v) begin
        failures++;
        $display("valid timing wrong at %0d", i);
      end else if (pend[3].v && out_w !== pend[3].w) begin
        failures++;
        if (failures < 10)
          $display("weight mismatch %h/%h got %h", out_w.re, out_w.im, pend[3].w);
      end
      for (int k = 3; k > 0; k--) pend[k] = pend[k-1];
      pend[0].v = 0;
      in_valid = 0;
      if (i < 5000 && (i % 7) != 3) begin
        int x, y;
        if (i < 4)      begin x = (i & 1) * 255; y = (i >> 1) * 255; end
        else            begin x = $urandom_range(0, 255); y = $urandom_range(0, 255); end
        in_valid = 1; in_tab_x = 8'(x); in_tab_y = 8'(y);
        pend[0] = '{v: 1, w: ref_weight(x, y)};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

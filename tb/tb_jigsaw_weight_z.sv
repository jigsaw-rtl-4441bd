// tb_jigsaw_weight_z: self-checking test of the z weight unit.
//
// Loads the table, then every cycle presents a z table address and, four
// cycles later as the pipeline does, a random 2-D weight; checks the 3-D
// weight three cycles after that against a direct complex product of the
// 2-D weight and the table entry, rescaled and saturated to Q1.15.
module tb_jigsaw_weight_z;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wt_we;
  logic [7:0] wt_addr;
  wcplx_t wt_data;
  logic [7:0] in_tab_z;
  logic in_valid;
  wcplx_t in_wxy;
  logic out_valid;
  wcplx_t out_w;

  int checks = 0, failures = 0;

  jigsaw_weight_z #(.TAB_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; int tab; wcplx_t w; } req_t;
  req_t hist [8];   // hist[k]: request made k cycles ago

  initial begin
    wt_we = 0; wt_addr = 0; wt_data = '0; in_tab_z = 0; in_valid = 0; in_wxy = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(posedge clk); #1;
      wt_we = 1; wt_addr = 8'(a); wt_data = tab_entry(a);
    end
    @(posedge clk); #1;
    wt_we = 0;
    for (int k = 0; k < 8; k++) hist[k].v = 0;
    for (int i = 0; i < 5010; i++) begin
      @(posedge clk); #1;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      // output for the request made 7 cycles ago
      checks++;
      if (out_valid !== hist[7].v) begin
        failures++;
        $display("valid timing wrong at %0d", i);
      end else if (hist[7].v) begin
        automatic wcplx_t t = tab_entry(hist[7].tab);
        wcplx_t e;
        longint pr, pi;
        ref_cmul(longint'(hist[7].w.re), longint'(hist[7].w.im), longint'(t.re), longint'(t.im), 15, 16, pr, pi);
        e.re = 16'(pr); e.im = 16'(pi);
        if (out_w !== e) begin
          failures++;
          if (failures < 10) $display("weight mismatch at %0d", i);
        end
      end
      // new request: address now, 2-D weight four cycles later
      hist[0].v = (i < 5000) && ($urandom_range(0, 5) != 0);
      hist[0].tab = $urandom_range(0, 255);
      hist[0].w.re = 16'($urandom);
      hist[0].w.im = 16'($urandom);
      in_tab_z = 8'(hist[0].tab);
      in_valid = hist[4].v;
      in_wxy = hist[4].w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jigsaw_select_z: self-checking test of the z slice select.
//
// Random z coordinates, slice indices, depths N_z, window widths and table
// oversampling factors; checks the hit and the z table address two cycles
// later against the window definition 0 <= (z - z0) mod N_z < W, and counts
// hits, misses and hits that wrap around the end of the volume.
module tb_jigsaw_select_z;
  import jigsaw_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [31:0] in_z;
  zcfg_t zcfg;
  logic [3:0] w;
  logic [2:0] log2l;
  logic out_hit;
  logic [7:0] out_tab_z;

  int checks = 0, failures = 0, hits = 0, misses = 0, wraps = 0;

  jigsaw_select_z #(.TAB_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; bit hit; int tab; } exp_t;
  exp_t pend [2];

  initial begin
    in_valid = 0; in_z = 0; zcfg = '{nz: 11'd1, z0: 10'd0}; w = 4'd1; log2l = 3'd0;
    pend[0].v = 0; pend[1].v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20002; i++) begin
      @(posedge clk); #1;
      if (pend[1].v) begin
        checks++;
        if (out_hit !== pend[1].hit || (pend[1].hit && int'(out_tab_z) != pend[1].tab)) begin
          failures++;
          if (failures < 10) $display("mismatch: hit %0b/%0b tab %0d/%0d", out_hit, pend[1].hit, out_tab_z, pend[1].tab);
        end
      end
      pend[1] = pend[0];
      pend[0].v = 0;
      in_valid = 0;
      // the configuration changes every 200 cycles, between idle cycles
      if (i % 200 == 0) begin
        automatic int nz = (i % 400 == 0) ? $urandom_range(1, 20) : $urandom_range(1, 1024);
        zcfg.nz = 11'(nz);
        zcfg.z0 = 10'($urandom_range(0, nz - 1));
        w = 4'($urandom_range(1, 8));
        log2l = 3'($urandom_range(0, 6));
      end else if (i % 200 > 2 && i % 200 < 197 && i < 20000) begin
        automatic longint one = longint'(1) << COORD_FRAC;
        automatic longint z = (i % 3 == 0) ? (longint'($urandom) % (longint'(zcfg.nz) * one))
                                 : ((longint'(zcfg.z0) + longint'($urandom_range(0, 9)) - 4) * one
                                    + longint'($urandom_range(0, 1 << 22)));
        automatic longint n = longint'(zcfg.nz) * one;
        longint d, idx, ctr, f;
        z = ((z % n) + n) % n;
        d = ((z - longint'(zcfg.z0) * one) % n + n) % n;
        idx = (d * (longint'(1) << log2l) + one / 2) / one;
        ctr = (longint'(w) * (longint'(1) << log2l)) / 2;
        f = idx > ctr ? idx - ctr : ctr - idx;
        if (f > 255) f = 255;
        in_valid = 1;
        in_z = 32'(z);
        pend[0] = '{v: 1, hit: d < longint'(w) * one, tab: int'(f)};
        if (d < longint'(w) * one) begin
          hits++;
          if (z < longint'(zcfg.z0) * one) wraps++;
        end else misses++;
      end
    end
    $display("hits=%0d misses=%0d wraps=%0d", hits, misses, wraps);
    checks++;
    if (hits == 0 || misses == 0 || wraps == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jigsaw_select: self-checking test of the select unit.
//
// Drives random and corner-case coordinates (tile edges, grid origin for the
// torus wrap, exact integers) through the unit under several runtime
// configurations, with the pipeline column changing every cycle, and checks
// the hit, the global tile address and both table addresses two cycles later
// against the reference model, which finds the reached point by searching
// every tile of the column. Counts how often the X, Y and torus wraps occur.
module tb_jigsaw_select;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  localparam int T = 8, N_MAX = 1024, TAB_DEPTH = 256;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [31:0] in_x, in_y, in_z;
  zcfg_t zcfg;
  logic [2:0] col_x, col_y;
  cfg_t cfg;
  logic out_hit;
  logic [13:0] out_tile_addr;
  logic [7:0] out_tab_x, out_tab_y, out_tab_z;

  int checks = 0, failures = 0, hits = 0, wraps_x = 0, wraps_y = 0, torus = 0;

  jigsaw_select #(.T(T), .N_MAX(N_MAX), .TAB_DEPTH(TAB_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; bit hit; int addr; int tx; int ty; } exp_t;
  exp_t pend [2];

  task automatic run_batch(int nt, int w, int log2l, int n);
    longint span = longint'(nt) * T << COORD_FRAC;
    cfg = '{nt: 8'(nt), w: 4'(w), log2l: 3'(log2l)};
    pend[0].v = 0; pend[1].v = 0;
    for (int i = 0; i < n + 2; i++) begin
      @(posedge clk); #1;
      // check the sample driven two cycles ago
      if (pend[1].v) begin
        checks++;
        if (out_hit !== pend[1].hit ||
            (pend[1].hit && (int'(out_tile_addr) != pend[1].addr ||
                             int'(out_tab_x) != pend[1].tx || int'(out_tab_y) != pend[1].ty))) begin
          failures++;
          if (failures < 10)
            $display("mismatch nt=%0d w=%0d l=%0d: hit %0b/%0b addr %0d/%0d tx %0d/%0d ty %0d/%0d",
                     nt, w, log2l, out_hit, pend[1].hit, out_tile_addr, pend[1].addr,
                     out_tab_x, pend[1].tx, out_tab_y, pend[1].ty);
        end
      end
      pend[1] = pend[0];
      pend[0].v = 0;
      in_valid = 0;
      if (i < n) begin
        longint cx, cy;
        bit hx, hy;
        int kx, ky, ax, ay;
        case (i % 4)
          0: begin cx = longint'($urandom) % span; cy = longint'($urandom) % span; end
          1: begin cx = longint'($urandom_range(0, 3)) << (COORD_FRAC - 2);  // near the origin
                   cy = span - 1 - (longint'($urandom_range(0, 3)) << COORD_FRAC); end
          2: begin cx = longint'($urandom_range(0, nt * T - 1)) << COORD_FRAC; // exact integers
                   cy = longint'($urandom) % span; end
          default: begin cx = longint'($urandom) % span;
                   cy = (longint'($urandom_range(0, nt * T - 1)) << COORD_FRAC) + 1; end
        endcase
        in_valid = 1;
        in_x = 32'(cx);
        in_y = 32'(cy);
        col_x = 3'($urandom_range(0, T - 1));
        col_y = 3'($urandom_range(0, T - 1));
        ref_dim(cx, int'(col_x), nt, T, w, log2l, TAB_DEPTH, hx, kx, ax);
        ref_dim(cy, int'(col_y), nt, T, w, log2l, TAB_DEPTH, hy, ky, ay);
        pend[0] = '{v: 1, hit: hx && hy, addr: ky * nt + kx, tx: ax, ty: ay};
        if (hx && hy) begin
          int tcx = int'(cx >> (COORD_FRAC + 3)), tcy = int'(cy >> (COORD_FRAC + 3));
          hits++;
          if (kx != tcx) wraps_x++;
          if (ky != tcy) wraps_y++;
          if ((kx != tcx && tcx == 0) || (ky != tcy && tcy == 0)) torus++;
        end
      end
    end
  endtask

  initial begin
    in_valid = 0; in_x = 0; in_y = 0; in_z = 0; zcfg = '{nz: 11'd1, z0: 10'd0}; col_x = 0; col_y = 0;
    cfg = '{nt: 8'd128, w: 4'd6, log2l: 3'd5};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_batch(128, 6, 5, 4000);
    run_batch(5, 8, 6, 4000);
    run_batch(1, 1, 0, 1000);
    run_batch(16, 3, 2, 4000);
    run_batch(2, 8, 0, 2000);
    run_batch(7, 5, 3, 4000);
    $display("hits=%0d x-wraps=%0d y-wraps=%0d torus-wraps=%0d", hits, wraps_x, wraps_y, torus);
    checks++;
    if (hits == 0 || wraps_x == 0 || wraps_y == 0 || torus == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

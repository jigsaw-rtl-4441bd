// tb_jigsaw_pipeline: self-checking test of one gridding pipeline.
//
// Loads the weight table, clears the SRAM, then streams one sample per cycle
// (with a few idle cycles). Half of the samples are clustered next to the
// pipeline's column so that the same SRAM entry is updated in consecutive
// cycles; the rest are spread over the grid, wrapping across tile edges and
// the grid origin. For every sample the reference model decides whether it
// reaches the column and adds its fixed-point contribution to a reference
// column. The test checks that an accumulation strobe appears exactly 9
// cycles after each reaching sample enters (11 after it is on the bus of the
// top, the last stage writing one cycle later: 12 in all), and finally reads
// the column back and compares every entry. Two configurations are run.
module tb_jigsaw_pipeline;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  localparam int T = 8, N_MAX = 64, TILES = 64, LAT = 9;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  sample_t in_sample;
  logic [31:0] in_z = '0;
  zcfg_t zcfg = '{nz: 11'd1, z0: 10'd0};
  logic [2:0] col_x, col_y;
  cfg_t cfg;
  logic wt_we;
  logic [7:0] wt_addr;
  wcplx_t wt_data;
  logic clr_en;
  logic [5:0] clr_addr;
  logic rd_en;
  logic [5:0] rd_addr;
  cplx_t rd_data;
  logic acc_fire;

  int checks = 0, failures = 0, hits = 0, consecutive = 0;
  cplx_t ref_col [TILES];
  bit    fire_exp [$];

  jigsaw_pipeline #(.T(T), .N_MAX(N_MAX), .TAB_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // timing of the accumulation strobe
  always @(posedge clk) if (rst_n) begin
    bit e;
    e = fire_exp.size() > LAT ? fire_exp[LAT] : 1'b0;
    if (fire_exp.size() > LAT || acc_fire) begin
      checks++;
      if (acc_fire !== e) begin
        failures++;
        if (failures < 10) $display("%t strobe %0b expected %0b", $time, acc_fire, e);
      end
    end
  end

  task automatic run(int cx_col, int cy_col, int nt, int w, int log2l, int n);
    int last_tile = -1;
    longint span = longint'(nt) * T << COORD_FRAC;
    col_x = 3'(cx_col); col_y = 3'(cy_col);
    cfg = '{nt: 8'(nt), w: 4'(w), log2l: 3'(log2l)};
    // clear
    for (int a = 0; a <= TILES; a++) begin
      @(posedge clk); #1;
      clr_en = (a < TILES); clr_addr = 6'(a);
    end
    clr_en = 0;
    foreach (ref_col[i]) ref_col[i] = '0;
    fire_exp.delete();
    for (int i = 0; i < n + LAT + 4; i++) begin
      bit hit = 0;
      @(posedge clk); #1;
      in_valid = 0;
      if (i < n && (i % 11) != 5) begin
        longint x, y;
        bit hx, hy;
        int kx, ky, ax, ay;
        if (i % 2 == 0) begin
          // cluster just after the column in tile 1 (or 0)
          x = (longint'((nt > 1 ? T : 0) + cx_col) << COORD_FRAC) + longint'($urandom_range(0, 1 << 20));
          y = (longint'(cy_col) << COORD_FRAC) + longint'($urandom_range(0, 1 << 21));
        end else begin
          x = longint'($urandom) % span;
          y = longint'($urandom) % span;
        end
        in_valid = 1;
        in_sample.x = 32'(x);
        in_sample.y = 32'(y);
        in_sample.val.re = 32'($signed(24'($urandom)));
        in_sample.val.im = 32'($signed(24'($urandom)));
        ref_dim(x, cx_col, nt, T, w, log2l, 256, hx, kx, ax);
        ref_dim(y, cy_col, nt, T, w, log2l, 256, hy, ky, ay);
        if (hx && hy) begin
          int tile = ky * nt + kx;
          hit = 1;
          hits++;
          if (tile == last_tile) consecutive++;
          ref_col[tile] = cadd(ref_col[tile], ref_contrib(in_sample.val, ref_weight(ax, ay)));
          last_tile = tile;
        end else last_tile = -1;
      end else last_tile = -1;
      fire_exp.push_front(hit);
      if (fire_exp.size() > LAT + 1) void'(fire_exp.pop_back());
    end
    // read the column back
    for (int a = 0; a <= nt * nt; a++) begin
      @(posedge clk); #1;
      if (a > 0) begin
        checks++;
        if (rd_data !== ref_col[a-1]) begin
          failures++;
          if (failures < 10)
            $display("tile %0d: got %0d,%0d exp %0d,%0d", a - 1, rd_data.re, rd_data.im,
                     ref_col[a-1].re, ref_col[a-1].im);
        end
      end
      rd_en = (a < nt * nt); rd_addr = 6'(a);
    end
    rd_en = 0;
  endtask

  initial begin
    in_valid = 0; in_sample = '0; col_x = 0; col_y = 0;
    cfg = '{nt: 8'd8, w: 4'd6, log2l: 3'd5};
    wt_we = 0; wt_addr = 0; wt_data = '0; clr_en = 0; clr_addr = 0; rd_en = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(posedge clk); #1;
      wt_we = 1; wt_addr = 8'(a); wt_data = tab_entry(a);
    end
    @(posedge clk); #1;
    wt_we = 0;
    run(5, 2, 8, 6, 5, 3000);
    run(0, 7, 3, 8, 6, 3000);
    $display("hits=%0d consecutive same-tile hits=%0d", hits, consecutive);
    checks++;
    if (hits == 0 || consecutive == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jigsaw_full: end-to-end test of the JIGSAW accelerator at its full default size (T = 8, N = 1024).
//
// Waits for the clear sweep after reset, loads the weight table, then runs
// two complete operations: configure, stream M samples (one per cycle in the
// first operation, with idle gaps in the others), wait for the completion
// interrupt, and read the whole grid out. Every grid point read out is
// compared with a reference grid built by the reference model, which for
// every sample and every pipeline column finds the reached grid point by
// searching all tiles. Later operations start without a clear command, so
// they rely on the readout having cleared the SRAMs.
// Checked timing: the interrupt comes 12 cycles after the last sample
// (M+12 cycles for an unbroken stream) and the readout gives N*N/2 beats.
// Counted mechanisms (each must occur): samples that reach a column, X and Y
// tile wraps, torus wraps across the grid origin, the same grid point updated
// by consecutive samples (accumulator forwarding), table addresses on both
// sides of the window centre, and operations started from a read-out grid.
module tb_jigsaw_full;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  localparam int T = 8, N_MAX = 1024, P = T * T, NT_MAX = N_MAX / T;
  localparam int TILES = NT_MAX * NT_MAX;

  logic clk = 0, rst_n = 0;
  cfg_t cfg_in;
  zcfg_t zcfg_in = '{nz: 11'd1, z0: 10'd0};
  logic [31:0] in_z = '0;
  logic cmd_clear, cmd_start, cmd_readout;
  logic wt_we;
  logic [7:0] wt_addr;
  wcplx_t wt_data;
  logic in_valid, in_last;
  sample_t in_data;
  logic in_ready;
  logic out_valid;
  cplx_t [1:0] out_data;
  logic out_last;
  logic irq_grid;
  state_t state;
  logic [31:0] sample_count;
  logic [P-1:0] acc_fire;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_hits = 0, n_wrap_x = 0, n_wrap_y = 0, n_torus = 0, n_fwd = 0;
  int n_below = 0, n_above = 0, n_reuse = 0, n_fires = 0;

  cplx_t ref_grid [N_MAX * N_MAX];
  int    prev_tile [P];

  jigsaw_top dut (
    .clk, .rst_n, .cfg_in, .zcfg_in, .cmd_clear, .cmd_start, .cmd_readout, .wt_we, .wt_addr, .wt_data,
    .in_valid, .in_last, .in_data, .in_z, .in_ready, .out_valid, .out_data, .out_last,
    .irq_grid, .state, .sample_count, .acc_fire
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) n_fires <= n_fires + $countones(acc_fire);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // add one sample to the reference grid
  task automatic ref_sample(sample_t s, int nt, int w, int log2l);
    longint x = longint'(s.x), y = longint'(s.y);
    int tcx = int'(x >> (COORD_FRAC + $clog2(T))), tcy = int'(y >> (COORD_FRAC + $clog2(T)));
    int ctr = (w << log2l) / 2;
    for (int p = 0; p < P; p++) begin
      bit hx, hy;
      int kx, ky, ax, ay;
      ref_dim(x, p % T, nt, T, w, log2l, 256, hx, kx, ax);
      ref_dim(y, p / T, nt, T, w, log2l, 256, hy, ky, ay);
      if (hx && hy) begin
        int gx = kx * T + p % T, gy = ky * T + p / T, tile = ky * nt + kx;
        longint idx = (((x - (longint'(gx) << COORD_FRAC)) % (longint'(nt * T) << COORD_FRAC)
                        + (longint'(nt * T) << COORD_FRAC)) % (longint'(nt * T) << COORD_FRAC));
        idx = (idx * (longint'(1) << log2l) + (longint'(1) << (COORD_FRAC - 1))) >> COORD_FRAC;
        ref_grid[gy * N_MAX + gx] = cadd(ref_grid[gy * N_MAX + gx],
                                         ref_contrib(s.val, ref_weight(ax, ay)));
        n_hits++;
        if (kx != tcx) n_wrap_x++;
        if (ky != tcy) n_wrap_y++;
        if ((kx != tcx && tcx == 0) || (ky != tcy && tcy == 0)) n_torus++;
        if (prev_tile[p] == tile) n_fwd++;
        if (idx < ctr) n_below++;
        if (idx > ctr) n_above++;
        prev_tile[p] = tile;
      end else
        prev_tile[p] = -1;
    end
  endtask

  function automatic sample_t make_sample(int i, int nt);
    sample_t s;
    longint span = longint'(nt) * T << COORD_FRAC;
    case (i % 4)
      0, 1: begin   // spread over the grid
        s.x = 32'(longint'($urandom) % span);
        s.y = 32'(longint'($urandom) % span);
      end
      2: begin      // close to the origin: windows wrap around the torus
        s.x = 32'(longint'($urandom_range(0, 5 << 20)));
        s.y = 32'((span - longint'($urandom_range(1, 5 << 20))) % span);
      end
      default: begin // clustered: the same points are hit back to back
        s.x = 32'((longint'(3 * T / 2) << COORD_FRAC) % span + longint'($urandom_range(0, 1 << 19)));
        s.y = 32'((longint'(T / 2) << COORD_FRAC) % span + longint'($urandom_range(0, 1 << 19)));
      end
    endcase
    s.val.re = 32'($signed(24'($urandom)));
    s.val.im = 32'($signed(24'($urandom)));
    return s;
  endfunction

  task automatic operation(int nt, int w, int log2l, int m, bit gaps);
    int sent = 0, first = -1, last = -1, irq_at = -1, beats = 0, total, bad = 0;
    foreach (ref_grid[i]) ref_grid[i] = '0;
    foreach (prev_tile[p]) prev_tile[p] = -1;
    check(state == ST_IDLE, "idle before start");
    cfg_in = '{nt: 8'(nt), w: 4'(w), log2l: 3'(log2l)};
    cmd_start = 1;
    @(posedge clk); #1;
    cmd_start = 0;
    while (sent < m) begin
      in_valid = gaps ? ($urandom_range(0, 4) != 0) : 1'b1;
      if (in_valid) begin
        in_data = make_sample(sent, nt);
        in_last = (sent == m - 1);
        ref_sample(in_data, nt, w, log2l);
        if (first < 0) first = cyc;
        last = cyc;
        sent++;
        check(in_ready, "sample accepted every cycle");
      end
      @(posedge clk); #1;
    end
    in_valid = 0; in_last = 0;
    while (!irq_grid && cyc - last < 100) begin @(posedge clk); #1; end
    irq_at = cyc;
    check(irq_at - last == 12, $sformatf("interrupt %0d cycles after the last sample", irq_at - last));
    if (!gaps) check(irq_at - first + 1 == m + 12, "runtime of M+12 cycles");
    check(sample_count == 32'(m), "sample count");
    // readout straight away
    cmd_readout = 1;
    @(posedge clk); #1;
    cmd_readout = 0;
    total = nt * nt * P / 2;
    while (beats < total && cyc - irq_at < total + 100) begin
      if (out_valid) begin
        int a = beats / (P / 2), k = beats % (P / 2);
        for (int h = 0; h < 2; h++) begin
          int p = 2 * k + h;
          int gx = (a % nt) * T + p % T, gy = (a / nt) * T + p / T;
          if (out_data[h] !== ref_grid[gy * N_MAX + gx]) begin
            bad++;
            if (bad < 5)
              $display("point (%0d,%0d): got %0d,%0d exp %0d,%0d", gx, gy, out_data[h].re,
                       out_data[h].im, ref_grid[gy * N_MAX + gx].re, ref_grid[gy * N_MAX + gx].im);
          end
        end
        check(out_last == (beats == total - 1), "out_last on the final beat");
        beats++;
      end
      @(posedge clk); #1;
    end
    check(bad == 0, $sformatf("%0d grid points differ", bad));
    check(beats == total, $sformatf("%0d readout beats, expected %0d", beats, total));
    repeat (2) @(posedge clk); #1;
    check(state == ST_IDLE, "idle after readout");
  endtask

  initial begin
    static int clear_cycles = 0;
    cfg_in = '{nt: 8'(NT_MAX), w: 4'd6, log2l: 3'd5};
    cmd_clear = 0; cmd_start = 0; cmd_readout = 0;
    wt_we = 0; wt_addr = 0; wt_data = '0;
    in_valid = 0; in_last = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (state != ST_IDLE) begin @(posedge clk); #1; clear_cycles++; end
    check(clear_cycles == TILES, "clear sweep length");
    for (int a = 0; a < 256; a++) begin
      wt_we = 1; wt_addr = 8'(a); wt_data = tab_entry(a);
      @(posedge clk); #1;
    end
    wt_we = 0;
    operation(128, 6, 5, 4000, 0);
    n_reuse++;
    operation(16, 8, 6, 1000, 1);
    $display("hits=%0d x-wraps=%0d y-wraps=%0d torus=%0d back-to-back=%0d below/above centre=%0d/%0d reused=%0d strobes=%0d",
             n_hits, n_wrap_x, n_wrap_y, n_torus, n_fwd, n_below, n_above, n_reuse, n_fires);
    check(n_fires == n_hits, "one accumulation per reached column");
    check(n_hits > 0 && n_wrap_x > 0 && n_wrap_y > 0 && n_torus > 0 && n_fwd > 0 &&
          n_below > 0 && n_above > 0 && n_reuse > 0 , "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jigsaw_full3d: the 3D Slice variant (DIM3 = 1) at full size.
//
// The accelerator is built with its default sizes (T = 8, 1024 x 1024
// slices) and grids a 1024 x 1024 x 1024 volume the way the 3D Slice variant
// does it: one pass per z slice, each pass streaming every sample and
// reading the whole 1024 x 1024 slice out. Only four slices are run, at the
// top end of the z range so that windows wrap from z = 1023 to z = 0: the
// samples are concentrated in z near that seam (z in [1016, 1024) and
// [0, 4)). Window W = 6, L = 32, 2000 samples. Every grid point of every slice is
// compared with a reference volume built by the reference model (x-y search
// over all tiles as in 2-D, plus the z window test and the z weight). Checks
// that each pass takes M+15 cycles (interrupt 15 cycles after the last
// sample) and counts samples that reach a slice, samples dropped by the z
// test, and windows that wrap in z across the end of the volume.
module tb_jigsaw_full3d;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  localparam int T = T_DEF, N_MAX = N_MAX_DEF, P = T * T;
  localparam int NT = N_MAX / T, NZ = NZ_MAX, W = 6, LOG2L = 5, M = 2000;
  localparam int NSLICE = 4;
  localparam int SLICES [NSLICE] = '{1014, 1018, 1021, 1023};

  logic clk = 0, rst_n = 0;
  cfg_t cfg_in;
  zcfg_t zcfg_in;
  logic cmd_clear = 0, cmd_start = 0, cmd_readout = 0;
  logic wt_we = 0;
  logic [7:0] wt_addr = 0;
  wcplx_t wt_data = '0;
  logic in_valid = 0, in_last = 0;
  sample_t in_data = '0;
  logic [31:0] in_z = '0;
  logic in_ready, out_valid, out_last, irq_grid;
  cplx_t [1:0] out_data;
  state_t state;
  logic [31:0] sample_count;
  logic [P-1:0] acc_fire;

  int checks = 0, failures = 0, cyc = 0;
  int n_zhit = 0, n_zmiss = 0, n_zwrap = 0;

  sample_t smp [M];
  logic [31:0] smp_z [M];
  cplx_t ref_slice [N_MAX * N_MAX];

  jigsaw_top #(.DIM3(1'b1)) dut (
    .clk, .rst_n, .cfg_in, .zcfg_in, .cmd_clear, .cmd_start, .cmd_readout, .wt_we, .wt_addr,
    .wt_data, .in_valid, .in_last, .in_data, .in_z, .in_ready, .out_valid, .out_data,
    .out_last, .irq_grid, .state, .sample_count, .acc_fire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // z window test and z table entry of sample z for slice z0
  function automatic bit ref_z(longint z, int z0, output int tab);
    longint one = longint'(1) << COORD_FRAC;
    longint d = ((z - longint'(z0) * one) % (NZ * one) + NZ * one) % (NZ * one);
    longint idx = (d * (1 << LOG2L) + one / 2) / one;
    longint ctr = (W * (1 << LOG2L)) / 2;
    tab = int'(idx > ctr ? idx - ctr : ctr - idx);
    if (tab > 255) tab = 255;
    return d < W * one;
  endfunction

  task automatic build_ref(int z0);
    foreach (ref_slice[i]) ref_slice[i] = '0;
    for (int s = 0; s < M; s++) begin
      int az;
      if (!ref_z(longint'(smp_z[s]), z0, az)) begin
        n_zmiss++;
        continue;
      end
      n_zhit++;
      if (int'(smp_z[s] >> COORD_FRAC) < z0) n_zwrap++;
      for (int p = 0; p < P; p++) begin
        bit hx, hy;
        int kx, ky, ax, ay;
        ref_dim(longint'(smp[s].x), p % T, NT, T, W, LOG2L, 256, hx, kx, ax);
        ref_dim(longint'(smp[s].y), p / T, NT, T, W, LOG2L, 256, hy, ky, ay);
        if (hx && hy) begin
          wcplx_t wxy = ref_weight(ax, ay), wz = tab_entry(az), w3;
          longint pr, pi;
          int g = (ky * T + p / T) * N_MAX + kx * T + p % T;
          ref_cmul(longint'(wxy.re), longint'(wxy.im), longint'(wz.re), longint'(wz.im), 15, 16, pr, pi);
          w3.re = 16'(pr);
          w3.im = 16'(pi);
          ref_slice[g] = cadd(ref_slice[g], ref_contrib(smp[s].val, w3));
        end
      end
    end
  endtask

  initial begin
    automatic longint span = longint'(NT * T) << COORD_FRAC;
    cfg_in = '{nt: 8'(NT), w: 4'(W), log2l: 3'(LOG2L)};
    zcfg_in = '{nz: 11'(NZ), z0: 10'd0};
    for (int s = 0; s < M; s++) begin
      smp[s].x = 32'(longint'($urandom) % span);
      smp[s].y = 32'(longint'($urandom) % span);
      smp_z[s] = 32'(((longint'(NZ - 8) << COORD_FRAC) + longint'($urandom) % (longint'(12) << COORD_FRAC))
                     % (longint'(NZ) << COORD_FRAC));
      smp[s].val.re = 32'($signed(24'($urandom)));
      smp[s].val.im = 32'($signed(24'($urandom)));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (state != ST_IDLE) begin @(posedge clk); #1; end
    for (int a = 0; a < 256; a++) begin
      wt_we = 1; wt_addr = 8'(a); wt_data = tab_entry(a);
      @(posedge clk); #1;
    end
    wt_we = 0;
    for (int si = 0; si < NSLICE; si++) begin
      automatic int z0 = SLICES[si];
      automatic int first, last, irq_at, beats = 0, bad = 0, total = NT * NT * P / 2;
      build_ref(z0);
      zcfg_in.z0 = 10'(z0);
      cmd_start = 1;
      @(posedge clk); #1;
      cmd_start = 0;
      first = cyc;
      for (int s = 0; s < M; s++) begin
        in_valid = 1; in_last = (s == M - 1); in_data = smp[s]; in_z = smp_z[s];
        last = cyc;
        @(posedge clk); #1;
      end
      in_valid = 0; in_last = 0;
      while (!irq_grid && cyc - last < 100) begin @(posedge clk); #1; end
      irq_at = cyc;
      check(irq_at - last == 15, $sformatf("interrupt %0d cycles after the last sample", irq_at - last));
      check(irq_at - first + 1 == M + 15, "pass takes M+15 cycles");
      cmd_readout = 1;
      @(posedge clk); #1;
      cmd_readout = 0;
      while (beats < total && cyc - irq_at < total + 100) begin
        if (out_valid) begin
          automatic int a = beats / (P / 2), k = beats % (P / 2);
          for (int h = 0; h < 2; h++) begin
            automatic int p = 2 * k + h;
            automatic int g = ((a / NT) * T + p / T) * N_MAX + (a % NT) * T + p % T;
            if (out_data[h] !== ref_slice[g]) begin
              bad++;
              if (bad < 4) $display("slice %0d point %0d: got %0d,%0d exp %0d,%0d", z0, g,
                                    out_data[h].re, out_data[h].im, ref_slice[g].re, ref_slice[g].im);
            end
          end
          beats++;
        end
        @(posedge clk); #1;
      end
      check(bad == 0, $sformatf("slice %0d: %0d points differ", z0, bad));
      check(beats == total, "readout length");
      repeat (2) @(posedge clk); #1;
    end
    $display("slice passes=%0d, samples reaching a slice=%0d, dropped by z=%0d, z wraps=%0d",
             NSLICE, n_zhit, n_zmiss, n_zwrap);
    check(n_zhit > 0 && n_zmiss > 0 && n_zwrap > 0, "every z mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jigsaw_quality: numerical accuracy of the fixed-point accelerator.
//
// Grids a random set of samples with a real Kaiser-Bessel kernel and compares
// the 32-bit fixed-point grid with a double-precision gridding of the same
// samples. The normalised root-mean-square difference
//   NRMSD = sqrt(sum |g_hw - g_ref|^2 / sum |g_ref|^2)
// is reported against two references:
//   * "same table": double arithmetic with the same table addresses, i.e.
//     only the fixed-point error (weight quantisation to Q1.15, truncating
//     shifts). This must stay below 0.02 %.
//   * "exact kernel": the kernel evaluated at the exact distance, i.e. also
//     the error of the oversampled table. It must shrink as L grows.
// The run is repeated for L = 64 and L = 2 (a 32x smaller oversampling
// factor). The kernel table is computed here: entry a holds
// KB(a / L) = I0(beta * sqrt(1 - (2a / (W L))^2)) / I0(beta) in Q1.15, with
// beta = pi * sqrt((W / 2)^2 * 1.5^2 - 0.8) (grid oversampling 2), and
// zero above W*L/2. Grid: T = 8, N = 128, W = 6, 3000 samples.
module tb_jigsaw_quality;
  import jigsaw_pkg::*;

  localparam int T = 8, N_MAX = 128, P = T * T;
  localparam int NT = 16, N = NT * T, W = 6, M = 3000;

  logic clk = 0, rst_n = 0;
  cfg_t cfg_in;
  zcfg_t zcfg_in = '{nz: 11'd1, z0: 10'd0};
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

  sample_t smp [M];
  real ref_t_re [N * N], ref_t_im [N * N];   // same-table reference
  real ref_e_re [N * N], ref_e_im [N * N];   // exact-kernel reference
  real nrmsd_t [2], nrmsd_e [2];

  jigsaw_top #(.T(T), .N_MAX(N_MAX)) dut (
    .clk, .rst_n, .cfg_in, .zcfg_in, .cmd_clear, .cmd_start, .cmd_readout, .wt_we, .wt_addr,
    .wt_data, .in_valid, .in_last, .in_data, .in_z, .in_ready, .out_valid, .out_data,
    .out_last, .irq_grid, .state, .sample_count, .acc_fire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic real bessel_i0(real x);
    real term = 1.0, sum = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum += term;
    end
    return sum;
  endfunction

  // Kaiser-Bessel kernel at distance u from the window centre
  function automatic real kb(real u);
    real beta = 3.14159265358979 * $sqrt((W / 2.0) * (W / 2.0) * 2.25 - 0.8);
    real r = 2.0 * u / W;
    if (r < 0.0) r = -r;
    if (r > 1.0) return 0.0;
    return bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
  endfunction

  // forward distance (in grid units) from column col to coordinate c, and
  // the tile of the reached point, by searching every tile
  function automatic bit reach(longint c, int col, output int tile, output real d);
    longint one = longint'(1) << COORD_FRAC;
    longint n = longint'(N) * one;
    tile = 0; d = 0.0;
    for (int k = 0; k < NT; k++) begin
      longint dd = ((c - (longint'(k) * T + longint'(col)) * one) % n + n) % n;
      if (dd < longint'(W) * one) begin
        tile = k;
        d = real'(dd) / real'(one);
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  function automatic real table_w(real d, int l);
    int idx = int'($floor(d * l + 0.5));
    int f = idx - W * l / 2;
    if (f < 0) f = -f;
    return real'(longint'(kb(real'(f) / l) * 32767.0)) / 32768.0;
  endfunction

  task automatic build_ref(int l);
    foreach (ref_t_re[i]) begin
      ref_t_re[i] = 0.0; ref_t_im[i] = 0.0; ref_e_re[i] = 0.0; ref_e_im[i] = 0.0;
    end
    for (int s = 0; s < M; s++) begin
      for (int p = 0; p < P; p++) begin
        int kx, ky;
        real dx, dy;
        if (reach(longint'(smp[s].x), p % T, kx, dx) && reach(longint'(smp[s].y), p / T, ky, dy)) begin
          int g = (ky * T + p / T) * N + kx * T + p % T;
          real wt = table_w(dx, l) * table_w(dy, l);
          real we = kb(dx - W / 2.0) * kb(dy - W / 2.0);
          ref_t_re[g] += wt * real'(smp[s].val.re);
          ref_t_im[g] += wt * real'(smp[s].val.im);
          ref_e_re[g] += we * real'(smp[s].val.re);
          ref_e_im[g] += we * real'(smp[s].val.im);
        end
      end
    end
  endtask

  task automatic run(int log2l, int r);
    automatic int l = 1 << log2l, beats = 0, total = N * N / 2, first, last, t0;
    automatic real et = 0.0, ee = 0.0, st = 0.0, se = 0.0;
    cfg_in = '{nt: 8'(NT), w: 4'(W), log2l: 3'(log2l)};
    for (int a = 0; a < 256; a++) begin
      wt_we = 1; wt_addr = 8'(a);
      wt_data.re = (a <= W * l / 2) ? 16'(longint'(kb(real'(a) / l) * 32767.0)) : 16'd0;
      wt_data.im = 16'd0;
      @(posedge clk); #1;
    end
    wt_we = 0;
    build_ref(l);
    cmd_start = 1;
    @(posedge clk); #1;
    cmd_start = 0;
    first = cyc;
    for (int s = 0; s < M; s++) begin
      in_valid = 1; in_last = (s == M - 1); in_data = smp[s];
      last = cyc;
      @(posedge clk); #1;
    end
    in_valid = 0; in_last = 0;
    while (!irq_grid && cyc - last < 100) begin @(posedge clk); #1; end
    check(cyc - first + 1 == M + PIPE_DEPTH, $sformatf("L=%0d: gridding took %0d cycles", l, cyc - first + 1));
    cmd_readout = 1;
    @(posedge clk); #1;
    cmd_readout = 0;
    t0 = cyc;
    while (beats < total && cyc - t0 < total + 100) begin
      if (out_valid) begin
        automatic int a = beats / (P / 2), k = beats % (P / 2);
        for (int h = 0; h < 2; h++) begin
          automatic int p = 2 * k + h;
          automatic int g = ((a / NT) * T + p / T) * N + (a % NT) * T + p % T;
          automatic real hr = real'(out_data[h].re), hi = real'(out_data[h].im);
          et += (hr - ref_t_re[g]) ** 2 + (hi - ref_t_im[g]) ** 2;
          st += ref_t_re[g] ** 2 + ref_t_im[g] ** 2;
          ee += (hr - ref_e_re[g]) ** 2 + (hi - ref_e_im[g]) ** 2;
          se += ref_e_re[g] ** 2 + ref_e_im[g] ** 2;
        end
        beats++;
      end
      @(posedge clk); #1;
    end
    check(beats == total, "readout length");
    nrmsd_t[r] = 100.0 * $sqrt(et / st);
    nrmsd_e[r] = 100.0 * $sqrt(ee / se);
    $display("L=%0d: NRMSD vs same-table double %0.5f %%, vs exact kernel %0.5f %%",
             l, nrmsd_t[r], nrmsd_e[r]);
    check(nrmsd_t[r] < 0.02, $sformatf("L=%0d: fixed-point NRMSD %0.5f %% too large", l, nrmsd_t[r]));
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    automatic longint span = longint'(N) << COORD_FRAC;
    for (int s = 0; s < M; s++) begin
      smp[s].x = 32'(longint'($urandom) % span);
      smp[s].y = 32'(longint'($urandom) % span);
      smp[s].val.re = 32'($signed(22'($urandom)));
      smp[s].val.im = 32'($signed(22'($urandom)));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (state != ST_IDLE) begin @(posedge clk); #1; end
    run(6, 0);
    run(1, 1);
    check(nrmsd_e[0] < nrmsd_e[1], "a finer table gives a smaller kernel error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

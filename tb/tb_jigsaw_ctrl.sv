// tb_jigsaw_ctrl: self-checking test of the stream controller.
//
// Checks the clear sweep after reset (every address once, in order, then
// idle), that weight writes pass only while idle, that a gridding stream
// with idle gaps is accepted only in the gridding state and counted, that the
// completion interrupt comes exactly 12 cycles after the last sample (M+12
// cycles for an unbroken stream of M), that the configuration is captured at
// start, that samples offered outside gridding are refused, and the readout
// handshake and a clear on command.
module tb_jigsaw_ctrl;
  import jigsaw_pkg::*;

  localparam int T = 8, N_MAX = 64, TILES = 64;

  logic clk = 0, rst_n = 0;
  logic cmd_clear, cmd_start, cmd_readout;
  cfg_t cfg_in;
  zcfg_t zcfg_in = '{nz: 11'd1, z0: 10'd0};
  zcfg_t zcfg;
  logic in_valid, in_last, rdo_done, wt_we_in;
  state_t state;
  cfg_t cfg;
  logic in_ready, accept, wt_we, clr_en;
  logic [5:0] clr_addr;
  logic rdo_start, irq_grid;
  logic [31:0] sample_count;

  int checks = 0, failures = 0;
  int cyc = 0;

  jigsaw_ctrl #(.T(T), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic expect_clear_sweep();
    for (int a = 0; a < TILES; a++) begin
      check(clr_en && int'(clr_addr) == a && state == ST_CLEAR, "clear sweep address");
      @(posedge clk); #1;
    end
    check(!clr_en && state == ST_IDLE, "idle after clear");
  endtask

  task automatic grid(int m, bit gaps);
    int first = -1, last = -1, sent = 0, irq_at = -1;
    cfg_in = '{nt: 8'd5, w: 4'd3, log2l: 3'd2};
    cmd_start = 1;
    @(posedge clk); #1;
    cmd_start = 0;
    cfg_in = '{nt: 8'd2, w: 4'd7, log2l: 3'd1};   // must not be picked up
    check(state == ST_GRID && in_ready, "gridding state");
    while (sent < m) begin
      in_valid = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_last  = in_valid && (sent == m - 1);
      #1;
      check(accept == in_valid, "accept follows in_valid while gridding");
      if (accept) begin
        if (first < 0) first = cyc;
        last = cyc;
        sent++;
      end
      @(posedge clk); #1;
    end
    in_valid = 0; in_last = 0;
    for (int i = 0; i < 20; i++) begin
      if (irq_grid) begin
        check(irq_at < 0, "single interrupt pulse");
        irq_at = cyc;
      end
      check(!in_ready, "no samples accepted after the last one");
      @(posedge clk); #1;
    end
    check(irq_at - last == 12, $sformatf("interrupt 12 cycles after last sample (%0d)", irq_at - last));
    if (!gaps) check(irq_at - first + 1 == m + 12, "runtime M+12");
    check(sample_count == 32'(m), "sample count");
    check(cfg.nt == 8'd5 && cfg.w == 4'd3 && cfg.log2l == 3'd2, "configuration captured at start");
    check(state == ST_IDLE, "idle after drain");
  endtask

  initial begin
    cmd_clear = 0; cmd_start = 0; cmd_readout = 0; cfg_in = '{nt: 8'd8, w: 4'd6, log2l: 3'd5};
    in_valid = 0; in_last = 0; rdo_done = 0; wt_we_in = 0;
    #1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_clear_sweep();
    // weight writes pass while idle
    wt_we_in = 1; #1;
    check(wt_we, "weight write while idle");
    @(posedge clk); #1; wt_we_in = 0;
    // samples outside gridding are refused
    in_valid = 1; #1;
    check(!in_ready && !accept, "no acceptance while idle");
    in_valid = 0;
    grid(100, 0);
    grid(57, 1);
    // readout handshake
    cmd_readout = 1;
    @(posedge clk); #1;
    cmd_readout = 0;
    check(state == ST_READOUT && rdo_start, "readout started");
    wt_we_in = 1; #1;
    check(!wt_we, "weight write blocked during readout");
    wt_we_in = 0;
    @(posedge clk); #1;
    check(!rdo_start, "start is one pulse");
    repeat (5) @(posedge clk);
    #1 rdo_done = 1;
    @(posedge clk); #1 rdo_done = 0;
    check(state == ST_IDLE, "idle after readout");
    // clear on command
    cmd_clear = 1;
    @(posedge clk); #1;
    cmd_clear = 0;
    expect_clear_sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

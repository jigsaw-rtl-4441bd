// tb_jigsaw_accum: self-checking test of the accumulation unit.
//
// Clears the SRAM with a sweep, streams random contributions to a small set
// of entries so that the same entry is often hit in consecutive cycles (the
// forwarding path) and two cycles apart, then reads every entry back one
// cycle after the last contribution and compares with a reference sum.
// A second read of each entry must return zero (read and clear). Two rounds
// are run so the second starts from a grid left behind by a readout.
module tb_jigsaw_accum;
  import jigsaw_pkg::*;
  import jigsaw_ref_pkg::*;

  localparam int T = 8, N_MAX = 64, TILES = 64;

  logic clk = 0, rst_n = 0;
  logic acc_valid;
  logic [5:0] acc_addr;
  cplx_t acc_val;
  logic clr_en;
  logic [5:0] clr_addr;
  logic rd_en;
  logic [5:0] rd_addr;
  cplx_t rd_data;

  int checks = 0, failures = 0, back_to_back = 0, two_apart = 0;
  cplx_t ref_mem [TILES];

  jigsaw_accum #(.T(T), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(bit expect_zero);
    for (int a = 0; a <= TILES; a++) begin
      @(posedge clk); #1;
      if (a > 0) begin
        cplx_t e = expect_zero ? '0 : ref_mem[a-1];
        checks++;
        if (rd_data !== e) begin
          failures++;
          if (failures < 10)
            $display("entry %0d: got %0d,%0d exp %0d,%0d", a - 1, rd_data.re, rd_data.im, e.re, e.im);
        end
      end
      rd_en = (a < TILES);
      rd_addr = 6'(a);
    end
    rd_en = 0;
  endtask

  initial begin
    int prev1, prev2;
    acc_valid = 0; acc_addr = 0; acc_val = '0; clr_en = 0; clr_addr = 0; rd_en = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a <= TILES; a++) begin
      @(posedge clk); #1;
      clr_en = (a < TILES);
      clr_addr = 6'(a);
    end
    clr_en = 0;
    for (int round = 0; round < 2; round++) begin
      foreach (ref_mem[i]) ref_mem[i] = '0;
      prev1 = -1; prev2 = -1;
      for (int i = 0; i < 3000; i++) begin
        int a;
        @(posedge clk); #1;
        acc_valid = ($urandom_range(0, 9) != 0);
        a = (i % 50 < 25) ? $urandom_range(0, 3) : $urandom_range(0, TILES - 1);
        acc_addr = 6'(a);
        acc_val.re = 32'($signed(24'($urandom)));
        acc_val.im = 32'($signed(24'($urandom)));
        if (acc_valid) begin
          ref_mem[a] = cadd(ref_mem[a], acc_val);
          if (a == prev1) back_to_back++;
          else if (a == prev2) two_apart++;
        end
        prev2 = prev1;
        prev1 = acc_valid ? a : -1;
      end
      @(posedge clk); #1;
      acc_valid = 0;
      read_all(0);
      read_all(1);
    end
    $display("back-to-back same entry: %0d, two apart: %0d", back_to_back, two_apart);
    checks++;
    if (back_to_back == 0 || two_apart == 0) begin
      failures++;
      $display("hazard cases never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

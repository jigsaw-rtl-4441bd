// tb_jigsaw_readout: self-checking test of the readout sequencer.
//
// Each pipeline's SRAM is modelled as a synchronous read returning a value
// that encodes (pipeline, entry). After a start pulse the test collects the
// output beats and checks their order (tile by tile, pipeline pairs in
// row-major order within a tile), their number (N*N/2 for an N x N grid),
// that exactly two pipelines are read per cycle, and that out_last and done
// mark the final beat. Two grid sizes are run.
module tb_jigsaw_readout;
  import jigsaw_pkg::*;

  localparam int T = 4, N_MAX = 32, P = 16;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [7:0] nt;
  cplx_t rd_data [P];
  logic [P-1:0] rd_en;
  logic [5:0] rd_addr;
  logic out_valid;
  cplx_t [1:0] out_data;
  logic out_last, done;

  int checks = 0, failures = 0;

  jigsaw_readout #(.T(T), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;

  function automatic cplx_t model(int p, int a);
    cplx_t v;
    v.re = 32'(p * 1000 + a);
    v.im = 32'(-(a * 7 + p));
    return v;
  endfunction

  // SRAM models: synchronous read
  always @(posedge clk)
    for (int p = 0; p < P; p++)
      if (rd_en[p]) rd_data[p] <= model(p, int'(rd_addr));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n_t);
    int beat = 0, total = n_t * n_t * P / 2;
    nt = 8'(n_t);
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    for (int c = 0; c < total + 10; c++) begin
      checks++;
      if (rd_en != '0 && $countones(rd_en) != 2) begin
        failures++;
        $display("rd_en %b does not select a pair", rd_en);
      end
      if (out_valid) begin
        int a = beat / (P / 2), k = beat % (P / 2);
        checks++;
        if (out_data[0] !== model(2 * k, a) || out_data[1] !== model(2 * k + 1, a) ||
            out_last !== (beat == total - 1) || done !== (beat == total - 1)) begin
          failures++;
          if (failures < 10)
            $display("beat %0d: got %0d/%0d exp %0d/%0d last %0b", beat, out_data[0].re,
                     out_data[1].re, model(2 * k, a).re, model(2 * k + 1, a).re, out_last);
        end
        beat++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (beat != total) begin
      failures++;
      $display("got %0d beats, expected %0d", beat, total);
    end
  endtask

  initial begin
    start = 0; nt = 8'd1;
    foreach (rd_data[p]) rd_data[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(3);
    run(8);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

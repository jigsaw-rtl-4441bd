// jigsaw_accum: accumulation unit and private partial-sum SRAM of a pipeline.
//
// The SRAM holds one complex 32+32-bit partial sum per virtual tile: entry
// `a` is the value of the grid point this pipeline owns in tile a. Every
// contribution from the interpolation unit is added to the entry named by its
// global tile address in a read-modify-write. Because the adder sits next to
// the SRAM and the read and the write are one cycle apart, a contribution
// that hits the same entry as the one just before it would read a stale
// value; the last written sum is therefore forwarded to the adder, so
// back-to-back updates of one entry never stall.
//
// Besides accumulation the unit has two maintenance accesses, both chosen by
// this design: clr_en writes zero to clr_addr (the controller sweeps the
// whole SRAM after reset), and rd_en reads rd_addr for readout and zeroes the
// entry in the same cycle, so a grid that has been read out leaves the SRAM
// clear for the next one. The three accesses are mutually exclusive.
//
// Timing: the SRAM is one read and one write port with synchronous read that
// returns the old word on a same-cycle write. A contribution presented in
// cycle c is written at the end of cycle c+1. rd_data is valid in the cycle
// after rd_en. The adder wraps in two's complement.
// Registers use rst_n only as an asynchronous reset; the assertions also
// use it in 'disable iff', which lint tools may flag as a mixed use.
module jigsaw_accum
  import jigsaw_pkg::*;
#(
  parameter int unsigned T     = T_DEF,
  parameter int unsigned N_MAX = N_MAX_DEF,
  localparam int unsigned TILES   = (N_MAX / T) * (N_MAX / T),
  localparam int unsigned TILE_AW = $clog2(TILES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // accumulate
  input  logic               acc_valid,
  input  logic [TILE_AW-1:0] acc_addr,
  input  cplx_t              acc_val,
  // clear sweep
  input  logic               clr_en,
  input  logic [TILE_AW-1:0] clr_addr,
  // readout (read and clear)
  input  logic               rd_en,
  input  logic [TILE_AW-1:0] rd_addr,
  output cplx_t              rd_data
);

  cplx_t sram [TILES];
  cplx_t rdata;

  // second stage of the read-modify-write
  logic               b_v;
  logic [TILE_AW-1:0] b_addr;
  cplx_t              b_val;
  // last write, for forwarding
  logic               wb_v;
  logic [TILE_AW-1:0] wb_addr;
  cplx_t              wb_data;

  cplx_t operand, sum;

  always_comb begin
    operand = (wb_v && wb_addr == b_addr) ? wb_data : rdata;
    sum.re  = operand.re + b_val.re;
    sum.im  = operand.im + b_val.im;
  end

  // SRAM: one synchronous read port, one write port
  always_ff @(posedge clk) begin
    rdata <= sram[rd_en ? rd_addr : acc_addr];
    if (b_v)
      sram[b_addr] <= sum;
    else if (clr_en)
      sram[clr_addr] <= '0;
    else if (rd_en)
      sram[rd_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_v     <= 1'b0;
      b_addr  <= '0;
      b_val   <= '0;
      wb_v    <= 1'b0;
      wb_addr <= '0;
      wb_data <= '0;
    end else begin
      b_v     <= acc_valid;
      b_addr  <= acc_addr;
      b_val   <= acc_val;
      wb_v    <= b_v;
      wb_addr <= b_addr;
      wb_data <= sum;
    end
  end

  assign rd_data = rdata;

  // the three kinds of access never overlap
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({acc_valid || b_v, clr_en, rd_en}));

endmodule

// jigsaw_ctrl: stream controller of the JIGSAW accelerator.
//
// The accelerator works in two streams: the host streams samples in, one per
// cycle, and after an interrupt it starts a second stream that carries the
// gridded data out. This controller sequences that:
//   CLEAR   - sweep every partial-sum SRAM entry to zero (entered after reset
//             and on cmd_clear), one entry per cycle in all pipelines at once;
//   IDLE    - weight-table writes are accepted; cmd_start and cmd_readout;
//   GRID    - in_ready is high and every in_valid cycle is a sample; the
//             sample marked in_last ends the stream (there is no back-pressure:
//             the pipelines never stall);
//   DRAIN   - waits until the last sample has been accumulated, then raises
//             irq_grid for one cycle;
//   READOUT - the readout unit streams the grid out; back to IDLE when done.
// The configuration (N/T, W, log2 L) is captured on cmd_start and held.
// The state machine, the clear sweep and the handshake are this design's own;
// the source only gives the two DMA streams and the interrupt.
//
// The z slice selection (N_z, z0) of the 3D Slice variant is captured the
// same way; the 2-D accelerator (DIM3 = 0) ignores it and does not check
// its range.
//
// Timing: a stream of M samples whose first sample is on the bus in cycle 0
// gets irq_grid in cycle M+LAT-1, i.e. the gridding takes M+LAT cycles, with
// LAT = 12 for the 2-D pipeline and 15 for the 3D Slice pipeline.
// Registers use rst_n only as an asynchronous reset; the assertions also
// use it in 'disable iff', which lint tools may flag as a mixed use.
module jigsaw_ctrl
  import jigsaw_pkg::*;
#(
  parameter int unsigned T     = T_DEF,
  parameter int unsigned N_MAX = N_MAX_DEF,
  parameter int unsigned LAT   = PIPE_DEPTH,
  parameter bit          DIM3  = 1'b0,
  localparam int unsigned TILES   = (N_MAX / T) * (N_MAX / T),
  localparam int unsigned TILE_AW = $clog2(TILES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_clear,
  input  logic               cmd_start,
  input  logic               cmd_readout,
  input  cfg_t               cfg_in,
  input  zcfg_t              zcfg_in,
  input  logic               in_valid,
  input  logic               in_last,
  input  logic               rdo_done,
  input  logic               wt_we_in,
  output state_t             state,
  output cfg_t               cfg,
  output zcfg_t              zcfg,
  output logic               in_ready,
  output logic               accept,
  output logic               wt_we,
  output logic               clr_en,
  output logic [TILE_AW-1:0] clr_addr,
  output logic               rdo_start,
  output logic               irq_grid,
  output logic [31:0]        sample_count
);

  logic [3:0] drain_cnt;

  assign in_ready = (state == ST_GRID);
  assign accept   = in_ready && in_valid;
  assign clr_en   = (state == ST_CLEAR);
  assign wt_we    = wt_we_in && (state == ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_CLEAR;
      cfg          <= '{nt: 8'(N_MAX / T), w: 4'd6, log2l: 3'd5};
      zcfg         <= '{nz: 11'd1, z0: 10'd0};
      clr_addr     <= '0;
      drain_cnt    <= '0;
      rdo_start    <= 1'b0;
      irq_grid     <= 1'b0;
      sample_count <= '0;
    end else begin
      rdo_start <= 1'b0;
      irq_grid  <= 1'b0;
      unique case (state)
        ST_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (32'(clr_addr) == TILES - 1) begin
            clr_addr <= '0;
            state    <= ST_IDLE;
          end
        end
        ST_IDLE: begin
          if (cmd_clear) begin
            state <= ST_CLEAR;
          end else if (cmd_start) begin
            cfg          <= cfg_in;
            zcfg         <= zcfg_in;
            sample_count <= '0;
            state        <= ST_GRID;
          end else if (cmd_readout) begin
            rdo_start <= 1'b1;
            state     <= ST_READOUT;
          end
        end
        ST_GRID: begin
          if (accept) begin
            sample_count <= sample_count + 1'b1;
            if (in_last) begin
              drain_cnt <= 4'(LAT - 2);
              state     <= ST_DRAIN;
            end
          end
        end
        ST_DRAIN: begin
          if (drain_cnt == '0) begin
            irq_grid <= 1'b1;
            state    <= ST_IDLE;
          end else begin
            drain_cnt <= drain_cnt - 1'b1;
          end
        end
        ST_READOUT: begin
          if (rdo_done) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // the runtime configuration stays inside the supported range
  a_cfg_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_start && state == ST_IDLE) |->
      (cfg_in.w >= 4'd1 && 32'(cfg_in.w) <= W_MAX && 32'(cfg_in.log2l) <= LOG2L_MAX &&
       cfg_in.nt >= 8'd1 && 32'(cfg_in.nt) <= N_MAX / T &&
       (!DIM3 || (zcfg_in.nz >= 11'd1 && 32'(zcfg_in.nz) <= NZ_MAX &&
                  {1'b0, zcfg_in.z0} < zcfg_in.nz))));

  // commands are only meaningful when idle
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_start || cmd_readout || cmd_clear) |-> state == ST_IDLE);

endmodule

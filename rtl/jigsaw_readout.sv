// jigsaw_readout: tile-by-tile readout of the gridded data.
//
// After gridding, the uniform grid is spread over the pipelines' SRAMs: the
// point at relative position (x, y) of tile a is entry a of pipeline
// y*T + x. The readout walks the tiles in address order (tile a = ty*N/T+tx)
// and, within a tile, the pipelines in pairs (2k, 2k+1), i.e. row-major
// along x. Each cycle it reads one entry of two pipelines and places the two
// 64-bit complex points on the 128-bit output bus, lower pipeline in the
// lower half. A tile therefore takes T*T/2 cycles and an N x N grid
// (N/T)^2 * T*T/2 = N*N/2 cycles. Reads clear the entries (see jigsaw_accum).
// The order within a tile and the pairing are this design's choice.
//
// Timing: start is a one-cycle pulse; rd_en/rd_addr are driven from the
// cycle after start; out_valid follows each read by two cycles; out_last
// and done mark the final beat. No back-pressure on the output.
module jigsaw_readout
  import jigsaw_pkg::*;
#(
  parameter int unsigned T     = T_DEF,
  parameter int unsigned N_MAX = N_MAX_DEF,
  localparam int unsigned P       = T * T,
  localparam int unsigned PAIR_W  = $clog2(P / 2),
  localparam int unsigned TILES   = (N_MAX / T) * (N_MAX / T),
  localparam int unsigned TILE_AW = $clog2(TILES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [7:0]         nt,
  input  cplx_t              rd_data [P],
  output logic [P-1:0]       rd_en,
  output logic [TILE_AW-1:0] rd_addr,
  output logic               out_valid,
  output cplx_t [1:0]        out_data,
  output logic               out_last,
  output logic               done
);

  logic              active;
  logic [TILE_AW:0]  tile;
  logic [PAIR_W-1:0] pair;
  logic [TILE_AW:0]  n_tiles;
  logic              last_beat;

  logic              s1_v, s1_last;
  logic [PAIR_W-1:0] s1_pair;

  assign n_tiles   = (TILE_AW+1)'(nt * nt);
  assign last_beat = (tile == n_tiles - 1'b1) && (pair == PAIR_W'(P / 2 - 1));
  assign rd_addr   = tile[TILE_AW-1:0];

  always_comb begin
    rd_en = '0;
    if (active) begin
      rd_en[{pair, 1'b0}] = 1'b1;
      rd_en[{pair, 1'b1}] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      tile      <= '0;
      pair      <= '0;
      s1_v      <= 1'b0;
      s1_last   <= 1'b0;
      s1_pair   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (start) begin
        active <= 1'b1;
        tile   <= '0;
        pair   <= '0;
      end else if (active) begin
        pair <= pair + 1'b1;
        if (pair == PAIR_W'(P / 2 - 1))
          tile <= tile + 1'b1;
        if (last_beat)
          active <= 1'b0;
      end
      s1_v      <= active;
      s1_last   <= active && last_beat;
      s1_pair   <= pair;
      out_valid <= s1_v;
      out_last  <= s1_last;
      done      <= s1_last;
      out_data  <= {rd_data[{s1_pair, 1'b1}], rd_data[{s1_pair, 1'b0}]};
    end
  end

endmodule

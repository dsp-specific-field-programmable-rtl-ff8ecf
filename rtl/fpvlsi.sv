// fpvlsi: the field-programmable VLSI, a mesh-connected array of bit-serial
// cells (8 x 8 by default, 64 cells).
//
// Every cell exchanges 1-bit serial data with its north, west, east and south
// neighbours only; there are no long wires and no global control, so data
// moves one cell per clock at most and the array is fully pipelined. A
// computation is mapped by giving each operation of the data-flow graph its
// own cell and programming pass-through cells where two operations are not
// neighbours. Words travel least significant bit first; a control cell
// (one-hot counter) marks the last bit of each word so that adder cells can
// clear their carry.
//
// Edges: links that leave the array are outputs (n_out[c] from cell (0,c),
// s_out[c] from (ROWS-1,c), w_out[r] from (r,0), e_out[r] from (r,COLS-1));
// the matching inputs feed the same cells. Row 0 is the north row, column 0
// the west column.
// Configuration: one serial chain through all cells in row-major order,
// starting at cell (0,0): ROWS*COLS*CELL_CFG_BITS clocks with cfg_en high.
// rst is synchronous and active high; give it after configuration to start
// the one-hot counters together.
// The mesh and its size follow the architecture; the edge I/O and the
// configuration chain are this design's own choices. The on-chip PLL is not
// modelled: clk is an input.
module fpvlsi
  import fpv_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic            cfg_out,
  input  logic [COLS-1:0] n_in,
  output logic [COLS-1:0] n_out,
  input  logic [COLS-1:0] s_in,
  output logic [COLS-1:0] s_out,
  input  logic [ROWS-1:0] w_in,
  output logic [ROWS-1:0] w_out,
  input  logic [ROWS-1:0] e_in,
  output logic [ROWS-1:0] e_out
);

  localparam int unsigned NCELL = ROWS * COLS;

  logic [3:0] link_in  [ROWS][COLS];
  logic [3:0] link_out [ROWS][COLS];
  logic [NCELL:0] chain;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NCELL];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // North neighbour's southward link, or the array edge.
      if (r == 0) begin : g_n_edge
        assign link_in[r][c][DIR_N] = n_in[c];
        assign n_out[c]             = link_out[r][c][DIR_N];
      end else begin : g_n
        assign link_in[r][c][DIR_N] = link_out[r-1][c][DIR_S];
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign link_in[r][c][DIR_S] = s_in[c];
        assign s_out[c]             = link_out[r][c][DIR_S];
      end else begin : g_s
        assign link_in[r][c][DIR_S] = link_out[r+1][c][DIR_N];
      end
      if (c == 0) begin : g_w_edge
        assign link_in[r][c][DIR_W] = w_in[r];
        assign w_out[r]             = link_out[r][c][DIR_W];
      end else begin : g_w
        assign link_in[r][c][DIR_W] = link_out[r][c-1][DIR_E];
      end
      if (c == COLS - 1) begin : g_e_edge
        assign link_in[r][c][DIR_E] = e_in[r];
        assign e_out[r]             = link_out[r][c][DIR_E];
      end else begin : g_e
        assign link_in[r][c][DIR_E] = link_out[r][c+1][DIR_W];
      end

      fpv_cell u_cell (
        .clk, .rst, .cfg_en,
        .cfg_si  (chain[r*COLS + c]),
        .cfg_so  (chain[r*COLS + c + 1]),
        .link_in (link_in[r][c]),
        .link_out(link_out[r][c])
      );
    end
  end

endmodule

// fpv_cell: one cell of the mesh, a PE plus its switch block.
//
// The cell talks to its four neighbours over 1-bit links only. The PE reads
// the four incoming links directly as I0 (north), I1 (west), I2 (east) and
// I3 (south); four cross-point switches put the PE output onto any of the
// four outgoing links. A signal is routed through a cell by programming the
// PE as a pass-through (for example LUT B = I1), so no other switches exist.
//
// Configuration: a 28-bit serial chain runs cfg_si -> static word (12 bits,
// cell_cfg_t, bit 0 first) -> LUT A (8) -> LUT B (8) -> cfg_so, shifting one
// place per clock while cfg_en is high. Seen as a vector {LUT B, LUT A,
// static}, the bit shifted in last ends in bit 0. The static register has no
// reset; it holds its value until the next configuration.
// The PE/switch-block split and the neighbour wiring follow the architecture;
// the serial configuration chain is this design's own choice.
// The PE's carry register output qa is a PE port for observation in the PE's
// own test; the cell leaves it unconnected (a lint tool reports it unused).
module fpv_cell
  import fpv_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       cfg_en,
  input  logic       cfg_si,
  output logic       cfg_so,
  input  logic [3:0] link_in,   // from the neighbours, index DIR_N/W/E/S
  output logic [3:0] link_out   // to the neighbours, index DIR_N/W/E/S
);

  cell_cfg_t cfg;
  logic [3:0] pe_in;
  logic       dout, qa;

  always_ff @(posedge clk) begin
    if (cfg_en) cfg <= cell_cfg_t'({cfg[STATIC_CFG_BITS-2:0], cfg_si});
  end

  fpv_pe u_pe (
    .clk, .rst, .cfg, .cfg_en,
    .cfg_si(cfg[STATIC_CFG_BITS-1]), .cfg_so,
    .pe_in, .dout, .qa
  );

  fpv_switch_block u_sb (
    .xp(cfg.xp), .dout, .link_in, .link_out, .pe_in
  );

endmodule

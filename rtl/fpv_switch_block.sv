// fpv_switch_block: the switch block of one cell.
//
// The cell has one 1-bit link to each of its four neighbours. Each PE input is
// wired straight to the output of the neighbour on that side (I0 north,
// I1 west, I2 east, I3 south), so the switch block has no input switches; it
// holds only four cross-point switches that put the PE output DOUT onto the
// link toward the north, west, east and south neighbour. Routing through a
// cell is done by programming its PE as a pass-through.
//
// A cross-point switch that is off drives 0: each link is modelled as a
// pair of one-way wires, so no tri-state net is needed. That is this
// design's choice; the architecture only says a cross-point switch joins
// DOUT to the line. Purely combinational.
module fpv_switch_block
  import fpv_pkg::*;
(
  input  logic [3:0] xp,        // switch enables, index DIR_N/W/E/S
  input  logic       dout,      // PE output
  input  logic [3:0] link_in,   // from the neighbours, index DIR_*
  output logic [3:0] link_out,  // to the neighbours, index DIR_*
  output logic [3:0] pe_in      // I0..I3 of the PE
);

  always_comb begin
    for (int d = 0; d < 4; d++) link_out[d] = xp[d] & dout;
    pe_in[0] = link_in[DIR_N];
    pe_in[1] = link_in[DIR_W];
    pe_in[2] = link_in[DIR_E];
    pe_in[3] = link_in[DIR_S];
  end

endmodule

// fpv_tb_pkg: helpers shared by the testbenches that program cells through
// the serial configuration chain. A cell's 28-bit chain vector is
// {LUT B, LUT A, static word}; the bit shifted in last lands in bit 0, so a
// vector is shifted in most significant bit first.
package fpv_tb_pkg;
  import fpv_pkg::*;

  typedef logic [CELL_CFG_BITS-1:0] cell_vec_t;

  // Common LUT tables for sel = {s2, I2, I1}.
  localparam logic [7:0] T_SUM    = 8'h96;  // s2 ^ I2 ^ I1
  localparam logic [7:0] T_CARRY  = 8'hE8;  // majority
  localparam logic [7:0] T_BORROW = 8'hD4;  // borrow of I1 - I2 - s2
  localparam logic [7:0] T_I1     = 8'hAA;  // pass I1 (west)
  localparam logic [7:0] T_I2     = 8'hCC;  // pass I2 (east)
  localparam logic [7:0] T_S2     = 8'hF0;  // pass s2 (I0 or I3)
  localparam logic [7:0] T_MUX    = 8'hCA;  // s2 ? I2 : I1

  function automatic cell_vec_t cell_vec(input pe_mode_e mode, input s2_src_e s2src,
                                         input logic [3:0] tap, input logic [3:0] xp,
                                         input logic [7:0] lut_a, input logic [7:0] lut_b);
    cell_cfg_t s;
    s = '{xp: xp, tap: tap, s2src: s2src, mode: mode};
    return {lut_b, lut_a, s};
  endfunction

  function automatic logic [3:0] xp_of(input int unsigned dir);
    return 4'(1 << dir);
  endfunction
endpackage

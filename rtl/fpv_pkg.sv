// fpv_pkg: types and constants shared by the cells of the bit-serial
// field-programmable array.
//
// Each cell carries a static configuration word (cell_cfg_t) and two 8-bit
// shift-register lookup tables. Both are loaded through one serial
// configuration chain. The three PE modes (arithmetic/logic, memory,
// control) and the four cross-point switches follow the architecture; the
// bit layout of the configuration word, the source choice for the third LUT
// select and the memory/counter tap field are this design's own choices.
package fpv_pkg;

  // Operating mode of a PE.
  typedef enum logic [1:0] {
    MODE_LOGIC   = 2'd0,  // two 3-input LUTs, carry register in LUT A
    MODE_MEMORY  = 2'd1,  // both LUTs form one 16-bit serial delay line fed by I0
    MODE_CONTROL = 2'd2,  // both LUTs form a one-hot ring counter (word termination)
    MODE_OFF     = 2'd3   // PE idle, DOUT held at 0
  } pe_mode_e;

  // Source of the most significant LUT select bit in MODE_LOGIC.
  // sel = {s2, I2, I1}.
  typedef enum logic [1:0] {
    S2_I0    = 2'd0,  // north input
    S2_I3    = 2'd1,  // south input
    S2_CARRY = 2'd2,  // LUT A register fed back (bit-serial carry); I3 clears it
    S2_ZERO  = 2'd3
  } s2_src_e;

  // Direction index of the four links and cross-point switches.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_W = 1;
  localparam int unsigned DIR_E = 2;
  localparam int unsigned DIR_S = 3;

  // Static configuration of one cell (12 bits).
  typedef struct packed {
    logic [3:0] xp;     // cross-point switch enables, index DIR_*
    logic [3:0] tap;    // memory tap / counter length minus one (0..15)
    s2_src_e    s2src;
    pe_mode_e   mode;
  } cell_cfg_t;

  localparam int unsigned LUT_BITS   = 8;
  localparam int unsigned STATIC_CFG_BITS = $bits(cell_cfg_t);
  // Per-cell configuration chain: static word, then LUT A, then LUT B.
  localparam int unsigned CELL_CFG_BITS = STATIC_CFG_BITS + 2 * LUT_BITS;

endpackage

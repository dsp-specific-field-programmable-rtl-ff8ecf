// tb_fpvlsi_sad: sum of absolute differences (SAD) on the 8 x 8 array at its
// default size, built only from bit-serial cells.
//
// Mapping (cell (row,col), row 0 north). Every stream is 16-bit, LSB first;
// "phase p" below means bit 0 of word j leaves a cell right after clock
// edge 16j+p. All control cells pulse after edges 16k (phase 0).
//   a: w_in[5] -> (5,0) (5,1) (5,2)      b: e_in[5] -> (5,7) (5,6) (5,5) (5,4)
//   S  (5,3) subtractor d = a - b, borrow cleared by control (6,3).    phase 2
//   (4,3) sends d east to H and west along (4,2..0), up (3,0) (2,0) (1,0),
//         east (1,1) (1,2) and down into memory M (2,2), tap 8.     M: phase 21
//   H  (4,4) sign hold: on the word-termination pulse (control (4,7), two
//         relays, phase 2) it keeps the MSB of d for a whole word; the sign
//         goes north through (3,4) and (2,4) to G.                 phase 21
//   G  (2,3) conditional negate: |d| = sign ? 0 - d : d, as a serial
//         subtract with its borrow register cleared at phase 4 by control
//         (2,1) delayed through memory cell (3,1) (tap 0) and (3,2) (3,3).
//   |d| goes north through (1,3) (1,4) to
//   A  (1,5) accumulator adder: second operand is its own sum, looped through
//         (0,5), gate (0,6) and memory M2 (1,6) (tap 11): 16 clocks around.
//         Carry cleared at phase 7 by control (2,7) delayed through memory
//         cell (3,7) (tap 2) and (3,6) (3,5) (2,5). Gate (0,6) passes the
//         loop value unless n_in[6] is 1, which starts a new SAD.
//   The running sum leaves on n_out[5] (phase 26).
// Pixels are random 8-bit values in 16-bit words; SADs are over 8 pairs.
// The expected sums are computed here from the pixel values.
// Mechanisms counted: negative differences (negate path), positive ones,
// SAD restarts through the gate. A counter that stays 0 is a failure.
module tb_fpvlsi_sad;
  import fpv_pkg::*;
  import fpv_tb_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  localparam int NCELL = ROWS * COLS;
  localparam int WORDS = 40;
  localparam int GROUP = 8;
  localparam int EDGES = 16 * (WORDS + 3);
  localparam logic [7:0] T_HOLD   = 8'hB8;  // s2 = state, I2 = term, I1 = d
  localparam logic [7:0] T_SEEN   = 8'hFA;  // state | d
  localparam logic [7:0] T_NEG    = 8'h6A;  // d ^ (sign & seen)
  localparam logic [7:0] T_GATE   = 8'h0A;  // I1 & ~s2

  logic clk = 0, rst, cfg_en, cfg_in, cfg_out;
  logic [COLS-1:0] n_in, n_out, s_in, s_out;
  logic [ROWS-1:0] w_in, w_out, e_in, e_out;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_start = 0;

  always #5 clk = ~clk;

  fpvlsi dut (.*);

  cell_vec_t cfgv [ROWS][COLS];
  logic [15:0] wa [WORDS+4], wb [WORDS+4], acc [WORDS+4];
  logic start [WORDS+4];

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic cell_vec_t relay(input logic [7:0] t, input s2_src_e s, input int unsigned dir);
    return cell_vec(MODE_LOGIC, s, 4'd0, xp_of(dir), 8'h00, t);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int x, j, i;

    foreach (cfgv[r, c]) cfgv[r][c] = '0;
    // a and b inputs
    for (int c = 0; c < 3; c++) cfgv[5][c] = relay(T_I1, S2_ZERO, DIR_E);
    for (int c = 4; c < 8; c++) cfgv[5][c] = relay(T_I2, S2_ZERO, DIR_W);
    // S: a - b
    cfgv[5][3] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_BORROW, T_SUM);
    cfgv[6][3] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_N), 8'h00, 8'h00);
    // d fan-out
    cfgv[4][3] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_E) | xp_of(DIR_W), 8'h00, T_S2);
    for (int c = 0; c < 3; c++) cfgv[4][c] = relay(T_I2, S2_ZERO, DIR_W);
    cfgv[4][0] = relay(T_I2, S2_ZERO, DIR_N);
    cfgv[3][0] = relay(T_S2, S2_I3, DIR_N);
    cfgv[2][0] = relay(T_S2, S2_I3, DIR_N);
    cfgv[1][0] = relay(T_S2, S2_I3, DIR_E);
    cfgv[1][1] = relay(T_I1, S2_ZERO, DIR_E);
    cfgv[1][2] = relay(T_I1, S2_ZERO, DIR_S);
    cfgv[2][2] = cell_vec(MODE_MEMORY, S2_ZERO, 4'd8, xp_of(DIR_E), 8'h00, 8'h00);
    // H: sign hold
    cfgv[4][4] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_HOLD, T_HOLD);
    cfgv[4][7] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_W), 8'h00, 8'h00);
    cfgv[4][6] = relay(T_I2, S2_ZERO, DIR_W);
    cfgv[4][5] = relay(T_I2, S2_ZERO, DIR_W);
    cfgv[3][4] = relay(T_S2, S2_I3, DIR_N);
    cfgv[2][4] = relay(T_S2, S2_I3, DIR_W);
    // G: conditional negate
    cfgv[2][3] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_SEEN, T_NEG);
    cfgv[2][1] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_S), 8'h00, 8'h00);
    cfgv[3][1] = cell_vec(MODE_MEMORY, S2_ZERO, 4'd0, xp_of(DIR_E), 8'h00, 8'h00);
    cfgv[3][2] = relay(T_I1, S2_ZERO, DIR_E);
    cfgv[3][3] = relay(T_I1, S2_ZERO, DIR_N);
    // |d| to the accumulator
    cfgv[1][3] = relay(T_S2, S2_I3, DIR_E);
    cfgv[1][4] = relay(T_I1, S2_ZERO, DIR_E);
    // A: accumulator with its loop
    cfgv[1][5] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_CARRY, T_SUM);
    cfgv[0][5] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_E) | xp_of(DIR_N), 8'h00, T_S2);
    cfgv[0][6] = cell_vec(MODE_LOGIC, S2_I0, 0, xp_of(DIR_S), 8'h00, T_GATE);
    cfgv[1][6] = cell_vec(MODE_MEMORY, S2_ZERO, 4'd11, xp_of(DIR_W), 8'h00, 8'h00);
    cfgv[2][7] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_S), 8'h00, 8'h00);
    cfgv[3][7] = cell_vec(MODE_MEMORY, S2_ZERO, 4'd2, xp_of(DIR_W), 8'h00, 8'h00);
    cfgv[3][6] = relay(T_I2, S2_ZERO, DIR_W);
    cfgv[3][5] = relay(T_I2, S2_ZERO, DIR_N);
    cfgv[2][5] = relay(T_S2, S2_I3, DIR_N);

    // pixel pairs and the expected running sums
    wa[0] = 0; wb[0] = 0; acc[0] = 0; start[0] = 0;
    for (int k = 1; k < WORDS + 4; k++) begin
      wa[k] = (k <= WORDS) ? 16'($urandom_range(0, 255)) : 16'h0;
      wb[k] = (k <= WORDS) ? 16'($urandom_range(0, 255)) : 16'h0;
      start[k] = ((k - 1) % GROUP) == 0;
      d = wa[k] - wb[k];
      if (k <= WORDS) begin
        if (d[15]) n_neg++; else n_pos++;
        if (start[k]) n_start++;
      end
      d = d[15] ? 16'(-d) : d;
      acc[k] = d + (start[k] ? 16'h0 : acc[k-1]);
    end

    rst = 0; cfg_en = 0; cfg_in = 0;
    n_in = 0; s_in = 0; w_in = 0; e_in = 0;
    for (int ci = NCELL - 1; ci >= 0; ci--)
      for (int b = CELL_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = cfgv[ci / COLS][ci % COLS][b];
      end
    @(negedge clk); cfg_en = 0; cfg_in = 0; rst = 1;   // next edge is edge 0

    for (int K = 1; K <= EDGES; K++) begin
      @(negedge clk);
      rst = 0;
      x = K - 27; j = x / 16; i = x % 16;
      if (x >= 16 && j <= WORDS)
        check(n_out[5], acc[j][i], $sformatf("SAD word %0d bit %0d", j, i));
      check(n_out & ~8'h20, 0, "idle north outputs");
      check({s_out, w_out, e_out}, 0, "idle outputs");
      x = K + 1; j = x / 16; i = x % 16;
      w_in[5] = (j < WORDS + 4) ? wa[j][i] : 1'b0;
      x = K + 2; j = x / 16; i = x % 16;
      e_in[5] = (j < WORDS + 4) ? wb[j][i] : 1'b0;
      x = K - 11; j = x / 16;
      n_in[6] = (x >= 0 && j < WORDS + 4) ? start[j] : 1'b0;
    end

    $display("SAD groups %0d, final sum %0d, negative differences %0d, positive %0d",
             n_start, acc[WORDS], n_neg, n_pos);
    check(n_neg > 0, 1, "negate path exercised");
    check(n_pos > 0, 1, "pass path exercised");
    check(n_start > 1, 1, "SAD restart exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpvlsi_shiftadd: bit-serial constant-coefficient shift-add networks
// mapped onto the 8 x 8 array at its default size. Two applications share
// one mapping:
//   * multiplier  y[n] = c * x[n] for 8-bit x and an 8-bit coefficient c;
//   * FIR filter  y[n] = sum_i h[i] * x[n-i], 5 taps (4th order), with small
//     constant coefficients (at most eight 1 bits in all of them).
// Both are sums of copies of the input stream x, each delayed by a shift s:
// in an LSB-first stream of 16-bit words, a delay of 16q + r clocks selects
// x[n-q] shifted left by r. So y = sum over the 1 bits (i, k) of the
// coefficients of x delayed by 16i + k. Words are 16 bits, one per 16 clocks.
//
// Eight slices do the additions, one adder cell each. A slice whose table
// adds holds a 1 bit; a slice whose table only passes the partial product
// fills an unused position. The coefficients are therefore part of the
// configuration, as for FFT twiddle factors or filter taps. x has 8
// significant bits, so the bits that slide in from the previous word are 0
// and need no masking. Every partial sum stays below 2^16, so no adder
// carries out of bit 15 and no slice needs a word-termination pulse: this
// mapping has no control cells.
//
// Mapping (cell (row, column)):
//   slices 0..3 at (0,1) (2,1) (4,1) (6,1); x comes down column 0 and
//   enters each slice from the west; the partial product goes from a slice
//   through (r+1,1) (r+1,2) (r+2,2) into the next slice from the east
//   (4 clocks per step). Between two slices x passes two memory cells
//   (r+1,0) (r+2,0) with taps t1, t2 (t1 + t2 + 4 clocks), so consecutive
//   shifts may differ by 0..30.
//   The partial product returns along row 7 and up column 3 to slices 4..7
//   at (0,5) (2,5) (4,5) (6,5), a mirror image with x in column 6 entering
//   from the east. x is fed to both groups, on w_in[0] and on n_in[6], the
//   second copy later by 24 + s4 - s0 clocks (s4, s0: shifts of slices 4 and
//   0), since the first group's x column has no free exit. The result
//   leaves on s_out[5], 38 - s0 clocks after x enters on w_in[0].
// The mapping is this design's own; it uses 52 of the 64 cells.
module tb_fpvlsi_shiftadd;
  import fpv_pkg::*;
  import fpv_tb_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  localparam int NCELL = ROWS * COLS;
  localparam int NSLICE = 8;
  localparam int WORDS = 24;
  localparam int NMULT = 6;
  localparam int NFIR = 2;
  localparam int EDGES = 16 * (WORDS + 8);
  // pass the partial product p (the carry, always 0 there, is still added);
  // p is on I2 in the first group and on I1 in the second
  localparam logic [7:0] T_PSUM2   = 8'h3C;   // I2 ^ carry
  localparam logic [7:0] T_PCARRY2 = 8'hC0;   // I2 & carry
  localparam logic [7:0] T_PSUM1   = 8'h5A;   // I1 ^ carry
  localparam logic [7:0] T_PCARRY1 = 8'hA0;   // I1 & carry

  logic clk = 0, rst, cfg_en, cfg_in, cfg_out;
  logic [COLS-1:0] n_in, n_out, s_in, s_out;
  logic [ROWS-1:0] w_in, w_out, e_in, e_out;
  int checks = 0, failures = 0;
  int n_add = 0, n_pass = 0, n_big = 0, n_word_delay = 0, n_long_step = 0;

  always #5 clk = ~clk;

  fpvlsi dut (.*);

  cell_vec_t cfgv [ROWS][COLS];
  logic [15:0] wx [WORDS+8];
  int shift [NSLICE];
  logic add [NSLICE];

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic cell_vec_t relay(input logic [7:0] t, input s2_src_e s, input logic [3:0] xp);
    return cell_vec(MODE_LOGIC, s, 4'd0, xp, 8'h00, t);
  endfunction

  function automatic cell_vec_t mem(input int tap, input logic [3:0] xp);
    return cell_vec(MODE_MEMORY, S2_ZERO, 4'(tap), xp, 8'h00, 8'h00);
  endfunction

  function automatic cell_vec_t slice(input logic a, input logic p_on_i1);
    if (a) return cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_S), T_CARRY, T_SUM);
    return p_on_i1 ? cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_S), T_PCARRY1, T_PSUM1)
                   : cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_S), T_PCARRY2, T_PSUM2);
  endfunction

  // Configuration for the current shift[] / add[] lists.
  task automatic build();
    int inc, t1, t2, k;
    foreach (cfgv[r, cc]) cfgv[r][cc] = '0;
    for (int g = 0; g < 2; g++) begin
      bit g2 = (g == 1);
      int xc = g2 ? 6 : 0;            // x column
      int sc = g2 ? 5 : 1;            // slice column
      int pc = g2 ? 4 : 2;            // partial-product column
      int xdir = g2 ? DIR_W : DIR_E;  // from the x column into the slice
      for (int m = 0; m < 4; m++) begin
        int r = 2 * m;
        k = 4 * g + m;
        cfgv[r][sc] = slice(add[k], g2);
        if (m == 0)
          cfgv[0][xc] = g2 ? relay(T_S2, S2_I0, xp_of(xdir) | xp_of(DIR_S))
                          : relay(T_I1, S2_ZERO, xp_of(xdir) | xp_of(DIR_S));
        if (m < 3) begin
          inc = shift[k+1] - shift[k];
          t1 = (inc > 15) ? 15 : inc;
          t2 = inc - t1;
          if (inc >= 16) n_word_delay++;
          if (inc > 15) n_long_step++;
          cfgv[r+1][xc] = mem(t1, xp_of(DIR_S));
          cfgv[r+2][xc] = mem(t2, xp_of(xdir) | (m < 2 ? xp_of(DIR_S) : 4'h0));
          cfgv[r+1][sc] = relay(T_S2, S2_I0, xp_of(g2 ? DIR_W : DIR_E));
          cfgv[r+1][pc] = relay(g2 ? T_I2 : T_I1, S2_ZERO, xp_of(DIR_S));
          cfgv[r+2][pc] = relay(T_S2, S2_I0, xp_of(g2 ? DIR_E : DIR_W));
        end
      end
    end
    cfgv[7][1] = relay(T_S2, S2_I0, xp_of(DIR_E));
    cfgv[7][2] = relay(T_I1, S2_ZERO, xp_of(DIR_E));
    cfgv[7][3] = relay(T_I1, S2_ZERO, xp_of(DIR_N));
    for (int r = 1; r < 7; r++) cfgv[r][3] = relay(T_S2, S2_I3, xp_of(DIR_N));
    cfgv[0][3] = relay(T_S2, S2_I3, xp_of(DIR_E));
    cfgv[0][4] = relay(T_I1, S2_ZERO, xp_of(DIR_E));
    cfgv[7][5] = relay(T_S2, S2_I0, xp_of(DIR_S));
  endtask

  // Word n of x delayed by s clocks (words before 0 are 0).
  function automatic logic [15:0] delayed(input int n, input int s);
    int q = s / 16, r = s % 16;
    logic [31:0] two;
    two = {(n - q >= 0) ? wx[n - q] : 16'h0, (n - q - 1 >= 0) ? wx[n - q - 1] : 16'h0};
    return two[31 - r -: 16];
  endfunction

  function automatic logic [15:0] expected(input int n);
    logic [15:0] y = 0;
    for (int k = 0; k < NSLICE; k++) if (add[k]) y += delayed(n, shift[k]);
    return y;
  endfunction

  // Run one configuration with the current shift[] / add[] lists.
  task automatic run(input string name);
    int x, j, i, lat, y0;
    logic [15:0] y;
    build();
    foreach (add[k]) if (add[k]) n_add++; else n_pass++;
    lat = 38 - shift[0];
    y0 = 24 + shift[4] - shift[0];
    wx[0] = 16'h0000;   // its bit 0 would be sampled at the reset edge
    for (int w = 1; w < WORDS + 8; w++)
      wx[w] = (w < WORDS) ? ((w < 3) ? 16'h00FF : 16'($urandom_range(0, 255))) : 16'h0;
    for (int ci = NCELL - 1; ci >= 0; ci--)
      for (int b = CELL_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk); cfg_en = 1; cfg_in = cfgv[ci / COLS][ci % COLS][b];
      end
    @(negedge clk); cfg_en = 0; cfg_in = 0; rst = 1;
    for (int K = 1; K <= EDGES; K++) begin
      @(negedge clk);
      rst = 0;
      // the output bit of edge K-1
      x = K - 1 - lat; j = x / 16; i = x % 16;
      if (x >= 0 && j < WORDS + 4) begin
        y = expected(j);
        check(32'(s_out[5]), 32'(y[i]), $sformatf("%s word %0d bit %0d", name, j, i));
        if (i == 0 && y >= 16'h4000) n_big++;
      end
      check({n_out, w_out, e_out, s_out & ~8'h20}, 0, "idle outputs");
      // inputs for edge K
      j = K / 16; i = K % 16;
      w_in[0] = (j < WORDS + 8) ? wx[j][i] : 1'b0;
      x = K - y0; j = x / 16; i = x % 16;
      n_in[6] = (x >= 0 && j < WORDS + 8) ? wx[j][i] : 1'b0;
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c;
    int h [5];
    int used;
    used = 0;
    rst = 0; cfg_en = 0; cfg_in = 0;
    n_in = 0; s_in = 0; w_in = 0; e_in = 0;
    // multipliers: slice k adds x << k when c[k] is 1
    for (int t = 0; t < NMULT; t++) begin
      c = (t == 0) ? 8'hFF : (t == 1) ? 8'h01 : 8'($urandom);
      for (int k = 0; k < NSLICE; k++) begin
        shift[k] = k;
        add[k] = c[k];
      end
      run($sformatf("mult c=%02h", c));
      if (t == 0) begin
        foreach (cfgv[r, cc]) if (cfgv[r][cc] != '0) used++;
        $display("cells used: %0d of %0d", used, NCELL);
      end
    end
    // 5-tap FIR filters: one slice per 1 bit of a coefficient, shift 16*i + k
    for (int f = 0; f < NFIR; f++) begin
      int n;
      n = 0;
      if (f == 0) h = '{1, 3, 4, 3, 1};
      else        h = '{2, 1, 5, 1, 2};
      for (int i = 0; i < 5; i++)
        for (int k = 0; k < 4; k++)
          if (h[i][k]) begin
            shift[n] = 16 * i + k;
            add[n] = 1;
            n++;
          end
      for (; n < NSLICE; n++) begin   // unused slices pass the sum on
        shift[n] = shift[n-1];
        add[n] = 0;
      end
      // the group boundary (slice 3 -> 4) takes any step; within a group a
      // step is at most 30 clocks
      run($sformatf("fir h={%0d,%0d,%0d,%0d,%0d}", h[0], h[1], h[2], h[3], h[4]));
    end
    $display("adding slices %0d, passing slices %0d, sums >= 2^14: %0d, word delays %0d",
             n_add, n_pass, n_big, n_word_delay);
    check(32'(n_add > 0 && n_pass > 0), 1, "both slice kinds exercised");
    check(32'(n_big > 0), 1, "long carry chains exercised");
    check(32'(n_word_delay > 0), 1, "word-length delays between slices exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

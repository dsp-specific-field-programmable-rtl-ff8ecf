// tb_fpvlsi: end-to-end test of the 8 x 8 array at its default size.
//
// The whole array is programmed through its single configuration chain with
// a small mapped application, then fed with random 16-bit words, LSB first:
//   - adder pipeline: a enters at w_in[1] through routing cell (1,0); b
//     enters at e_in[1] through six routing cells (1,7)..(1,2); adder cell
//     (1,1) gets its word-termination pulse from control cell (2,1) below it;
//     the sum leaves through routing cell (0,1) on n_out[1]; the control
//     pulse is also copied out through (2,0) on w_out[2]
//   - subtractor pipeline: same shape in rows 4/5, c - d leaves westward
//     through (3,1) and (3,0) on w_out[3]
//   - memory cell (0,6): the bit stream on n_in[6] returns on n_out[6]
//     MEM_TAP+2 cycles later
//   - multiplexer cell (7,0): s_in[0] chooses between w_in[7] and s_in[1]
//     (routed through (7,1)); the result leaves on s_out[0] and w_out[7]
// Every other array output must stay 0 (all other cross-point switches off).
// Word 1 of the b and d streams would have to be driven before reset (their
// paths are five cycles longer), so sums and differences are checked from
// word 2 on. The expected streams are computed here from the inputs and the latencies of
// the mapping (one clock per cell). The test also shifts a random vector
// through the chain first and checks that it comes out after exactly
// 64 x 28 clocks while the real configuration goes in.
// Mechanism counters: words whose carry or borrow register had to be cleared
// (a + b >= 2^16, c < d), control pulses seen at the adder, memory bits, both
// multiplexer selections. A counter that stays 0 is a failure.
module tb_fpvlsi;
  import fpv_pkg::*;
  import fpv_tb_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  localparam int NCELL = ROWS * COLS;
  localparam int CHAIN = NCELL * CELL_CFG_BITS;
  localparam int WORDS = 48;
  localparam int EDGES = 16 * (WORDS + 2);
  localparam int MEM_TAP = 9;

  logic clk = 0, rst, cfg_en, cfg_in, cfg_out;
  logic [COLS-1:0] n_in, n_out, s_in, s_out;
  logic [ROWS-1:0] w_in, w_out, e_in, e_out;
  int checks = 0, failures = 0;
  int n_carry_clear = 0, n_borrow_clear = 0, n_ctrl_pulse = 0;
  int n_mem_ones = 0, n_mux_sel0 = 0, n_mux_sel1 = 0;

  always #5 clk = ~clk;

  fpvlsi dut (.*);

  cell_vec_t cfgv [ROWS][COLS];
  logic [15:0] wa [WORDS+3], wb [WORDS+3], wc [WORDS+3], wd [WORDS+3];
  logic mem_s [EDGES+8];
  logic s0 [EDGES+8], s1 [EDGES+8], w7 [EDGES+8];

  // Bit of a word stream seen at edge e: word j = (e+15)/16, bit (e+15)%16.
  function automatic logic wbit(input logic [15:0] w [WORDS+3], input int e);
    int j;
    if (e < 1) return 1'b0;
    j = (e + 15) / 16;
    if (j > WORDS) return 1'b0;
    return w[j][(e + 15) % 16];
  endfunction

  function automatic logic bitat(input logic s [EDGES+8], input int e);
    if (e < 0 || e >= EDGES + 8) return 1'b0;
    return s[e];
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic garbage [CHAIN];
    logic [15:0] sum_w [WORDS+3], dif_w [WORDS+3];
    int k;

    // ---------------- the mapping ----------------
    foreach (cfgv[r, c]) cfgv[r][c] = '0;   // logic mode, tables 0, switches off
    // adder pipeline
    cfgv[1][0] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_E), 8'h00, T_I1);
    for (int c = 2; c < COLS; c++)
      cfgv[1][c] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_W), 8'h00, T_I2);
    cfgv[1][1] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_CARRY, T_SUM);
    cfgv[2][1] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_N) | xp_of(DIR_W), 8'h00, 8'h00);
    cfgv[2][0] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_W), 8'h00, T_I2);
    cfgv[0][1] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_N), 8'h00, T_S2);
    // subtractor pipeline
    cfgv[4][0] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_E), 8'h00, T_I1);
    for (int c = 2; c < COLS; c++)
      cfgv[4][c] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_W), 8'h00, T_I2);
    cfgv[4][1] = cell_vec(MODE_LOGIC, S2_CARRY, 0, xp_of(DIR_N), T_BORROW, T_SUM);
    cfgv[5][1] = cell_vec(MODE_CONTROL, S2_ZERO, 4'd15, xp_of(DIR_N), 8'h00, 8'h00);
    cfgv[3][1] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_W), 8'h00, T_S2);
    cfgv[3][0] = cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_W), 8'h00, T_I2);
    // memory
    cfgv[0][6] = cell_vec(MODE_MEMORY, S2_ZERO, 4'(MEM_TAP), xp_of(DIR_N), 8'h00, 8'h00);
    // multiplexer
    cfgv[7][1] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_W), 8'h00, T_S2);
    cfgv[7][0] = cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_S) | xp_of(DIR_W), 8'h00, T_MUX);

    // ---------------- stimulus ----------------
    for (int j = 0; j < WORDS + 3; j++) begin
      wa[j] = 16'($urandom); wb[j] = 16'($urandom);
      wc[j] = 16'($urandom); wd[j] = 16'($urandom);
      sum_w[j] = wa[j] + wb[j];
      dif_w[j] = wc[j] - wd[j];
    end
    for (int e = 0; e < EDGES + 8; e++) begin
      mem_s[e] = 1'($urandom); s0[e] = 1'($urandom);
      s1[e] = 1'($urandom);    w7[e] = 1'($urandom);
    end
    for (int j = 2; j <= WORDS; j++) begin
      if (17'(wa[j]) + 17'(wb[j]) >= 17'h10000) n_carry_clear++;
      if (wc[j] < wd[j]) n_borrow_clear++;
    end

    rst = 0; cfg_en = 0; cfg_in = 0;
    n_in = 0; s_in = 0; w_in = 0; e_in = 0;

    // ---------------- configuration ----------------
    foreach (garbage[i]) garbage[i] = 1'($urandom);
    for (int i = 0; i < CHAIN; i++) begin
      @(negedge clk); cfg_en = 1; cfg_in = garbage[i];
    end
    k = 0;
    for (int ci = NCELL - 1; ci >= 0; ci--)
      for (int b = CELL_CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk);
        check(cfg_out, garbage[k], "chain length");
        k++;
        cfg_in = cfgv[ci / COLS][ci % COLS][b];
      end
    @(negedge clk); cfg_en = 0; cfg_in = 0; rst = 1;   // next edge is edge 0

    // ---------------- run ----------------
    // At the negedge before edge K: drive what edge K samples, check what
    // edge K-1 produced.
    for (int K = 1; K <= EDGES; K++) begin
      @(negedge clk);
      rst = 0;
      if (K > 1) begin
        int e;
        e = K - 1;   // outputs now show the result of edge e
        if (K - 3 >= 17 && K - 3 <= 16 * WORDS)
          check(n_out[1], wbit(sum_w, K - 3), $sformatf("sum bit K=%0d", K));
        if (K - 4 >= 17 && K - 4 <= 16 * WORDS)
          check(w_out[3], wbit(dif_w, K - 4), $sformatf("diff bit K=%0d", K));
        if (K - MEM_TAP - 2 >= 1) begin
          check(n_out[6], bitat(mem_s, K - MEM_TAP - 2), $sformatf("mem K=%0d", K));
          if (n_out[6]) n_mem_ones++;
        end
        if (K - 2 >= 1) begin
          logic m;
          m = bitat(s0, e) ? bitat(s1, e - 1) : bitat(w7, e);
          check(s_out[0], m, $sformatf("mux K=%0d", K));
          check(w_out[7], m, $sformatf("mux west K=%0d", K));
          if (bitat(s0, e)) n_mux_sel1++; else n_mux_sel0++;
        end
        if (w_out[2]) begin                     // control pulse of (2,1), one cell later
          n_ctrl_pulse++;
          check((e - 1) % 16, 0, "control pulse phase");
        end
        check(n_out & ~8'h42, 0, "idle north outputs");
        check(s_out & ~8'h01, 0, "idle south outputs");
        check(w_out & ~8'h8C, 0, "idle west outputs");
        check(e_out, 0, "idle east outputs");
      end
      w_in = '0; e_in = '0; n_in = '0; s_in = '0;
      w_in[1] = wbit(wa, K);
      e_in[1] = wbit(wb, K + 5);
      w_in[4] = wbit(wc, K);
      e_in[4] = wbit(wd, K + 5);
      n_in[6] = bitat(mem_s, K);
      s_in[0] = bitat(s0, K);
      s_in[1] = bitat(s1, K);
      w_in[7] = bitat(w7, K);
    end

    $display("mechanisms: carry clears %0d, borrow clears %0d, control pulses %0d, memory ones %0d, mux sel0 %0d sel1 %0d",
             n_carry_clear, n_borrow_clear, n_ctrl_pulse, n_mem_ones, n_mux_sel0, n_mux_sel1);
    check(n_carry_clear > 0, 1, "carry clear exercised");
    check(n_borrow_clear > 0, 1, "borrow clear exercised");
    check(n_ctrl_pulse, EDGES / 16 - ((EDGES % 16) == 0 ? 1 : 0), "control pulse count");
    check(n_mem_ones > 0, 1, "memory exercised");
    check(n_mux_sel0 > 0 && n_mux_sel1 > 0, 1, "mux both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

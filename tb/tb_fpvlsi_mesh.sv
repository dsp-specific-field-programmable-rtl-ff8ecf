// tb_fpvlsi_mesh: checks every neighbour link of the array in all four
// directions, on the default 8 x 8 array and on a non-square 5 x 7 array.
// Each array is configured four times with every cell as the same
// pass-through: west->east (LUT B = I1, east switch), east->west (I2, west
// switch), north->south (s2 = I0, south switch) and south->north (s2 = I3,
// north switch). Random bits driven on one edge must come out of the
// opposite edge after exactly as many clocks as there are cells on the way,
// and every other output must stay 0.
module tb_fpvlsi_mesh;
  import fpv_pkg::*;
  import fpv_tb_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;
  int paths_done = 0;

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One array under test per size; the stimulus task is shared through a
  // generate-free pair of instances with their own signals.
  `define FPV_MESH_DUT(NAME, R, C)                                            \
    logic NAME``_rst = 0, NAME``_cfg_en = 0, NAME``_cfg_in = 0, NAME``_cfg_out; \
    logic [C-1:0] NAME``_n_in = '0, NAME``_n_out, NAME``_s_in = '0, NAME``_s_out; \
    logic [R-1:0] NAME``_w_in = '0, NAME``_w_out, NAME``_e_in = '0, NAME``_e_out; \
    fpvlsi #(.ROWS(R), .COLS(C)) NAME (                                       \
      .clk, .rst(NAME``_rst), .cfg_en(NAME``_cfg_en), .cfg_in(NAME``_cfg_in), \
      .cfg_out(NAME``_cfg_out),                                               \
      .n_in(NAME``_n_in), .n_out(NAME``_n_out), .s_in(NAME``_s_in), .s_out(NAME``_s_out), \
      .w_in(NAME``_w_in), .w_out(NAME``_w_out), .e_in(NAME``_e_in), .e_out(NAME``_e_out));

  `FPV_MESH_DUT(big, 8, 8)
  `FPV_MESH_DUT(odd, 5, 7)

  // dir: 0 west->east, 1 east->west, 2 north->south, 3 south->north
  function automatic cell_vec_t pass_cfg(input int dir);
    case (dir)
      0: return cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_E), 8'h00, T_I1);
      1: return cell_vec(MODE_LOGIC, S2_ZERO, 0, xp_of(DIR_W), 8'h00, T_I2);
      2: return cell_vec(MODE_LOGIC, S2_I0,   0, xp_of(DIR_S), 8'h00, T_S2);
      default: return cell_vec(MODE_LOGIC, S2_I3, 0, xp_of(DIR_N), 8'h00, T_S2);
    endcase
  endfunction

  `define FPV_MESH_RUN(NAME, R, C)                                            \
    for (int dir = 0; dir < 4; dir++) begin                                   \
      cell_vec_t v;                                                           \
      int len, lanes;                                                         \
      logic [15:0] hist [64];                                                 \
      v = pass_cfg(dir);                                                      \
      for (int ci = 0; ci < R * C; ci++)                                      \
        for (int b = CELL_CFG_BITS - 1; b >= 0; b--) begin                    \
          @(negedge clk); NAME``_cfg_en = 1; NAME``_cfg_in = v[b];            \
        end                                                                   \
      @(negedge clk); NAME``_cfg_en = 0; NAME``_rst = 1;                      \
      @(negedge clk); NAME``_rst = 0;                                         \
      len = (dir < 2) ? C : R;                                                \
      lanes = (dir < 2) ? R : C;                                              \
      for (int k = 0; k < 64; k++) begin                                      \
        logic [15:0] x, got; logic [31:0] idle;                                          \
        x = 16'($urandom) & ((16'd1 << lanes) - 16'd1);                       \
        hist[k] = x;                                                          \
        NAME``_w_in = '0; NAME``_e_in = '0; NAME``_n_in = '0; NAME``_s_in = '0; \
        case (dir)                                                            \
          0: NAME``_w_in = x[R-1:0];                                          \
          1: NAME``_e_in = x[R-1:0];                                          \
          2: NAME``_n_in = x[C-1:0];                                          \
          default: NAME``_s_in = x[C-1:0];                                    \
        endcase                                                               \
        @(negedge clk);                                                       \
        case (dir)                                                            \
          0: begin got = 16'(NAME``_e_out); idle = 32'({NAME``_w_out, NAME``_n_out, NAME``_s_out}); end \
          1: begin got = 16'(NAME``_w_out); idle = 32'({NAME``_e_out, NAME``_n_out, NAME``_s_out}); end \
          2: begin got = 16'(NAME``_s_out); idle = 32'({NAME``_w_out, NAME``_e_out, NAME``_n_out}); end \
          default: begin got = 16'(NAME``_n_out); idle = 32'({NAME``_w_out, NAME``_e_out, NAME``_s_out}); end \
        endcase                                                               \
        if (k >= len - 1) begin                                               \
          check(got, hist[k - len + 1], $sformatf("%s dir %0d k %0d", `"NAME`", dir, k)); \
        end                                                                   \
        check(idle, 0, "idle outputs");                                       \
      end                                                                     \
      paths_done++;                                                           \
    end

  initial begin
    `FPV_MESH_RUN(big, 8, 8)
    `FPV_MESH_RUN(odd, 5, 7)
    check(paths_done, 8, "all directions on both arrays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

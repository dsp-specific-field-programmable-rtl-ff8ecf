// tb_fpv_cell: self-checking test of one cell, programmed only through its
// configuration chain.
//  - the 28-bit chain: a random vector shifted in appears at cfg_so 28 clocks
//    later
//  - adder cell: a on the west link, b on the east link, word-termination
//    pulse on the south link, sum on the north link only; random 16-bit words
//    are compared with a + b, and the other three links must stay 0
//  - routing cell: north input passed to the east and south links, one cycle
//    later
module tb_fpv_cell;
  import fpv_pkg::*;
  import fpv_tb_pkg::*;
  logic clk = 0, rst, cfg_en, cfg_si, cfg_so;
  logic [3:0] link_in, link_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpv_cell dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic program_cell(input cell_vec_t v);
    for (int i = CELL_CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_en = 1; cfg_si = v[i];
    end
    @(negedge clk); cfg_en = 0; cfg_si = 0;
    rst = 1;
    @(negedge clk); rst = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_vec_t v;
    logic [15:0] a, b, res;
    logic [3:0] other;
    logic prev;
    rst = 0; cfg_en = 0; cfg_si = 0; link_in = 0;

    // chain pass-through
    v = cell_vec_t'({$urandom, $urandom});
    for (int i = CELL_CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_en = 1; cfg_si = v[i];
    end
    for (int i = CELL_CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_si = 0;
      check(cfg_so, v[i], "cfg_so");
    end
    @(negedge clk); cfg_en = 0;

    // adder cell, output north
    program_cell(cell_vec(MODE_LOGIC, S2_CARRY, 4'd0, xp_of(DIR_N), T_CARRY, T_SUM));
    repeat (16) begin
      a = 16'($urandom); b = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        link_in = '0;
        link_in[DIR_W] = a[i];
        link_in[DIR_E] = b[i];
        link_in[DIR_S] = (i == 15);
        @(posedge clk); #1;
        res[i] = link_out[DIR_N];
        other = link_out & ~xp_of(DIR_N);
        check(other, 4'h0, "switched-off links");
      end
      check(res, 16'(a + b), $sformatf("cell add %04h %04h", a, b));
    end

    // routing cell: north -> east and south
    program_cell(cell_vec(MODE_LOGIC, S2_I0, 4'd0, xp_of(DIR_E) | xp_of(DIR_S), 8'h00, T_S2));
    repeat (40) begin
      @(negedge clk);
      link_in = 4'($urandom);
      @(posedge clk); #1;
      prev = link_in[DIR_N];   // registered by the edge just passed
      check(link_out, {prev, prev, 2'b00}, "route north->east,south");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

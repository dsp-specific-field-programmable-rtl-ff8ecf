// tb_fpv_srlut: self-checking test of the shift-register LUT.
// Loads random truth tables by shifting (first bit in ends in bit 7), checks
// every select value against the table, checks that the table holds while
// shift_en is low, that a parallel load wins over a shift, and that sr_msb
// follows bit 7 during a one-place shift.
module tb_fpv_srlut;
  logic clk = 0;
  logic shift_en, shift_in, load_en, lut_out, sr_msb;
  logic [7:0] load_val;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpv_srlut dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b", what, got, exp);
    end
  endtask

  task automatic shift_table(input logic [7:0] t);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); shift_en = 1; shift_in = t[i];
    end
    @(negedge clk); shift_en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t;
    shift_en = 0; shift_in = 0; load_en = 0; load_val = 0; sel = 0;
    repeat (20) begin
      t = 8'($urandom);
      shift_table(t);
      repeat (3) @(negedge clk);   // must hold
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); #1;
        check(lut_out, t[s], $sformatf("table %02h sel %0d", t, s));
      end
      check(sr_msb, t[7], "sr_msb");
      // one more shift with a 1: everything moves up one place
      @(negedge clk); shift_en = 1; shift_in = 1;
      @(negedge clk); shift_en = 0;
      sel = 3'd0; #1; check(lut_out, 1'b1, "shift in bit0");
      sel = 3'd7; #1; check(lut_out, t[6], "shift moved bit6 to bit7");
    end
    // parallel load over a shift
    @(negedge clk); load_en = 1; load_val = 8'h01; shift_en = 1; shift_in = 1;
    @(negedge clk); load_en = 0; shift_en = 0;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s); #1; check(lut_out, s == 0, "load value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

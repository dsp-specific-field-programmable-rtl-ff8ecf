// tb_fpv_pe: self-checking test of the processing element in all modes.
//  - logic: random 3-input functions of {I0, I2, I1} and {I3, I2, I1}
//  - arithmetic: bit-serial 16-bit add and subtract of random words, LSB
//    first, with the carry (borrow) register cleared by a pulse on I3 during
//    the most significant bit, compared with a + b and a - b
//  - memory: a random bit stream on I0 comes out tap+2 cycles later
//  - control: after reset DOUT pulses once every tap+1 cycles, first after
//    tap+1 edges
//  - configuration: bits shifted in come out of cfg_so 16 clocks later
module tb_fpv_pe;
  import fpv_pkg::*;
  logic clk = 0, rst, cfg_en, cfg_si, cfg_so, dout, qa;
  logic [3:0] pe_in;
  cell_cfg_t cfg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpv_pe dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  // Shift {lut_b, lut_a} into the PE, most significant bit first.
  task automatic load_luts(input logic [7:0] lut_a, input logic [7:0] lut_b);
    logic [15:0] v;
    v = {lut_b, lut_a};
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); cfg_en = 1; cfg_si = v[i];
    end
    @(negedge clk); cfg_en = 0; cfg_si = 0;
  endtask

  task automatic do_reset();
    @(negedge clk); rst = 1;
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
    logic [7:0] ta, tb;
    logic [15:0] a, b, res, exp;
    logic [63:0] stream;
    int tap, n;
    rst = 0; cfg_en = 0; cfg_si = 0; pe_in = 0;
    cfg = '{xp: 4'h0, tap: 4'd0, s2src: S2_I0, mode: MODE_LOGIC};

    // ---- plain 3-input logic, s2 = I0 and s2 = I3 ----
    for (int src = 0; src < 2; src++) begin
      repeat (4) begin
        ta = 8'($urandom); tb = 8'($urandom);
        cfg.s2src = (src == 0) ? S2_I0 : S2_I3;
        load_luts(ta, tb);
        do_reset();
        for (int v = 0; v < 16; v++) begin
          @(negedge clk); pe_in = 4'(v);
          @(negedge clk);
          n = (src == 0) ? {v[0], v[2], v[1]} : {v[3], v[2], v[1]};
          check(dout, tb[n], $sformatf("logic B tbl %02h in %b", tb, pe_in));
          check(qa, ta[n], $sformatf("logic A tbl %02h in %b", ta, pe_in));
        end
      end
    end

    // ---- bit-serial add (A = carry, B = sum) and subtract ----
    for (int op = 0; op < 2; op++) begin
      cfg.s2src = S2_CARRY;
      if (op == 0) load_luts(8'hE8, 8'h96);   // carry = maj, sum = parity
      else         load_luts(8'hD4, 8'h96);   // borrow of a - b - bw, diff = parity
      do_reset();
      repeat (12) begin
        a = 16'($urandom); b = 16'($urandom);
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          pe_in = {(i == 15), b[i], a[i], 1'b0};   // I3 = clear, I2 = b, I1 = a
          @(posedge clk); #1 res[i] = dout;
        end
        exp = (op == 0) ? a + b : a - b;
        check(res, exp, $sformatf("%s %04h %04h", op == 0 ? "add" : "sub", a, b));
      end
      @(negedge clk); pe_in = 0;
    end

    // ---- memory: delay line fed by I0 ----
    foreach (stream[i]) stream[i] = 1'($urandom);
    for (int t = 0; t < 16; t += 5) begin
      cfg = '{xp: 4'h0, tap: 4'(t), s2src: S2_ZERO, mode: MODE_MEMORY};
      load_luts(8'h00, 8'h00);
      do_reset();
      res = 0;
      for (int k = 0; k < 64; k++) begin
        @(negedge clk); pe_in = {3'b000, stream[k]};
        if (k >= t + 2) check(dout, stream[k - t - 2], $sformatf("memory tap %0d k %0d", t, k));
      end
    end

    // ---- control: one-hot counter of length tap+1 ----
    for (tap = 0; tap < 16; tap += 3) begin
      cfg = '{xp: 4'h0, tap: 4'(tap), s2src: S2_ZERO, mode: MODE_CONTROL};
      load_luts(8'($urandom), 8'($urandom));     // counter state is set by reset
      @(negedge clk); rst = 1;
      @(negedge clk); rst = 0;                   // edge 0 was the reset edge
      n = 0;
      for (int k = 1; k <= 4 * (tap + 1); k++) begin
        @(posedge clk); #1;
        check(dout, (k % (tap + 1)) == 0, $sformatf("control tap %0d edge %0d", tap, k));
        if (dout) n++;
      end
      check(n, 4, $sformatf("control pulse count tap %0d", tap));
    end

    // ---- configuration chain passes through in 16 clocks ----
    cfg.mode = MODE_OFF;
    a = 16'($urandom);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); cfg_en = 1; cfg_si = a[i];
    end
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); cfg_si = 0;
      check(cfg_so, a[i], "cfg chain out");
    end
    @(negedge clk); cfg_en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

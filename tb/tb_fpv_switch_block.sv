// tb_fpv_switch_block: exhaustive check of the cell's switch block. For every
// switch setting, PE output and incoming link pattern it checks that each
// outgoing link carries DOUT exactly when its cross-point switch is on, and
// that I0..I3 are the north, west, east and south incoming links.
module tb_fpv_switch_block;
  import fpv_pkg::*;
  logic [3:0] xp, link_in, link_out, pe_in;
  logic dout;
  int checks = 0, failures = 0;

  fpv_switch_block dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int d = 0; d < 2; d++)
        for (int l = 0; l < 16; l++) begin
          xp = 4'(x); dout = 1'(d); link_in = 4'(l);
          #1;
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (link_out[k] !== (x[k] && d[0])) begin
              failures++;
              $display("FAIL link_out[%0d] xp=%b dout=%0d", k, xp, dout);
            end
          end
          checks++;
          if (pe_in !== {link_in[DIR_S], link_in[DIR_E], link_in[DIR_W], link_in[DIR_N]}) begin
            failures++;
            $display("FAIL pe_in %b link_in %b", pe_in, link_in);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fpv_pe: processing element of a cell, built from two shift-register LUTs.
//
// The same two 8-bit LUTs (A and B) give the three functions a bit-serial
// cell needs:
//   MODE_LOGIC   - each LUT is a 3-input function of sel = {s2, I2, I1}.
//                  LUT A's registered output QA is the carry register and can
//                  be fed back as s2 (s2src = S2_CARRY), so A computes carry
//                  and B computes sum: one bit-serial full adder per cell.
//                  In that setting a 1 on I3 clears the carry register on the
//                  next edge (word termination from a control cell).
//                  DOUT <= B(sel), QA <= A(sel).
//   MODE_MEMORY  - A and B form one 16-bit shift register fed by I0, shifting
//                  every cycle; DOUT <= bit tap. I0 reaches DOUT tap+2 cycles
//                  later (tap+1 shifts, then the output register).
//   MODE_CONTROL - the same 16 bits form a one-hot ring of length tap+1:
//                  the tapped bit is fed back to bit 0. Reset puts the 1 in
//                  bit 0; DOUT is then 1 for one cycle every tap+1 cycles,
//                  first after tap+1 edges. It marks the last bit of a word.
//   MODE_OFF     - nothing shifts, DOUT = 0.
// Configuration: while cfg_en is high the two LUTs shift as one chain
// (cfg_si -> A[0..7] -> B[0..7] -> cfg_so) and DOUT/QA are held at 0.
// rst (synchronous, active high) clears DOUT and QA and starts the counter;
// it leaves LUT contents alone in the other modes.
//
// Follows the architecture: two 8-flip-flop LUTs with output multiplexers
// and output registers, full adder as sum LUT plus carry LUT, I0 as memory
// input, one-hot counter by feeding the LUT output back to the serial input,
// and its reset and shift direction. This design's own choices: the select
// wiring {s2, I2, I1} with a configurable s2, I3 as carry clear, chaining
// both LUTs into 16 bits in memory and control modes (16-bit words), and the
// tap field choosing the memory depth and the counter length.
// The PE takes the whole static word but does not read cfg.xp, which belongs
// to the switch block (a lint tool reports those bits unused).
module fpv_pe
  import fpv_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  cell_cfg_t cfg,
  input  logic      cfg_en,
  input  logic      cfg_si,
  output logic      cfg_so,
  input  logic [3:0] pe_in,    // I0..I3
  output logic      dout,
  output logic      qa          // carry register, visible for test
);

  logic a_out, b_out, a_msb, b_msb;
  logic a_shift, b_shift, a_in, b_in, load;
  logic [2:0] sel;
  logic s2, tapped, clr_carry;

  wire logic run_sr = (cfg.mode == MODE_MEMORY) || (cfg.mode == MODE_CONTROL);

  always_comb begin
    unique case (cfg.s2src)
      S2_I0:    s2 = pe_in[0];
      S2_I3:    s2 = pe_in[3];
      S2_CARRY: s2 = qa;
      default:  s2 = 1'b0;
    endcase
    sel       = run_sr ? cfg.tap[2:0] : {s2, pe_in[2], pe_in[1]};
    tapped    = cfg.tap[3] ? b_out : a_out;
    load      = rst && !cfg_en && (cfg.mode == MODE_CONTROL);
    a_shift   = cfg_en || run_sr;
    b_shift   = cfg_en || run_sr;
    if (cfg_en)                          a_in = cfg_si;
    else if (cfg.mode == MODE_MEMORY)    a_in = pe_in[0];
    else                                 a_in = tapped;
    b_in      = a_msb;
    clr_carry = (cfg.s2src == S2_CARRY) && pe_in[3];
  end

  fpv_srlut #(.N(8)) u_lut_a (
    .clk, .shift_en(a_shift), .shift_in(a_in),
    .load_en(load), .load_val(8'h01),
    .sel, .lut_out(a_out), .sr_msb(a_msb)
  );

  fpv_srlut #(.N(8)) u_lut_b (
    .clk, .shift_en(b_shift), .shift_in(b_in),
    .load_en(load), .load_val(8'h00),
    .sel, .lut_out(b_out), .sr_msb(b_msb)
  );

  assign cfg_so = b_msb;

  always_ff @(posedge clk) begin
    if (rst || cfg_en) begin
      dout <= 1'b0;
      qa   <= 1'b0;
    end else begin
      unique case (cfg.mode)
        MODE_LOGIC: begin
          dout <= b_out;
          qa   <= clr_carry ? 1'b0 : a_out;
        end
        MODE_MEMORY, MODE_CONTROL: begin
          dout <= tapped;
          qa   <= 1'b0;
        end
        default: begin
          dout <= 1'b0;
          qa   <= 1'b0;
        end
      endcase
    end
  end

endmodule

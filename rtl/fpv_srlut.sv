// fpv_srlut: shift-register-based 3-input lookup table.
//
// Eight D flip-flops form a shift register; an 8:1 multiplexer driven by the
// three select inputs reads one of them. Holding the register makes the block
// an arbitrary 3-input logic function (bit i of the register is the output
// for select value i). Shifting it every cycle makes it a serial memory or,
// with the output fed back to the serial input, a one-hot counter. Those uses
// are built in fpv_pe; this block is only the register and its multiplexer.
//
// Interface: when shift_en is high, on the rising clock edge every bit moves
// one place toward the greatest index and shift_in enters bit 0; sr_msb is
// bit 7, for chaining LUTs. lut_out = sr[sel] is combinational. load_en
// writes load_val in parallel (used to start the one-hot counter at reset);
// otherwise the contents are configuration or data loaded by shifting.
// Eight flip-flops and the output multiplexer follow the architecture; the
// shift direction is the one given for the one-hot counter.
module fpv_srlut #(
  parameter int unsigned N = 8            // flip-flops per LUT (3 select bits)
) (
  input  logic                   clk,
  input  logic                   shift_en,
  input  logic                   shift_in,
  input  logic                   load_en,   // synchronous parallel load, wins over shift
  input  logic [N-1:0]           load_val,
  input  logic [$clog2(N)-1:0]   sel,
  output logic                   lut_out,
  output logic                   sr_msb
);

  logic [N-1:0] sr;

  always_ff @(posedge clk) begin
    if (load_en)       sr <= load_val;
    else if (shift_en) sr <= {sr[N-2:0], shift_in};
  end

  assign lut_out = sr[sel];
  assign sr_msb  = sr[N-1];

endmodule

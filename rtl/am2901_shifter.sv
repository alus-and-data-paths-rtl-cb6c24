// am2901_shifter - the RAM shifter and the Q shifter of the 4-bit ALU slice.
//
// Combinational. In SH_PASS the word goes through unchanged. In SH_DOWN
// (divide by 2) every bit moves one place towards the least significant end;
// the most significant bit comes in on msb_i and the bit that falls off the
// bottom leaves on lsb_o. In SH_UP (multiply by 2) the word moves towards the
// most significant end; the new least significant bit comes in on lsb_i and
// the old top bit leaves on msb_o. In the figures bit 0 is the most
// significant bit, so msb_* are the pins printed RAM0/Q0 and lsb_* the pins
// printed RAM3/Q3. Those pins are bidirectional in the original part; here
// each is split into an input and an always-driven output, and a chain of
// slices wires outputs to inputs in both directions.
module am2901_shifter
  import am2901_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] d,
  input  shift_t           mode,
  input  logic             msb_i,
  input  logic             lsb_i,
  output logic [WIDTH-1:0] y,
  output logic             msb_o,
  output logic             lsb_o
);

  always_comb begin
    unique case (mode)
      SH_DOWN: y = {msb_i, d[WIDTH-1:1]};
      SH_UP:   y = {d[WIDTH-2:0], lsb_i};
      default: y = d;
    endcase
  end

  assign msb_o = d[WIDTH-1];
  assign lsb_o = d[0];

endmodule

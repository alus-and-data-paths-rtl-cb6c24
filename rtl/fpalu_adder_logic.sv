// fpalu_adder_logic - the parallel adder and logic circuits of the
// accumulator ALU.
//
// Combinational. Adds or subtracts the two WIDTH-bit inputs or forms their
// bitwise AND, OR, XOR, or the complement of a. Beside the result y it gives
// the carry (for subtraction: the borrow) out of the top bit, two's
// complement overflow for the arithmetic functions, and the zero and sign of
// y. The lecture notes give only the block's name and its register transfers;
// this is the simplest circuit that performs them.
module fpalu_adder_logic
  import fpalu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  al_fn_t           fn,
  output logic [WIDTH-1:0] y,
  output logic             carry,
  output logic             ovf,
  output logic             zero,
  output logic             neg
);

  logic [WIDTH:0] wide;

  always_comb begin
    wide  = '0;
    ovf   = 1'b0;
    unique case (fn)
      AL_ADD: begin
        wide = {1'b0, a} + {1'b0, b};
        ovf  = (a[WIDTH-1] == b[WIDTH-1]) && (wide[WIDTH-1] != a[WIDTH-1]);
      end
      AL_SUB: begin
        wide = {1'b0, a} - {1'b0, b};
        ovf  = (a[WIDTH-1] != b[WIDTH-1]) && (wide[WIDTH-1] != a[WIDTH-1]);
      end
      AL_AND:  wide[WIDTH-1:0] = a & b;
      AL_OR:   wide[WIDTH-1:0] = a | b;
      AL_XOR:  wide[WIDTH-1:0] = a ^ b;
      AL_NOT:  wide[WIDTH-1:0] = ~a;
      default: wide = '0;
    endcase
  end

  assign y     = wide[WIDTH-1:0];
  assign carry = wide[WIDTH];
  assign zero  = (y == '0);
  assign neg   = y[WIDTH-1];

endmodule

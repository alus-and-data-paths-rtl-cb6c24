// gfu_carry_cell - one stage of the ripple carry chain of the generic ALU.
//
// Combinational: c_next = p c + p' k'. With the propagate and kill codes set
// for addition (P = A xor B, K = A' B') this is the full-adder carry; with
// the codes for subtraction (P = A xnor B, K = A B') it is the borrow. With
// P = A and K = A' (increment) it reduces to A c.
module gfu_carry_cell (
  input  logic p,
  input  logic k,
  input  logic c,
  output logic c_next
);

  assign c_next = (p & c) | (~p & ~k);

endmodule

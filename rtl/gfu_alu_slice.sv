// gfu_alu_slice - one bit of the generic-function-unit ALU.
//
// Three generic function units and a carry cell: the propagate block forms
// P = fP(a,b) under code p_code, the kill block forms K = fK(a,b) under
// k_code, the carry cell forms c_next = P c + P' K', and the results
// generator forms the result r = fR(P,c) under r_code. Logic functions use
// only the propagate block (r_code = 12 passes P); arithmetic uses all
// four parts. Combinational.
module gfu_alu_slice (
  input  logic [3:0] p_code,
  input  logic [3:0] k_code,
  input  logic [3:0] r_code,
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       r,
  output logic       c_next
);

  logic p, k;

  gfu            u_prop  (.g(p_code), .a(a), .b(b), .y(p));
  gfu            u_kill  (.g(k_code), .a(a), .b(b), .y(k));
  gfu_carry_cell u_carry (.p(p), .k(k), .c(c), .c_next(c_next));
  gfu            u_res   (.g(r_code), .a(p), .b(c), .y(r));

endmodule

// gfu_alu - multibit ALU built from generic-function-unit slices.
//
// WIDTH identical slices share the three 4-bit function codes (propagate P,
// kill K, result R); the carry ripples from bit 0 (c_in) to the top
// (c_out). Useful code sets {P, K, R, c_in}:
//   A            {12, -, 12, -}     A and B   { 8, -, 12, -}
//   A or B       {14, -, 12, -}     any logic {G, -, 12, -}
//   A + B + Cin  { 6, 1,  6, Cin}   A + B     { 6, 1,  6, 0}
//   A + 1        {12, 3,  6, 1}     A - B     { 9, 4,  9, 0 or borrow in}
// For subtraction c_in is a borrow in and c_out a borrow out. The code
// table and slice structure follow the lecture notes; the width is this
// design's choice (eight slices, as drawn). Combinational, carry-ripple delay.
module gfu_alu #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [3:0]       p_code,
  input  logic [3:0]       k_code,
  input  logic [3:0]       r_code,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] r,
  output logic             c_out
);

  logic [WIDTH:0] c;

  assign c[0] = c_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gfu_alu_slice u_slice (
      .p_code, .k_code, .r_code,
      .a(a[i]), .b(b[i]), .c(c[i]),
      .r(r[i]), .c_next(c[i+1])
    );
  end

  assign c_out = c[WIDTH];

endmodule

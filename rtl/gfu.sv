// gfu - generic function unit: any Boolean function of two inputs.
//
// A 4-to-1 multiplexer whose select inputs are the data bits a and b and
// whose data inputs are the four function-code bits G0..G3. The output is
// G0 for a=0,b=0, G1 for a=0,b=1, G2 for a=1,b=0 and G3 for a=1,b=1, so the
// 4-bit code g = {G3,G2,G1,G0} is the function's truth table: 8 gives AND,
// 14 OR, 6 XOR, 12 passes a, 10 passes b, 0 and 15 give constants.
// Combinational. (A pass-gate version needs 16 transistors; this is the
// logic function only.)
module gfu (
  input  logic [3:0] g,
  input  logic       a,
  input  logic       b,
  output logic       y
);

  assign y = g[{a, b}];

endmodule

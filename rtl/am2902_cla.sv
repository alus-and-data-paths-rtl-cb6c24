// am2902_cla - carry-lookahead generator for an array of four ALU slices.
//
// Combinational. From the array's carry in c_n and the active-low generate
// and propagate outputs of the three lower slices it forms the carries into
// slices 1, 2 and 3 at once, instead of letting them ripple through the
// slices:
//   c_x = g0 | p0 c_n
//   c_y = g1 | p1 g0 | p1 p0 c_n
//   c_z = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c_n
// The lecture notes name the generator and show its connections; the
// equations are the standard lookahead ones. Group generate/propagate
// outputs for a second lookahead level are not part of this design.
module am2902_cla (
  input  logic       c_n,
  input  logic [2:0] g_n,
  input  logic [2:0] p_n,
  output logic       c_x,
  output logic       c_y,
  output logic       c_z
);

  logic [2:0] g, p;

  assign g = ~g_n;
  assign p = ~p_n;

  assign c_x = g[0] | (p[0] & c_n);
  assign c_y = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c_n);
  assign c_z = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c_n);

endmodule

// bitslice_alu16 - a 16-bit ALU built from four 4-bit ALU slices.
//
// All four slices receive the same instruction and the same register
// addresses, so together they act as one 16-bit machine with a 16 x 16
// register set and a 16-bit Q register. Slice 0 holds the least significant
// nibble. With LOOKAHEAD = 1 the carries into slices 1..3 come from a
// carry-lookahead generator fed by the slices' generate/propagate outputs;
// with LOOKAHEAD = 0 they ripple from slice to slice. The shift pins of
// neighbouring slices are wired so that F/2 and Q/2 move bits down across
// the whole word and 2F and 2Q move them up; the pins at the two ends of the
// word are brought out. Sign, overflow and carry out come from the top
// slice; the array is zero when every slice is zero. The top slice's
// generate/propagate are brought out for a further level of lookahead.
// Timing: combinational to Y and the flags, registers written on the rising
// edge of clk.
module bitslice_alu16
  import am2901_pkg::*;
#(
  parameter bit LOOKAHEAD = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  instr_t      instr,
  input  logic [3:0]  a_addr,
  input  logic [3:0]  b_addr,
  input  logic [15:0] d,
  input  logic        c_in,
  input  logic        ram0_i,   // enters bit 15 on F/2
  input  logic        ram3_i,   // enters bit 0 on 2F
  input  logic        q0_i,     // enters bit 15 of Q on Q/2
  input  logic        q3_i,     // enters bit 0 of Q on 2Q
  output logic        ram0_o,   // bit 15 of F, leaves on 2F
  output logic        ram3_o,   // bit 0 of F, leaves on F/2
  output logic        q0_o,
  output logic        q3_o,
  output logic [15:0] y,
  output logic        c_out,
  output logic        g_n,
  output logic        p_n,
  output logic        f0,
  output logic        ovr,
  output logic        z
);

  localparam int unsigned NS = 4;

  logic [NS-1:0] cin_s, cout_s, gn_s, pn_s, f0_s, ovr_s, z_s;
  logic [NS-1:0] r0i, r3i, r0o, r3o, q0i, q3i, q0o, q3o;
  logic          c_x, c_y, c_z;

  for (genvar k = 0; k < NS; k++) begin : g_slice
    am2901_slice u_slice (
      .clk, .rst_n, .instr, .a_addr, .b_addr,
      .d(d[4*k +: 4]), .c_in(cin_s[k]),
      .ram0_i(r0i[k]), .ram3_i(r3i[k]), .q0_i(q0i[k]), .q3_i(q3i[k]),
      .ram0_o(r0o[k]), .ram3_o(r3o[k]), .q0_o(q0o[k]), .q3_o(q3o[k]),
      .y(y[4*k +: 4]), .c_out(cout_s[k]), .g_n(gn_s[k]), .p_n(pn_s[k]),
      .f0(f0_s[k]), .ovr(ovr_s[k]), .z(z_s[k])
    );
  end

  // shift links: a slice's top input comes from the bottom output of the
  // slice above it; its bottom input from the top output of the slice below
  always_comb begin
    for (int k = 0; k < NS; k++) begin
      r0i[k] = (k == NS-1) ? ram0_i : r3o[(k+1) % NS];
      q0i[k] = (k == NS-1) ? q0_i   : q3o[(k+1) % NS];
      r3i[k] = (k == 0)    ? ram3_i : r0o[(k+NS-1) % NS];
      q3i[k] = (k == 0)    ? q3_i   : q0o[(k+NS-1) % NS];
    end
  end
  assign ram0_o = r0o[NS-1];
  assign q0_o   = q0o[NS-1];
  assign ram3_o = r3o[0];
  assign q3_o   = q3o[0];

  // carries
  am2902_cla u_cla (
    .c_n(c_in), .g_n(gn_s[2:0]), .p_n(pn_s[2:0]),
    .c_x, .c_y, .c_z
  );

  always_comb begin
    cin_s[0] = c_in;
    if (LOOKAHEAD) cin_s[3:1] = {c_z, c_y, c_x};
    else           cin_s[3:1] = cout_s[2:0];
  end

  assign c_out = cout_s[NS-1];
  assign g_n   = gn_s[NS-1];
  assign p_n   = pn_s[NS-1];
  assign f0    = f0_s[NS-1];
  assign ovr   = ovr_s[NS-1];
  assign z     = &z_s;

endmodule

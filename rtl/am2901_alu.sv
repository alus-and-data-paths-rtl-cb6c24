// am2901_alu - the 4-bit arithmetic-logic circuit of the ALU slice.
//
// Combinational. It applies one of eight functions to the R and S operands:
// R+S+Cin, S-R-Cin, R-S-Cin, OR, AND, (NOT R) AND S, XOR and XNOR (R XOR NOT
// S). In the two subtractions c_in is a borrow in and c_out a borrow out, as
// the function table states, so a chain of slices passes borrows in the same
// way an addition passes carries.
//
// For the carry-lookahead generator the slice also reports active-low
// generate and propagate signals, defined so that c_out = g | (p & c_in) in
// whichever sense (carry or borrow) the function uses: g is the carry/borrow
// out with c_in = 0, and p says that c_in would pass through to c_out. The
// logic functions produce no carry: g = p = c_out = 0 and OVR = 0 (this
// design's choice; the lecture notes do not define them). OVR is two's
// complement overflow of the arithmetic result, f0 is the sign bit (the most
// significant bit, printed F0) and z is high when F is zero.
module am2901_alu
  import am2901_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] s,
  input  fn_t              fn,
  input  logic             c_in,
  output logic [WIDTH-1:0] f,
  output logic             c_out,
  output logic             g_n,
  output logic             p_n,
  output logic             f0,
  output logic             ovr,
  output logic             z
);

  localparam int unsigned W1 = WIDTH + 1;

  logic [W1-1:0] res0, res1;   // {carry-or-borrow, result} for c_in = 0 / 1
  logic          arith;
  logic          g, p;
  logic signed [W1:0] sres;    // exact signed result, for overflow

  // x + w + ci, or x - w - ci, with the carry or borrow in the top bit
  function automatic logic [W1-1:0] addsub(input logic [WIDTH-1:0] x,
                                           input logic [WIDTH-1:0] w,
                                           input logic sub, input logic ci);
    if (sub) return {1'b0, x} - {1'b0, w} - W1'(ci);
    else     return {1'b0, x} + {1'b0, w} + W1'(ci);
  endfunction

  always_comb begin
    arith = 1'b1;
    res0  = '0;
    res1  = '0;
    sres  = '0;
    unique case (fn)
      FN_ADD: begin
        res0 = addsub(r, s, 1'b0, 1'b0);
        res1 = addsub(r, s, 1'b0, 1'b1);
        sres = $signed({r[WIDTH-1], r}) + $signed({s[WIDTH-1], s}) + $signed({{WIDTH{1'b0}}, c_in});
      end
      FN_SUBR: begin
        res0 = addsub(s, r, 1'b1, 1'b0);
        res1 = addsub(s, r, 1'b1, 1'b1);
        sres = $signed({s[WIDTH-1], s}) - $signed({r[WIDTH-1], r}) - $signed({{WIDTH{1'b0}}, c_in});
      end
      FN_SUBS: begin
        res0 = addsub(r, s, 1'b1, 1'b0);
        res1 = addsub(r, s, 1'b1, 1'b1);
        sres = $signed({r[WIDTH-1], r}) - $signed({s[WIDTH-1], s}) - $signed({{WIDTH{1'b0}}, c_in});
      end
      FN_OR:    begin arith = 1'b0; res0[WIDTH-1:0] = r | s;   end
      FN_AND:   begin arith = 1'b0; res0[WIDTH-1:0] = r & s;   end
      FN_NOTRS: begin arith = 1'b0; res0[WIDTH-1:0] = ~r & s;  end
      FN_EXOR:  begin arith = 1'b0; res0[WIDTH-1:0] = r ^ s;   end
      FN_EXNOR: begin arith = 1'b0; res0[WIDTH-1:0] = r ^ ~s;  end
    endcase
    res1[WIDTH-1:0] = arith ? res1[WIDTH-1:0] : res0[WIDTH-1:0];
  end

  assign g     = arith & res0[WIDTH];
  assign p     = arith & res1[WIDTH] & ~res0[WIDTH];
  assign c_out = g | (p & c_in);
  assign f     = c_in ? res1[WIDTH-1:0] : res0[WIDTH-1:0];
  assign g_n   = ~g;
  assign p_n   = ~p;
  assign f0    = f[WIDTH-1];
  assign z     = (f == '0);
  assign ovr   = arith & ((sres > $signed((W1+1)'(2**(WIDTH-1) - 1))) ||
                          (sres < -$signed((W1+1)'(2**(WIDTH-1)))));

endmodule

// au_ref.svh - reference results of the arithmetic-unit functions, shared by
// the arithmetic-unit and split-ALU testbenches. Computes with integers:
// result, carry (adding functions) or borrow (subtracting functions), and
// signed overflow.
function automatic void au_ref(input int f, input logic [7:0] a, input logic [7:0] b,
                               input logic ci, output logic [7:0] y, output logic c,
                               output logic v);
  int t, st, sa, sb;
  bit sub;
  sa = a[7] ? int'(a) - 256 : int'(a);
  sb = b[7] ? int'(b) - 256 : int'(b);
  sub = 1;
  case (f)
    0:  begin t = int'(a) + int'(b);            st = sa + sb;             sub = 0; end
    1:  begin t = int'(a) + int'(b) + int'(ci); st = sa + sb + int'(ci);  sub = 0; end
    2:  begin t = int'(a) - int'(b);            st = sa - sb;             end
    3:  begin t = int'(a) - int'(b) - int'(ci); st = sa - sb - int'(ci);  end
    4:  begin t = int'(b) - int'(a);            st = sb - sa;             end
    5:  begin t = int'(b) - int'(a) - int'(ci); st = sb - sa - int'(ci);  end
    6:  begin t = -int'(a);                     st = -sa;                 end
    7:  begin t = -int'(b);                     st = -sb;                 end
    8:  begin t = int'(a) + 1;                  st = sa + 1;              sub = 0; end
    9:  begin t = int'(b) + 1;                  st = sb + 1;              sub = 0; end
    10: begin t = int'(a) - 1;                  st = sa - 1;              end
    11: begin t = int'(b) - 1;                  st = sb - 1;              end
    default: begin t = 0; st = 0; sub = 0; end
  endcase
  y = 8'(t);
  c = sub ? (t < 0) : (t > 255);
  v = st > 127 || st < -128;
endfunction

// rb_adder_digit: one digit of a carry-propagation-free redundant binary
// adder, z = x + y + carry in, in two steps.
//
// Step 1 splits x_i + y_i = 2*k_i + s_i. The transfer k_i is chosen from the
// digit pair and from t_{i-1}, which says whether the lower position's
// transfer lies in {0,1} (neither of its digits is -1) or in {-1,0}: for an odd
// sum (+-1) the split is made so that step 2, z_i = s_i + k_{i-1}, can never
// reach +-2. The transfer only ever goes one position up.
//
// The transfer is carried on one wire c_i together with the flag
// tn_i = not t_i:  k_i = c_i - tn_i. With that choice the sum digit's plus
// bit is just the incoming c_{i-1}, and its minus bit is the parity of the
// four input bits compared with tn_{i-1}:
//   tn_i  = ~((x^- | x^+) & (y^- | y^+))
//   c_i   = odd ? ~tn_{i-1} : (x^- x^+) | (y^- y^+)
//   z_i^- = ~(odd ^ tn_{i-1}),   z_i^+ = c_{i-1}
// where odd is the XOR of the four input bits. The port set (x, y, tn and c
// in from below, tn and c out, z^+ wired straight from c_{i-1}) matches the
// design's adder schematic; the equations are derived here from the two-step
// rule and checked exhaustively.
//
// Combinational.
module rb_adder_digit
  import cmac_pkg::*;
(
  input  bsd_t x,
  input  bsd_t y,
  input  logic tn_lo,  // tn_{i-1}
  input  logic c_lo,   // c_{i-1}
  output logic tn,     // tn_i
  output logic c,      // c_i
  output bsd_t z
);

  logic odd;

  always_comb begin
    odd = x.n ^ x.p ^ y.n ^ y.p;
    tn  = ~((x.n | x.p) & (y.n | y.p));
    c   = odd ? ~tn_lo : ((x.n & x.p) | (y.n & y.p));
    z.n = ~(odd ^ tn_lo);
    z.p = c_lo;
  end

endmodule

// bsd_recoder_cell: one radix-4 position of the BSD recoder.
//
// A radix-4 digit formed from a pair of BSD digits (x_{2k+1}, x_{2k}) could be
// +-3. The recoder first adds two constants whose sum is zero to the RB
// number: F = ...0(-1)0(-1) and then G = ...0101, each with a two-step,
// carry-free RB addition. After the first addition every even digit w_2k is
// in {-1,0}; after the second every even digit y_2k is in {0,1}, and
// y_{2k+1} = 1 forces y_2k = 0. The pair value sigma_k = 2*y_{2k+1} + y_2k
// therefore lies in {-2..2}, the same digit set as Booth recoding.
//
// Both filtering additions collapse into a few gates per position. With
// r_i = x_i^- ^ x_i^+ (digit i is zero) and rn_i its complement:
//   p_{2k+1} = (x_2k != -1)(x_{2k-1} != -1) + (x_2k == +1)
//              (the first-step carry out of position 2k is 0, not -1)
//   q_{2k+1} = r_2k (x_{2k-1} == -1) + ~r_2k (x_{2k-1} == +1)
//   y_2k^+     = (r_2k ^ (x_{2k-1}^- + x_{2k-1}^+)) ^ (rn_{2k-1} p_{2k-1})
//   y_{2k+1}^- = rn_{2k+1} ^ p_{2k+1}
//   y_{2k+1}^+ = p_{2k-1} q_{2k+1}
// (y_2k^- is the constant 1.) The cell inputs the three digits 2k+1, 2k and
// 2k-1, six bits, plus p_{2k-1} and rn_{2k-1} from the cell below, and
// drives p_{2k+1} and rn_{2k+1} to the cell above, as in the design's recoder
// schematic. The p, q and output equations follow the design; the exact
// complement placement of y_2k^+ and y_{2k+1}^- was fixed here by deriving
// both filtering steps digit by digit and is checked exhaustively.
//
// The five one-hot outputs decode sigma from (y_{2k+1}, y_2k).
// Purely combinational.
module bsd_recoder_cell
  import cmac_pkg::*;
(
  input  bsd_t x_hi,    // x_{2k+1}
  input  bsd_t x_mid,   // x_{2k}
  input  bsd_t x_lo,    // x_{2k-1}
  input  logic p_lo,    // p_{2k-1}  from the cell below
  input  logic rn_lo,   // rn_{2k-1} from the cell below
  output logic p_hi,    // p_{2k+1}  to the cell above
  output logic rn_hi,   // rn_{2k+1} to the cell above
  output bsd_t y_hi,    // filtered digit y_{2k+1}
  output bsd_t y_mid,   // filtered digit y_{2k}, always 0 or +1
  output r4_t  sigma    // radix-4 digit, one-hot
);

  logic r_mid, nz_lo, q_hi;

  always_comb begin
    r_mid = x_mid.n ^ x_mid.p;
    rn_hi = ~(x_hi.n ^ x_hi.p);
    nz_lo = x_lo.n | x_lo.p;
    p_hi  = ((x_mid.n | x_mid.p) & nz_lo) | (x_mid.n & x_mid.p);
    q_hi  = (r_mid & ~x_lo.n & ~x_lo.p) | (~r_mid & x_lo.n & x_lo.p);

    y_mid.n = 1'b1;
    y_mid.p = (r_mid ^ nz_lo) ^ (rn_lo & p_lo);
    y_hi.n  = rn_hi ^ p_hi;
    y_hi.p  = p_lo & q_hi;

    sigma.z  = ~y_mid.p & (y_hi.n ^ y_hi.p);
    sigma.p1 =  y_mid.p & (y_hi.n ^ y_hi.p);
    sigma.m1 =  y_mid.p & ~(y_hi.n | y_hi.p);
    sigma.p2 =  y_hi.n & y_hi.p;
    sigma.m2 = ~y_mid.p & ~(y_hi.n | y_hi.p);
  end

endmodule

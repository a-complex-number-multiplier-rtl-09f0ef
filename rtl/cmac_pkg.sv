// cmac_pkg: types and constants shared by the redundant binary (RB) complex
// multiplier-accumulator.
//
// Binary signed digits (BSD) are held in two coding bits, a "minus" bit n and
// a "plus" bit p. The digit's value is n + p - 1, so 00 is -1, 01 and 10 are
// both 0, and 11 is +1. This coding is the one the design is built around:
// two ordinary binary words placed side by side (one in the n bits, one in
// the p bits) already form an RB number, which is what makes the
// pre-multiplication sums and the partial-product pairing nearly free.
//
// A radix-4 multiplier digit in {-2,-1,0,1,2} travels as five one-hot lines,
// the "unencoded" form the recoder produces and the Booth decoders consume.
// The operation codes and the digit helpers are this design's own choices.
package cmac_pkg;

  // One binary signed digit: value = n + p - 1.
  typedef struct packed {
    logic n;  // minus coding bit
    logic p;  // plus coding bit
  } bsd_t;

  // One-hot radix-4 digit.
  typedef struct packed {
    logic m2;  // -2
    logic m1;  // -1
    logic z;   //  0
    logic p1;  // +1
    logic p2;  // +2
  } r4_t;

  // Operation of one issue slot of the multiplier-accumulator.
  typedef enum logic [1:0] {
    OP_MUL = 2'd0,  // direct multiplication: accumulator <= product
    OP_MAC = 2'd1,  // multiply-accumulate:   accumulator <= accumulator + product
    OP_ADD = 2'd2   // complex addition through the converter/adder: R = A + C, I = B + D
  } op_e;

  localparam bsd_t BSD_ZERO = '{n: 1'b0, p: 1'b1};  // 0 coded as 01
  localparam bsd_t BSD_NEG  = '{n: 1'b0, p: 1'b0};  // -1

  // Integer value of a digit (for assertions and testbenches).
  function automatic int bsd_val(bsd_t d);
    return int'(d.n) + int'(d.p) - 1;
  endfunction

  // Integer value of a one-hot radix-4 digit.
  function automatic int r4_val(r4_t s);
    return s.z ? 0 : s.p1 ? 1 : s.p2 ? 2 : s.m1 ? -1 : s.m2 ? -2 : 0;
  endfunction

endpackage

// rb_coder: redundant binary coder. Forms the sum A + B (SUB = 0) or the
// difference A - B (SUB = 1) of two N-bit two's complement numbers as an
// N-digit RB number plus a correction digit g of weight 2^0, with no carry
// logic at all: only inverters.
//
// Digit i below the sign position takes a_i as its minus bit and b_i (or ~b_i
// for a difference) as its plus bit. At the sign position both bits are
// inverted for a sum, and only a is inverted for a difference, which turns the
// negative weight of the sign bits into a digit of the right value. The
// coding leaves a constant bias of -1 in a sum, which comes out as g = -1
// (coded 00); a difference needs none and gets g = 0 (coded 01). The digit
// assignments and the g column follow the coder table of the design; the
// correction digit is handed on to the BSD recoder, which takes it in as the
// digit just below position 0.
//
// Interface: a, b in; d[N-1:0], g out. Purely combinational.
module rb_coder
  import cmac_pkg::*;
#(
  parameter int unsigned N   = 16,   // operand width (16 in the 16x16 MAC)
  parameter bit          SUB = 1'b0  // 0: A + B, 1: A - B
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output bsd_t [N-1:0] d,
  output bsd_t         g
);

  always_comb begin
    for (int i = 0; i < N - 1; i++) begin
      d[i].n = a[i];
      d[i].p = SUB ? ~b[i] : b[i];
    end
    d[N-1].n = ~a[N-1];
    d[N-1].p = SUB ? b[N-1] : ~b[N-1];
    g        = SUB ? BSD_ZERO : BSD_NEG;
  end

endmodule

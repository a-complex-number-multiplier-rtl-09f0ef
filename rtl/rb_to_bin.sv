// rb_to_bin: RB-to-binary converter / adder.
//
// With digit value n + p - 1, a W-digit RB number X has
//   X = Nbits + Pbits - (2^W - 1) = Nbits + Pbits + 1   (mod 2^W),
// so one W-bit carry-propagate adder with carry-in 1 converts it to two's
// complement. With carry-in 0 the same adder is a plain binary adder of the
// two words held in the minus and plus bits, which is how the multiplier-
// accumulator's "converter / adder" also serves binary additions. The single
// W = 41 bit adder is the document's; the carry-in trick is this design's
// way of sharing it. Combinational.
module rb_to_bin
  import cmac_pkg::*;
#(
  parameter int unsigned W = 41
) (
  input  bsd_t [W-1:0] x,     // RB number, or two binary words in n / p
  input  logic         cin,   // 1: convert RB, 0: add the two words
  output logic [W-1:0] y
);

  logic [W-1:0] nb, pb;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      nb[i] = x[i].n;
      pb[i] = x[i].p;
    end
    y = nb + pb + W'(cin);
  end

endmodule

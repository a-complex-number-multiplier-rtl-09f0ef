// rba: W-digit redundant binary adder, z = x + y modulo 2^W.
//
// A row of W rb_adder_digit cells. Each cell's transfer reaches only the next
// cell, so the delay does not depend on W. The transfer into digit 0 is zero
// (tn = 0, c = 0). The transfer out of the top digit is dropped, which keeps
// the value modulo 2^W; every RB adder in the multiplier-accumulator works
// modulo 2^W and the final converter reads its result modulo 2^W, so the
// binary result is exact whenever it fits in W bits. Dropping the top
// transfer is this design's choice; the document does not discuss it.
//
// Used for the 1st to 4th tree levels and for the accumulation adder.
// Interface: x, y in; z out. Combinational.
module rba
  import cmac_pkg::*;
#(
  parameter int unsigned W = 41  // digits (the 41-bit accumulator width)
) (
  input  bsd_t [W-1:0] x,
  input  bsd_t [W-1:0] y,
  output bsd_t [W-1:0] z
);

  logic [W:0] tn_c;
  logic [W:0] c_c;

  assign tn_c[0] = 1'b0;
  assign c_c[0]  = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_dig
    rb_adder_digit u_dig (
      .x    (x[i]),
      .y    (y[i]),
      .tn_lo(tn_c[i]),
      .c_lo (c_c[i]),
      .tn   (tn_c[i+1]),
      .c    (c_c[i+1]),
      .z    (z[i])
    );
  end

endmodule

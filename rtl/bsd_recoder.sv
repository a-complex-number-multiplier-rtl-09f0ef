// bsd_recoder: turns an N-digit redundant binary number X plus its correction
// digit g (weight 2^0, from the RB coder) into ND = N/2 + 1 radix-4 digits
// sigma_k in {-2..2} with  sum_k sigma_k 4^k = X + g.
//
// It is a chain of ND bsd_recoder_cell instances; cell k handles digits 2k+1
// and 2k. Each cell also looks at digit 2k-1 and takes p and rn from the cell
// below, so the chain is two gate levels deep between neighbours and never
// ripples further. Digits at and above position N read as zero, which is why
// a 16-digit operand gives 9 radix-4 digits: the filtering can move weight
// one position up.
//
// The correction digit g enters as the digit below position 0: in the first
// filtering step a -1 carry into position 0 is exactly what a -1 digit at
// position -1 produces, and p_{-1} is tied to 0 so that no carry reaches
// position 0 in the second step. This way of folding g in is this design's
// own reading of "integrated with the following BSD recoder".
//
// Interface: x[N-1:0], g in; sigma[ND-1:0] one-hot out. Combinational.
// N must be even.
module bsd_recoder
  import cmac_pkg::*;
#(
  parameter int unsigned N  = 16,          // digits of the RB operand
  parameter int unsigned ND = N / 2 + 1    // radix-4 digits out
) (
  input  bsd_t [N-1:0]  x,
  input  bsd_t          g,
  output r4_t  [ND-1:0] sigma
);

  if (N % 2 != 0) begin : g_bad_n
    $error("bsd_recoder: N must be even");
  end

  bsd_t [2*ND-1:0] xe;     // operand extended with zero digits
  logic [ND-1:0]   p_c;    // p_{2k+1}
  logic [ND-1:0]   rn_c;   // rn_{2k+1}

  always_comb begin
    for (int i = 0; i < 2 * ND; i++) xe[i] = (i < N) ? x[i] : BSD_ZERO;
  end

  for (genvar k = 0; k < ND; k++) begin : g_cell
    bsd_t x_lo;
    logic p_lo, rn_lo;
    bsd_t y_hi, y_mid;
    if (k == 0) begin : g_first
      assign x_lo  = g;
      assign p_lo  = 1'b0;
      assign rn_lo = ~(g.n ^ g.p);
    end else begin : g_next
      assign x_lo  = xe[2*k-1];
      assign p_lo  = p_c[k-1];
      assign rn_lo = rn_c[k-1];
    end
    bsd_recoder_cell u_cell (
      .x_hi (xe[2*k+1]),
      .x_mid(xe[2*k]),
      .x_lo (x_lo),
      .p_lo (p_lo),
      .rn_lo(rn_lo),
      .p_hi (p_c[k]),
      .rn_hi(rn_c[k]),
      .y_hi (y_hi),
      .y_mid(y_mid),
      .sigma(sigma[k])
    );
  end

endmodule

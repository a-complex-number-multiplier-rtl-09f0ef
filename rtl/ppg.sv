// ppg: Booth-style partial product generator with RB pairing.
//
// For each radix-4 multiplier digit sigma_k (one-hot) it selects 0, +-M or
// +-2M of the N-bit two's complement multiplicand M. A negative row is
// produced as the bitwise inverse of |sigma_k| M (which is -|sigma_k| M - 1)
// and the missing +1, neg_k, is placed in the empty low bits of the next row
// at bit 2k; the last row's neg bit goes into an extra word Z. Each row is
// sign-extended to W bits and shifted left by 2k.
//
// The ND rows and Z are then paired into NP RB numbers simply by wiring one
// word to the minus bits and the other to the plus bits of the digits: this is
// the halving of summands the BSD coding gives. Each such pair has the value
// A + B + 1 modulo 2^W, so Z also carries the constant -NP that cancels those
// offsets. Z is therefore one of two constants chosen by neg of the last
// row, and costs no adder:
//   Z = neg_{ND-1} * 4^(ND-1) - NP   (mod 2^W)
// Summed, the NP outputs equal M * sum_k sigma_k 4^k modulo 2^W.
//
// The document names the Booth decoders and gives the 9 rows and the pairing
// into RB form; the placement of the neg bits and the constant word Z are
// this design's choices. Combinational.
module ppg
  import cmac_pkg::*;
#(
  parameter int unsigned N  = 16,              // multiplicand width
  parameter int unsigned ND = N / 2 + 1,       // radix-4 digits (rows)
  parameter int unsigned W  = 41,              // RB word width
  parameter int unsigned NP = (ND + 2) / 2     // RB numbers out = ceil((ND+1)/2)
) (
  input  logic [N-1:0]           md,     // multiplicand, two's complement
  input  r4_t  [ND-1:0]          sigma,  // multiplier digits
  output bsd_t [NP-1:0][W-1:0]   pp      // paired partial products
);

  localparam int unsigned NW = 2 * NP;   // words including Z and padding

  logic [NW-1:0][W-1:0] word;
  logic [ND-1:0]        neg;

  // The two possible values of Z.
  localparam logic [W-1:0] Z_POS = -W'(NP);
  localparam logic [W-1:0] Z_NEG = (W'(1) << (2 * (ND - 1))) - W'(NP);

  always_comb begin
    logic [N+1:0] m1, m2, mag, row;
    m1 = {{2{md[N-1]}}, md};
    m2 = {md[N-1], md, 1'b0};
    for (int k = 0; k < ND; k++) begin
      mag    = ({(N + 2){sigma[k].p1 | sigma[k].m1}} & m1)
             | ({(N + 2){sigma[k].p2 | sigma[k].m2}} & m2);
      neg[k] = sigma[k].m1 | sigma[k].m2;
      row    = neg[k] ? ~mag : mag;
      word[k] = W'(signed'(row)) << (2 * k);
      if (k > 0) word[k][2*k-2] = neg[k-1];
    end
    word[ND] = neg[ND-1] ? Z_NEG : Z_POS;
    for (int j = ND + 1; j < NW; j++) word[j] = '0;
    for (int j = 0; j < NP; j++) begin
      for (int i = 0; i < W; i++) begin
        pp[j][i].n = word[2*j][i];
        pp[j][i].p = word[2*j+1][i];
      end
    end
  end

endmodule

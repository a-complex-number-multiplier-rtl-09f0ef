// rb_multiplier: redundant binary multiplier of the complex MAC, with the
// pipeline register of the first stage inside it.
//
// The multiplier operand arrives as ND = 9 one-hot radix-4 digits from a BSD
// recoder, the multiplicand as a 16-bit two's complement number. The PPG
// forms the 9 rows and pairs them (with the neg/correction word) into 5 RB
// numbers. Three levels of RB adders reduce them:
//   level 1: pp0 + pp1, pp2 + pp3     (pp4 waits)
//   level 2: (pp0+pp1) + (pp2+pp3)    (pp4 waits)
//   pipeline register: level-2 sum and pp4
//   level 3: the one RB product
// Levels 1 and 2 and the register sit in the first pipeline stage, level 3 in
// the second, as in the design's floor plan. The product is an RB number of
// W digits equal to multiplicand times operand modulo 2^W.
//
// Timing: sigma and md are sampled at a rising clock edge; prod shows the
// product of that sample combinationally after the edge (one register).
// The register loads every cycle. The tree is written for 5 RB numbers, so N
// must be 16 (or 14), the size the document builds.
module rb_multiplier
  import cmac_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned ND = N / 2 + 1,
  parameter int unsigned W  = 41
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       md,
  input  r4_t  [ND-1:0]      sigma,
  output bsd_t [W-1:0]       prod
);

  localparam int unsigned NP = (ND + 2) / 2;

  if (NP != 5) begin : g_bad_n
    $error("rb_multiplier: the adder tree is built for 5 RB numbers (N = 14 or 16)");
  end

  bsd_t [NP-1:0][W-1:0] pp;
  bsd_t [W-1:0]         l1a, l1b, l2;
  bsd_t [W-1:0]         l2_q, pp4_q;

  ppg #(.N(N), .ND(ND), .W(W), .NP(NP)) u_ppg (
    .md   (md),
    .sigma(sigma),
    .pp   (pp)
  );

  rba #(.W(W)) u_l1a (.x(pp[0]), .y(pp[1]), .z(l1a));
  rba #(.W(W)) u_l1b (.x(pp[2]), .y(pp[3]), .z(l1b));
  rba #(.W(W)) u_l2  (.x(l1a),   .y(l1b),   .z(l2));

  // Pipeline register (end of stage 1).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l2_q  <= {W{BSD_ZERO}};
      pp4_q <= {W{BSD_ZERO}};
    end else begin
      l2_q  <= l2;
      pp4_q <= pp[4];
    end
  end

  rba #(.W(W)) u_l3 (.x(l2_q), .y(pp4_q), .z(prod));

endmodule

// cmac_top: 16 x 16 complex-number multiplier-accumulator using three real
// multiplications with radix-4 recoded redundant binary operands.
//
// (A + jB)(C + jD) = R + jI is computed as
//   m0 = (C - D) * B,   m1 = (A - B) * C,   m2 = (A + B) * D
//   R  = m1 + m0,       I  = m2 + m0.
// Each of the three pre-multiplication sums is formed by an rb_coder as a
// redundant binary number (inverters only, no carries) and turned by a
// bsd_recoder directly into 9 radix-4 digits, which drive an rb_multiplier
// whose multiplicand is the plain binary operand (C, B and D). Two cmac_lane
// instances add the RB products, accumulate, and convert to 41-bit two's
// complement.
//
// Pipeline (three stages, one issue per cycle):
//   stage 1: coders, recoders, PPGs, RBA levels 1-2 -> pipeline registers
//   stage 2: RBA level 3, 4th-level RBA, Acc RBA     -> accumulator registers
//   stage 3: mux, 41-bit converter / adder           -> output registers
// An operation presented with in_valid at a rising edge appears on r, i with
// out_valid three rising edges later.
//
// Operations (op): OP_MUL loads the accumulators with the product (direct
// multiplication); OP_MAC adds the product to them; OP_ADD returns
// R = A + C and I = B + D through the converter / adder, leaving the
// accumulators alone. The three-multiplication equations, the block
// structure, the widths (16-bit operands, 41-bit results) and the three
// stages follow the document; the operation encoding, the ADD operation's
// pairing of operands and the reset are this design's choices. The lane
// lock-step assertion is disabled by rst_n, so lint sees rst_n used both as an
// asynchronous reset and in a clocked expression; that is intended.
module cmac_top
  import cmac_pkg::*;
#(
  parameter int unsigned N  = 16,          // operand width
  parameter int unsigned W  = 41,          // accumulator / result width
  parameter int unsigned ND = N / 2 + 1    // radix-4 digits per operand
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  op_e          op,
  input  logic [N-1:0] a,      // real part of the first operand
  input  logic [N-1:0] b,      // imaginary part of the first operand
  input  logic [N-1:0] c,      // real part of the second operand
  input  logic [N-1:0] d,      // imaginary part of the second operand
  output logic         out_valid,
  output logic [W-1:0] r,      // real part of the result
  output logic [W-1:0] i       // imaginary part of the result
);

  // Pre-multiplication sums in RB form.
  bsd_t [N-1:0]  x_amb, x_cmd, x_apb;
  bsd_t          g_amb, g_cmd, g_apb;
  r4_t  [ND-1:0] s_amb, s_cmd, s_apb;
  bsd_t [W-1:0]  m0, m1, m2;

  rb_coder #(.N(N), .SUB(1'b1)) u_cod_m1 (.a(a), .b(b), .d(x_amb), .g(g_amb));
  rb_coder #(.N(N), .SUB(1'b1)) u_cod_m0 (.a(c), .b(d), .d(x_cmd), .g(g_cmd));
  rb_coder #(.N(N), .SUB(1'b0)) u_cod_m2 (.a(a), .b(b), .d(x_apb), .g(g_apb));

  bsd_recoder #(.N(N), .ND(ND)) u_rec_m1 (.x(x_amb), .g(g_amb), .sigma(s_amb));
  bsd_recoder #(.N(N), .ND(ND)) u_rec_m0 (.x(x_cmd), .g(g_cmd), .sigma(s_cmd));
  bsd_recoder #(.N(N), .ND(ND)) u_rec_m2 (.x(x_apb), .g(g_apb), .sigma(s_apb));

  rb_multiplier #(.N(N), .ND(ND), .W(W)) u_mul_m1 (
    .clk(clk), .rst_n(rst_n), .md(c), .sigma(s_amb), .prod(m1));
  rb_multiplier #(.N(N), .ND(ND), .W(W)) u_mul_m0 (
    .clk(clk), .rst_n(rst_n), .md(b), .sigma(s_cmd), .prod(m0));
  rb_multiplier #(.N(N), .ND(ND), .W(W)) u_mul_m2 (
    .clk(clk), .rst_n(rst_n), .md(d), .sigma(s_apb), .prod(m2));

  // Stage-1 control and operand registers (alongside the multipliers'
  // pipeline registers).
  logic         valid_1;
  op_e          op_1;
  logic [N-1:0] a_1, b_1, c_1, d_1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_1 <= 1'b0;
      op_1    <= OP_MUL;
      a_1     <= '0;
      b_1     <= '0;
      c_1     <= '0;
      d_1     <= '0;
    end else begin
      valid_1 <= in_valid;
      op_1    <= op;
      a_1     <= a;
      b_1     <= b;
      c_1     <= c;
      d_1     <= d;
    end
  end

  logic r_valid, i_valid;

  cmac_lane #(.N(N), .W(W)) u_lane_r (
    .clk(clk), .rst_n(rst_n), .valid_1(valid_1), .op_1(op_1),
    .prod_a(m1), .prod_b(m0), .opnd_a(a_1), .opnd_b(c_1),
    .result(r), .result_valid(r_valid));

  cmac_lane #(.N(N), .W(W)) u_lane_i (
    .clk(clk), .rst_n(rst_n), .valid_1(valid_1), .op_1(op_1),
    .prod_a(m2), .prod_b(m0), .opnd_a(b_1), .opnd_b(d_1),
    .result(i), .result_valid(i_valid));

  assign out_valid = r_valid;

  // Both lanes run in lock step.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n) r_valid == i_valid)
    else $error("cmac_top: lanes out of step");

endmodule

// cmac_lane: one output lane (real part R or imaginary part I) of the
// complex multiplier-accumulator: the "redundant binary adder and converter".
//
// Stage 2 (combinational from the multipliers' pipeline registers):
//   4th-level RBA: sum = prod_a + prod_b        (R = m1 + m0, I = m2 + m0)
//   Acc RBA:       acc_d = sum + (op == MAC ? acc_q : 0)
//   Acc register:  loads acc_d for MUL and MAC, holds for ADD and idle slots
// Stage 3:
//   Mux:           the accumulator (as RB), or for ADD the two binary operands
//                  of the lane placed in the minus / plus bits
//   Converter:     rb_to_bin, carry-in 1 for RB and 0 for the binary add
//   Output register: result, result_valid
//
// Interface: valid_1, op_1, prod_a, prod_b and the binary operands opnd_a,
// opnd_b all belong to the same issue slot, one cycle after it was issued
// (the stage-1 register). The result appears in the output register two
// clock edges later. A new slot can enter every cycle; the accumulator loop
// is one cycle, so back-to-back MACs need no stall.
//
// Follows the design's floor plan for the order of the parts and the 41-bit
// width. The operation codes, the zero fed to the Acc RBA for a direct
// multiplication, the pairing of operands for ADD, and the operand delay
// registers that keep ADD on the same three-stage timing as the products are
// this design's choices. Results wrap modulo 2^W.
module cmac_lane
  import cmac_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned W = 41
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_1,
  input  op_e          op_1,
  input  bsd_t [W-1:0] prod_a,
  input  bsd_t [W-1:0] prod_b,
  input  logic [N-1:0] opnd_a,
  input  logic [N-1:0] opnd_b,
  output logic [W-1:0] result,
  output logic         result_valid
);

  bsd_t [W-1:0] sum4, acc_in, acc_d, acc_q, mux_x;
  logic         valid_2;
  op_e          op_2;
  logic [N-1:0] opnd_a_2, opnd_b_2;
  logic [W-1:0] conv;
  logic         mux_cin;

  rba #(.W(W)) u_rba4   (.x(prod_a), .y(prod_b), .z(sum4));

  assign acc_in = (op_1 == OP_MAC) ? acc_q : {W{BSD_ZERO}};

  rba #(.W(W)) u_rba_acc (.x(sum4), .y(acc_in), .z(acc_d));

  // Accumulator register and stage-2 control (end of stage 2).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= {W{BSD_ZERO}};
      valid_2  <= 1'b0;
      op_2     <= OP_MUL;
      opnd_a_2 <= '0;
      opnd_b_2 <= '0;
    end else begin
      if (valid_1 && (op_1 == OP_MUL || op_1 == OP_MAC)) acc_q <= acc_d;
      valid_2  <= valid_1;
      op_2     <= op_1;
      opnd_a_2 <= opnd_a;
      opnd_b_2 <= opnd_b;
    end
  end

  // Mux in front of the converter / adder.
  always_comb begin
    if (op_2 == OP_ADD) begin
      for (int i = 0; i < W; i++) begin
        mux_x[i].n = (i < N) ? opnd_a_2[i] : opnd_a_2[N-1];
        mux_x[i].p = (i < N) ? opnd_b_2[i] : opnd_b_2[N-1];
      end
      mux_cin = 1'b0;
    end else begin
      mux_x   = acc_q;
      mux_cin = 1'b1;
    end
  end

  rb_to_bin #(.W(W)) u_conv (.x(mux_x), .cin(mux_cin), .y(conv));

  // Output register (end of stage 3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result       <= conv;
      result_valid <= valid_2;
    end
  end

endmodule

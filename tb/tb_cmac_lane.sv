// tb_cmac_lane: checks one output lane. Every cycle a random slot (idle, MUL,
// MAC or ADD) is presented at the stage-1 inputs with random RB products and
// binary operands. A reference model keeps the accumulator as an integer
// modulo 2^41 and predicts the result, which must appear with result_valid
// exactly two rising edges after the slot. Counts each operation kind and
// runs of back-to-back MACs; a kind that never occurs is a failure.
module tb_cmac_lane;
  import cmac_pkg::*;

  localparam int N = 16, W = 41;
  int checks = 0, failures = 0;
  int n_mul = 0, n_mac = 0, n_add = 0, n_idle = 0, n_mac_b2b = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         valid_1;
  op_e          op_1;
  bsd_t [W-1:0] prod_a, prod_b;
  logic [N-1:0] opnd_a, opnd_b;
  logic [W-1:0] result;
  logic         result_valid;

  cmac_lane #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(bsd_t [W-1:0] d);
    longint v = 0;
    for (int i = 0; i < W; i++) v += longint'(bsd_val(d[i])) << i;
    return v & ((64'd1 << W) - 1);
  endfunction

  longint m = (64'd1 << W) - 1;
  longint acc = 0;
  longint exp_q[$];
  bit     vld_q[$];

  initial begin
    op_e last_op = OP_MUL;
    bit  last_v  = 1'b0;
    valid_1 = 1'b0;
    op_1    = OP_MUL;
    prod_a  = {W{BSD_ZERO}};
    prod_b  = {W{BSD_ZERO}};
    opnd_a  = '0;
    opnd_b  = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int     r;
      longint e;
      r = int'($urandom_range(9));
      valid_1 = (r != 0);
      op_1    = (r <= 2) ? OP_MUL : (r <= 7) ? OP_MAC : OP_ADD;
      for (int i = 0; i < W; i++) begin
        prod_a[i] = bsd_t'(2'($urandom));
        prod_b[i] = bsd_t'(2'($urandom));
      end
      opnd_a = N'($urandom);
      opnd_b = N'($urandom);
      e = 0;
      if (valid_1) begin
        case (op_1)
          OP_MUL: begin acc = (val(prod_a) + val(prod_b)) & m; e = acc; n_mul++; end
          OP_MAC: begin
            acc = (acc + val(prod_a) + val(prod_b)) & m; e = acc; n_mac++;
            if (last_v && last_op == OP_MAC) n_mac_b2b++;
          end
          default: begin
            e = (longint'(signed'(opnd_a)) + longint'(signed'(opnd_b))) & m; n_add++;
          end
        endcase
      end else n_idle++;
      last_v  = valid_1;
      last_op = op_1;
      exp_q.push_back(e);
      vld_q.push_back(valid_1);
      @(negedge clk);
    end
    valid_1 = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_mul == 0 || n_mac == 0 || n_add == 0 || n_idle == 0 || n_mac_b2b == 0) failures++;
    $display("mul=%0d mac=%0d add=%0d idle=%0d back-to-back mac=%0d", n_mul, n_mac, n_add, n_idle, n_mac_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slot presented before edge t is in the output register after edge t+1.
  int edges = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      edges++;
      #1;
      if (edges >= 2 && exp_q.size() > 0 && edges - 2 < 4000) begin
        longint e;
        bit     v;
        e = exp_q.pop_front();
        v = vld_q.pop_front();
        checks++;
        if (result_valid != v || (v && longint'(result) != e)) begin
          failures++;
          if (failures < 5) $display("FAIL edge %0d: valid %0b/%0b result %0d exp %0d", edges, result_valid, v, result, e);
        end
      end
    end
  end
endmodule

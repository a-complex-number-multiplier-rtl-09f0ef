// tb_cmac_top: end-to-end test of the complex multiplier-accumulator at its
// default sizes (16-bit operands, 41-bit results).
//
// The reference model uses the plain four-multiplication definition
// R = AC - BD, I = AD + BC (not the three-multiplication scheme of the
// design) and keeps the two accumulators as integers modulo 2^41. Results
// must appear with out_valid exactly three rising edges after the slot was
// presented. Phases:
//   1. directed corner operands (+-2^15 extremes) with MUL,
//   2. random mix of MUL, MAC, ADD and idle slots,
//   3. a long run of MACs of the largest product, so the 41-bit accumulator
//      wraps around.
// It counts each mechanism: direct multiplication, accumulation, back-to-back
// MACs, the operand path through the mux (ADD), idle slots, accumulator
// wrap-around, and, for each of the three recoders (A - B, C - D, A + B),
// multiplications whose recoded operand contains each radix-4 digit value
// -2..+2 (taken from an integer model of the recoding, so the test uses only
// the ports of the design); one that never happens counts as a failure.
module tb_cmac_top;
  import cmac_pkg::*;

  localparam int N = 16, W = 41;
  int checks = 0, failures = 0;
  int n_mul = 0, n_mac = 0, n_add = 0, n_idle = 0, n_b2b = 0, n_wrap = 0;
  int seen[3][5];

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid;
  op_e          op;
  logic [N-1:0] a, b, c, d;
  logic         out_valid;
  logic [W-1:0] r, i;

  cmac_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m = (64'd1 << W) - 1;
  longint acc_r = 0, acc_i = 0;   // signed, unwrapped, for wrap detection
  longint exp_r[$], exp_i[$];
  bit     exp_v[$];
  op_e    last_op = OP_ADD;
  bit     last_v  = 1'b0;

  function automatic longint sx(logic [N-1:0] v);
    return longint'(signed'(v));
  endfunction

  // Drive one slot (at a falling edge) and record what it must produce.
  task automatic issue(bit v, op_e o, logic [N-1:0] ta, tb, tc, td);
    longint pr, pi, er, ei;
    in_valid = v;
    op = o;
    a = ta; b = tb; c = tc; d = td;
    pr = sx(ta) * sx(tc) - sx(tb) * sx(td);
    pi = sx(ta) * sx(td) + sx(tb) * sx(tc);
    er = 0;
    ei = 0;
    if (v) begin
      case (o)
        OP_MUL: begin acc_r = pr; acc_i = pi; er = pr; ei = pi; n_mul++; end
        OP_MAC: begin
          acc_r += pr; acc_i += pi; er = acc_r; ei = acc_i; n_mac++;
          if (last_v && last_op == OP_MAC) n_b2b++;
          if (acc_r >= (64'sd1 <<< (W - 1)) || acc_r < -(64'sd1 <<< (W - 1))) begin
            n_wrap++;
            acc_r = ((acc_r & m) ^ (64'd1 << (W - 1))) - (64'sd1 <<< (W - 1));
          end
          if (acc_i >= (64'sd1 <<< (W - 1)) || acc_i < -(64'sd1 <<< (W - 1))) begin
            n_wrap++;
            acc_i = ((acc_i & m) ^ (64'd1 << (W - 1))) - (64'sd1 <<< (W - 1));
          end
          er = acc_r; ei = acc_i;
        end
        default: begin er = sx(ta) + sx(tc); ei = sx(tb) + sx(td); n_add++; end
      endcase
    end else n_idle++;
    last_v  = v;
    last_op = o;
    exp_r.push_back(er & m);
    exp_i.push_back(ei & m);
    exp_v.push_back(v);
    @(negedge clk);
  endtask

  // Integer model of the recoding of A - B, C - D or A + B: the coder's
  // digits, then the two filtering additions (adding -1, then +1, at every
  // even position), then radix-4 pairs. Used to count which digit values the
  // stimulus makes the three recoders produce.
  function automatic void recode(logic [N-1:0] p, q, bit sub, output int sg[N/2+1]);
    int x[N+2], s1[N+2], c1[N+2], w[N+2], s2[N+2], c2[N+2], y[N+2];
    int g;
    longint vx, vs;
    for (int k = 0; k < N + 2; k++) x[k] = 0;
    for (int k = 0; k < N - 1; k++) x[k] = sub ? int'(p[k]) - int'(q[k]) : int'(p[k]) + int'(q[k]) - 1;
    x[N-1] = sub ? int'(q[N-1]) - int'(p[N-1]) : 1 - int'(p[N-1]) - int'(q[N-1]);
    g = sub ? 0 : -1;
    for (int k = 0; k < N + 2; k++) begin
      int lo;
      lo = (k == 0) ? g : x[k-1];
      if (k % 2 == 0) begin
        if (x[k] != 0)     begin c1[k] = (x[k] == -1) ? -1 : 0; s1[k] = 0; end
        else if (lo == -1) begin c1[k] = -1; s1[k] = 1;  end
        else               begin c1[k] = 0;  s1[k] = -1; end
      end else begin
        c1[k] = (x[k] == -1) ? -1 : 0;
        s1[k] = (x[k] != 0) ? 1 : 0;
      end
      w[k] = s1[k] + ((k == 0) ? g : c1[k-1]);
    end
    for (int k = 0; k < N + 2; k++) begin
      if (k % 2 == 0) begin
        if (w[k] == -1)                 begin c2[k] = 0; s2[k] = 0;  end
        else if (k > 0 && w[k-1] == 1)  begin c2[k] = 1; s2[k] = -1; end
        else                            begin c2[k] = 0; s2[k] = 1;  end
      end else begin
        c2[k] = (w[k] == 1) ? 1 : 0;
        s2[k] = (w[k] != 0) ? -1 : 0;
      end
      y[k] = s2[k] + ((k == 0) ? 0 : c2[k-1]);
    end
    vx = sub ? sx(p) - sx(q) : sx(p) + sx(q);
    vs = 0;
    for (int k = 0; k < N / 2 + 1; k++) begin
      sg[k] = 2 * y[2*k+1] + y[2*k];
      vs += longint'(sg[k]) << (2 * k);
    end
    if (vs != vx) $fatal(1, "recoding model inconsistent");
  endfunction

  always @(negedge clk) begin
    if (rst_n && in_valid && op != OP_ADD) begin
      int sg[N/2+1];
      recode(a, b, 1'b1, sg);
      foreach (sg[k]) seen[0][sg[k] + 2]++;
      recode(c, d, 1'b1, sg);
      foreach (sg[k]) seen[1][sg[k] + 2]++;
      recode(a, b, 1'b0, sg);
      foreach (sg[k]) seen[2][sg[k] + 2]++;
    end
  end

  // A slot issued before rising edge t is in the output register after edge t+2.
  int edges = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      edges++;
      #1;
      if (edges >= 3 && exp_v.size() > 0) begin
        longint er, ei;
        bit v;
        er = exp_r.pop_front();
        ei = exp_i.pop_front();
        v  = exp_v.pop_front();
        checks++;
        if (out_valid != v || (v && (longint'(r) != er || longint'(i) != ei))) begin
          failures++;
          if (failures < 6)
            $display("FAIL edge %0d: valid %0b/%0b R %0d exp %0d I %0d exp %0d",
                     edges, out_valid, v, r, er, i, ei);
        end
      end
    end
  end

  initial begin
    logic [N-1:0] ext[4];
    ext = '{16'h8000, 16'h7fff, 16'hffff, 16'h0000};
    in_valid = 1'b0;
    op = OP_MUL;
    {a, b, c, d} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // 1. corners
    for (int n = 0; n < 256; n++)
      issue(1'b1, OP_MUL, ext[n & 3], ext[(n >> 2) & 3], ext[(n >> 4) & 3], ext[(n >> 6) & 3]);
    // 2. random mix
    for (int n = 0; n < 6000; n++) begin
      int rr;
      op_e o;
      rr = int'($urandom_range(9));
      o = (rr <= 2) ? OP_MUL : (rr <= 7) ? OP_MAC : OP_ADD;
      issue(rr != 0 || n % 50 == 0 ? (n % 50 != 0) : 1'b0, o,
            N'($urandom), N'($urandom), N'($urandom), N'($urandom));
    end
    // 3. accumulator wrap-around
    issue(1'b1, OP_MUL, 16'h8000, 16'h8000, 16'h8000, 16'h7fff);
    for (int n = 0; n < 600; n++) issue(1'b1, OP_MAC, 16'h8000, 16'h8000, 16'h8000, 16'h7fff);
    for (int n = 0; n < 5; n++) issue(1'b0, OP_MUL, '0, '0, '0, '0);
    checks++;
    if (n_mul == 0 || n_mac == 0 || n_add == 0 || n_idle == 0 || n_b2b == 0 || n_wrap == 0)
      failures++;
    for (int u = 0; u < 3; u++)
      for (int v = 0; v < 5; v++) begin
        checks++;
        if (seen[u][v] == 0) failures++;
      end
    $display("mul=%0d mac=%0d add=%0d idle=%0d back-to-back mac=%0d wraps=%0d",
             n_mul, n_mac, n_add, n_idle, n_b2b, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bsd_recoder: checks the full recoder chain. For every RB operand X and
// correction digit g in {-1, 0} it requires exactly one hot line per radix-4
// digit and sum_k sigma_k 4^k == X + g. Exhaustive over all codings at N = 4
// (4^4 digit codes x 2 values of g), random digit codings at N = 16 plus the
// extreme operands +-(2^16 - 1). Also counts that all five digit values occur.
module tb_bsd_recoder;
  import cmac_pkg::*;

  int checks = 0, failures = 0;
  int seen[5];

  bsd_t [3:0]  x4;
  bsd_t        g4;
  r4_t  [2:0]  s4;
  bsd_t [15:0] x16;
  bsd_t        g16;
  r4_t  [8:0]  s16;

  bsd_recoder #(.N(4))  u4  (.x(x4),  .g(g4),  .sigma(s4));
  bsd_recoder #(.N(16)) u16 (.x(x16), .g(g16), .sigma(s16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint xv, sv;
    bit onehot;
    for (int v = 0; v < 512; v++) begin
      for (int i = 0; i < 4; i++) x4[i] = bsd_t'(2'(v >> (2 * i)));
      g4 = v[8] ? BSD_ZERO : BSD_NEG;
      #1;
      xv = bsd_val(g4);
      for (int i = 0; i < 4; i++) xv += longint'(bsd_val(x4[i])) << i;
      sv = 0;
      onehot = 1;
      for (int k = 0; k < 3; k++) begin
        sv += longint'(r4_val(s4[k])) << (2 * k);
        if ($countones(s4[k]) != 1) onehot = 0;
      end
      chk(onehot && sv == xv, "N=4");
    end
    for (int n = 0; n < 30000; n++) begin
      for (int i = 0; i < 16; i++) x16[i] = bsd_t'(2'($urandom));
      g16 = n[0] ? BSD_ZERO : BSD_NEG;
      if (n == 0) x16 = {16{BSD_POS_T()}};
      if (n == 1) x16 = {16{BSD_NEG}};
      #1;
      xv = bsd_val(g16);
      for (int i = 0; i < 16; i++) xv += longint'(bsd_val(x16[i])) << i;
      sv = 0;
      onehot = 1;
      for (int k = 0; k < 9; k++) begin
        sv += longint'(r4_val(s16[k])) << (2 * k);
        if ($countones(s16[k]) != 1) onehot = 0;
        seen[r4_val(s16[k]) + 2]++;
      end
      chk(onehot && sv == xv, "N=16");
    end
    for (int j = 0; j < 5; j++) chk(seen[j] > 0, "digit value never produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bsd_t BSD_POS_T();
    return '{n: 1'b1, p: 1'b1};
  endfunction
endmodule

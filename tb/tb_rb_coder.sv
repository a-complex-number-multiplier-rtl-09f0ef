// tb_rb_coder: checks that the RB sum/difference coder gives digits whose
// value plus the correction digit equals A + B (or A - B) exactly, that every
// digit below the sign position carries a_i in its minus bit, and that g is
// -1 for a sum and 0 for a difference. Exhaustive at N = 6, random at N = 16.
module tb_rb_coder;
  import cmac_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16;
  bsd_t [15:0] ds16, dd16;
  bsd_t        gs16, gd16;
  logic [5:0]  a6, b6;
  bsd_t [5:0]  ds6, dd6;
  bsd_t        gs6, gd6;

  rb_coder #(.N(16), .SUB(1'b0)) u_s16 (.a(a16), .b(b16), .d(ds16), .g(gs16));
  rb_coder #(.N(16), .SUB(1'b1)) u_d16 (.a(a16), .b(b16), .d(dd16), .g(gd16));
  rb_coder #(.N(6),  .SUB(1'b0)) u_s6  (.a(a6),  .b(b6),  .d(ds6),  .g(gs6));
  rb_coder #(.N(6),  .SUB(1'b1)) u_d6  (.a(a6),  .b(b6),  .d(dd6),  .g(gd6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val16(bsd_t [15:0] d, bsd_t g);
    longint v = bsd_val(g);
    for (int i = 0; i < 16; i++) v += longint'(bsd_val(d[i])) << i;
    return v;
  endfunction

  function automatic longint val6(bsd_t [5:0] d, bsd_t g);
    longint v = bsd_val(g);
    for (int i = 0; i < 6; i++) v += longint'(bsd_val(d[i])) << i;
    return v;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x);
        b6 = 6'(y);
        #1;
        chk(val6(ds6, gs6) == longint'(signed'(a6)) + longint'(signed'(b6)), "sum6");
        chk(val6(dd6, gd6) == longint'(signed'(a6)) - longint'(signed'(b6)), "diff6");
      end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (n < 4) begin
        a16 = (n[0]) ? 16'h8000 : 16'h7fff;
        b16 = (n[1]) ? 16'h8000 : 16'h7fff;
      end
      #1;
      chk(val16(ds16, gs16) == longint'(signed'(a16)) + longint'(signed'(b16)), "sum16");
      chk(val16(dd16, gd16) == longint'(signed'(a16)) - longint'(signed'(b16)), "diff16");
      chk(ds16[3].n == a16[3] && dd16[7].n == a16[7], "minus bits");
    end
    chk(bsd_val(gs16) == -1 && bsd_val(gd16) == 0, "g");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

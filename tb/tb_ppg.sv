// tb_ppg: checks the partial product generator. For random multiplicands
// (plus the extremes -2^15 and 2^15-1) and random radix-4 digit strings, the
// values of the 5 paired RB numbers must add up to md * sum_k sigma_k 4^k
// modulo 2^41. Digit strings of all -2 and all +2 exercise every neg bit and
// both values of the constant word.
module tb_ppg;
  import cmac_pkg::*;

  localparam int N = 16, ND = 9, W = 41, NP = 5;
  int checks = 0, failures = 0;

  logic [N-1:0]          md;
  r4_t  [ND-1:0]         sigma;
  bsd_t [NP-1:0][W-1:0]  pp;

  ppg #(.N(N), .ND(ND), .W(W), .NP(NP)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic r4_t onehot(int v);
    r4_t s = '0;
    case (v)
      -2: s.m2 = 1'b1;
      -1: s.m1 = 1'b1;
       0: s.z  = 1'b1;
       1: s.p1 = 1'b1;
      default: s.p2 = 1'b1;
    endcase
    return s;
  endfunction

  initial begin
    longint m = (64'd1 << W) - 1;
    longint opv, got, expv;
    int dv;
    for (int n = 0; n < 20000; n++) begin
      md  = 16'($urandom);
      if (n % 7 == 1) md = 16'h8000;
      if (n % 7 == 2) md = 16'h7fff;
      opv = 0;
      for (int k = 0; k < ND; k++) begin
        dv = int'($urandom_range(4)) - 2;
        if (n % 5 == 3) dv = -2;
        if (n % 5 == 4) dv = 2;
        sigma[k] = onehot(dv);
        opv += longint'(dv) << (2 * k);
      end
      #1;
      got = 0;
      for (int j = 0; j < NP; j++)
        for (int i = 0; i < W; i++) got += longint'(bsd_val(pp[j][i])) << i;
      expv = longint'(signed'(md)) * opv;
      checks++;
      if ((got & m) != (expv & m)) begin
        failures++;
        if (failures < 5) $display("FAIL md=%0d op=%0d got=%0d exp=%0d", signed'(md), opv, got & m, expv & m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rb_multiplier: checks the RB multiplier with its pipeline register. A
// new random multiplicand and radix-4 operand is applied every cycle; one
// rising edge later the RB product must equal their product modulo 2^41,
// and it must not show before that edge (latency of exactly one register).
module tb_rb_multiplier;
  import cmac_pkg::*;

  localparam int N = 16, ND = 9, W = 41;
  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]      md;
  r4_t  [ND-1:0]     sigma;
  bsd_t [W-1:0]      prod;

  rb_multiplier #(.N(N), .ND(ND), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  function automatic longint val(bsd_t [W-1:0] d);
    longint v = 0;
    for (int i = 0; i < W; i++) v += longint'(bsd_val(d[i])) << i;
    return v & ((64'd1 << W) - 1);
  endfunction

  initial begin
    longint m = (64'd1 << W) - 1;
    longint expv, prev;
    md    = '0;
    sigma = {ND{onehot(0)}};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev  = 0;
    for (int n = 0; n < 3000; n++) begin
      longint opv;
      int dv;
      opv = 0;
      @(negedge clk);
      md = 16'($urandom);
      for (int k = 0; k < ND; k++) begin
        dv = int'($urandom_range(4)) - 2;
        sigma[k] = onehot(dv);
        opv += longint'(dv) << (2 * k);
      end
      expv = (longint'(signed'(md)) * opv) & m;
      #1;
      // Before the edge the previous product is still shown.
      checks++;
      if (n > 0 && val(prod) != prev) failures++;
      @(posedge clk);
      #1;
      checks++;
      if (val(prod) != expv) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d got=%0d exp=%0d", n, val(prod), expv);
      end
      prev = expv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rb_to_bin: checks the converter / adder. With carry-in 1 a random
// 41-digit RB number must convert to its value modulo 2^41; with carry-in 0
// the output must be the binary sum of the words in the minus and plus bits.
module tb_rb_to_bin;
  import cmac_pkg::*;

  localparam int W = 41;
  int checks = 0, failures = 0;

  bsd_t [W-1:0] x;
  logic         cin;
  logic [W-1:0] y;

  rb_to_bin #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m = (64'd1 << W) - 1;
    longint v, nb, pb;
    for (int n = 0; n < 20000; n++) begin
      v  = 0;
      nb = 0;
      pb = 0;
      for (int i = 0; i < W; i++) begin
        x[i] = bsd_t'(2'($urandom));
        v  += longint'(bsd_val(x[i])) << i;
        nb += longint'(x[i].n) << i;
        pb += longint'(x[i].p) << i;
      end
      cin = 1'b1;
      #1;
      checks++;
      if (longint'(y) != (v & m)) failures++;
      cin = 1'b0;
      #1;
      checks++;
      if (longint'(y) != ((nb + pb) & m)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

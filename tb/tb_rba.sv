// tb_rba: checks the W-digit RB adder. Random digit codings of x and y at
// W = 41 and W = 6 (exhaustive over all 4^6 x 4^6 would be too long, so the
// small adder runs 50000 random pairs); the value of z must equal
// x + y modulo 2^W. A chain of 16 additions fed back into itself also checks
// that sums of sums stay correct.
module tb_rba;
  import cmac_pkg::*;

  localparam int W = 41;
  int checks = 0, failures = 0;

  bsd_t [W-1:0] x, y, z;
  bsd_t [5:0]   xs, ys, zs;

  rba #(.W(W)) dut   (.x(x),  .y(y),  .z(z));
  rba #(.W(6)) dut6  (.x(xs), .y(ys), .z(zs));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(bsd_t [W-1:0] d);
    longint v = 0;
    for (int i = 0; i < W; i++) v += longint'(bsd_val(d[i])) << i;
    return v & ((64'd1 << W) - 1);
  endfunction

  function automatic longint val6(bsd_t [5:0] d);
    longint v = 0;
    for (int i = 0; i < 6; i++) v += longint'(bsd_val(d[i])) << i;
    return v & 63;
  endfunction

  initial begin
    longint m = (64'd1 << W) - 1;
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < W; i++) begin
        x[i] = bsd_t'(2'($urandom));
        y[i] = bsd_t'(2'($urandom));
      end
      for (int i = 0; i < 6; i++) begin
        xs[i] = bsd_t'(2'($urandom));
        ys[i] = bsd_t'(2'($urandom));
      end
      #1;
      checks++;
      if (val(z) != ((val(x) + val(y)) & m)) failures++;
      checks++;
      if (val6(zs) != ((val6(xs) + val6(ys)) & 63)) failures++;
    end
    // Accumulation chain.
    begin
      longint acc;
      bsd_t [W-1:0] s;
      s   = {W{BSD_ZERO}};
      acc = 0;
      for (int n = 0; n < 16; n++) begin
        for (int i = 0; i < W; i++) y[i] = bsd_t'(2'($urandom));
        x = s;
        #1;
        acc = (acc + val(y)) & m;
        s   = z;
        checks++;
        if (val(s) != acc) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

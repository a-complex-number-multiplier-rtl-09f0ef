// tb_rb_adder_digit: exhaustive check of one RB adder digit. The transfer in
// is k_{i-1} = c_lo - tn_lo and out is k_i = c - tn. For all 4 x 4 digit
// codings and all four (tn_lo, c_lo) the testbench requires
//   x + y + k_{i-1} == 2 k_i + z,
// that tn is high exactly when x or y is -1, and that k_i then lies in
// {-1, 0} (else in {0, 1}).
module tb_rb_adder_digit;
  import cmac_pkg::*;

  int checks = 0, failures = 0;
  bsd_t x, y, z;
  logic tn_lo, c_lo, tn, c;

  rb_adder_digit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kin, kout;
    for (int v = 0; v < 64; v++) begin
      x     = bsd_t'(2'(v));
      y     = bsd_t'(2'(v >> 2));
      tn_lo = v[4];
      c_lo  = v[5];
      #1;
      kin  = int'(c_lo) - int'(tn_lo);
      kout = int'(c) - int'(tn);
      checks++;
      if (bsd_val(x) + bsd_val(y) + kin != 2 * kout + bsd_val(z)) begin
        failures++;
        $display("FAIL x=%0d y=%0d kin=%0d -> k=%0d z=%0d", bsd_val(x), bsd_val(y), kin, kout, bsd_val(z));
      end
      checks++;
      if (tn != (bsd_val(x) == -1 || bsd_val(y) == -1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bsd_recoder_cell: exhaustive check of one recoder position.
//
// For every coding of the five digits x_{2k+1} .. x_{2k-3} (4^5 cases, both
// codings of zero included) an integer model runs the two filtering
// additions (adding ...0(-1)0(-1), then ...0101) digit by digit from their
// first-step rules, and gives y_{2k+1}, y_2k, the first-step carry out of
// position 2k and the radix-4 digit. The cell is driven with the neighbour
// signals p_{2k-1} and rn_{2k-1} taken from the same model, and all of its
// outputs are compared.
module tb_bsd_recoder_cell;
  import cmac_pkg::*;

  bsd_t x_hi, x_mid, x_lo;
  logic p_lo, rn_lo, p_hi, rn_hi;
  bsd_t y_hi, y_mid;
  r4_t  sigma;
  int   checks = 0, failures = 0;

  bsd_recoder_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integer model over positions 0..5 (position 0 is a zero digit, 1..5 are
  // x_{2k-3} .. x_{2k+1}).
  function automatic void model(input int x[6], output int y[6], output int c1[6]);
    int s1[6], w[6], s2[6], c2[6];
    for (int i = 0; i < 6; i++) begin
      if (i % 2 == 0) begin  // even position: add -1
        if (x[i] == -1)      begin c1[i] = -1; s1[i] = 0;  end
        else if (x[i] == 1)  begin c1[i] = 0;  s1[i] = 0;  end
        else if (i > 0 && x[i-1] == -1) begin c1[i] = -1; s1[i] = 1; end
        else                 begin c1[i] = 0;  s1[i] = -1; end
      end else begin         // odd position: add 0
        if (x[i] == -1)      begin c1[i] = -1; s1[i] = 1;  end
        else                 begin c1[i] = 0;  s1[i] = x[i]; end
      end
      w[i] = s1[i] + (i > 0 ? c1[i-1] : 0);
    end
    for (int i = 0; i < 6; i++) begin
      if (i % 2 == 0) begin  // even position: add +1
        if (w[i] == -1)                     begin c2[i] = 0; s2[i] = 0;  end
        else if (i > 0 && w[i-1] == 1)      begin c2[i] = 1; s2[i] = -1; end
        else                                begin c2[i] = 0; s2[i] = 1;  end
      end else begin         // odd position: add 0
        if (w[i] == 1)       begin c2[i] = 1; s2[i] = -1; end
        else if (w[i] == -1) begin c2[i] = 0; s2[i] = -1; end
        else                 begin c2[i] = 0; s2[i] = 0;  end
      end
      y[i] = s2[i] + (i > 0 ? c2[i-1] : 0);
    end
  endfunction

  function automatic bsd_t code(int c);
    return bsd_t'(2'(c));
  endfunction

  initial begin
    int x[6], y[6], c1[6];
    for (int v = 0; v < 1024; v++) begin
      bsd_t d[6];
      d[0] = BSD_ZERO;
      for (int j = 1; j < 6; j++) d[j] = code((v >> (2 * (j - 1))) & 3);
      for (int j = 0; j < 6; j++) x[j] = bsd_val(d[j]);
      model(x, y, c1);
      x_hi  = d[5];
      x_mid = d[4];
      x_lo  = d[3];
      p_lo  = (c1[2] == 0);
      rn_lo = (x[3] != 0);
      #1;
      checks++;
      if (r4_val(sigma) != 2 * y[5] + y[4] || $countones(sigma) != 1 ||
          bsd_val(y_hi) != y[5] || bsd_val(y_mid) != y[4] ||
          p_hi != (c1[4] == 0) || rn_hi != (x[5] != 0)) begin
        failures++;
        if (failures < 10)
          $display("mismatch raw=%b yh=%b ym=%b v=%0d sigma=%0d exp=%0d y=(%0d,%0d) exp=(%0d,%0d)",
                   sigma, y_hi, y_mid, v, r4_val(sigma), 2 * y[5] + y[4], bsd_val(y_hi), bsd_val(y_mid), y[5], y[4]);
      end
      // The filtered even digit is never -1 and never pairs with a +1 above.
      checks++;
      if (y[4] < 0 || (y[5] == 1 && y[4] == 1) || x[1] + 2*x[2] + 4*x[3] + 8*x[4] + 16*x[5] < -100)
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_pkg: checks the constant coefficient tables.
//   - convolving the published test input (20, 20, -20 x4, -21 x6, -20 x6,
//     -21 x2, -22 x4) with the 11-tap table gives the 24 published 11-tap
//     outputs, and with the 2-tap table the published 2-tap output values;
//   - the 4-tap table equals the Hamming-windowed sinc formula
//     round(64 * s[n] / max|s|) with fc = 0.25, recomputed here in real
//     arithmetic;
//   - every table is symmetric (linear phase) with a positive DC gain, and
//     the 2- and 4-tap sums cannot leave 16 bits (sum|h| * 128 < 2^15).
module tb_fir_pkg;
  import fir_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic int windowed_sinc(input int n_taps, input real fc, input int idx);
    real s [32];
    real peak = 0.0;
    real pi = 3.14159265358979;
    int  m = n_taps - 1;
    for (int n = 0; n < n_taps; n++) begin
      real k = n - m / 2.0;
      real v = (k == 0.0) ? 2.0 * fc : $sin(2.0 * pi * fc * k) / (pi * k);
      s[n] = v * (0.54 - 0.46 * $cos(2.0 * pi * n / m));
      if ((s[n] < 0 ? -s[n] : s[n]) > peak) peak = (s[n] < 0 ? -s[n] : s[n]);
    end
    return int'($rtoi(64.0 * s[idx] / peak + (s[idx] >= 0 ? 0.5 : -0.5)));
  endfunction

  // published test input and outputs (y(2k), y(2k+1) pairs interleaved)
  int xin_pub [24] = '{20, 20, -20, -20, -20, -20, -21, -21, -21, -21, -21, -21,
                       -20, -20, -20, -20, -20, -20, -21, -21, -22, -22, -22, -22};
  int y11_pub [24] = '{-300, -560, 180, 1460, 2500, 2540, 1235, -1112, -3619, -5437,
                       -6083, -5641, -5122, -5173, -5173, -5122, -5041, -4963,
                       -4882, -4831, -4816, -4854, -4942, -5058};
  // published 2-tap values, in the order they appear on y2k and on y2kplus1
  int y2e_pub [7] = '{2040, 0, -4080, -4182, -4284, -4182, -4080};
  int y2o_pub [4] = '{4080, -4080, -4284, -4080};

  function automatic int conv(input int c[], input int n);
    int s = 0;
    for (int j = 0; j < c.size(); j++)
      if (n - j >= 0) s += c[c.size()-1-j] * xin_pub[n - j];
    return s;
  endfunction

  task automatic check_table(input string name, input int n_taps, input int c[], input real fc,
                             input bit headroom);
    int dc = 0, abs_sum = 0;
    for (int i = 0; i < n_taps; i++) begin
      dc += c[i];
      abs_sum += (c[i] < 0) ? -c[i] : c[i];
      check(c[i] == c[n_taps-1-i], $sformatf("%s not symmetric at %0d", name, i));
      if (fc > 0.0)
        check(c[i] == windowed_sinc(n_taps, fc, i),
              $sformatf("%s tap %0d = %0d, formula gives %0d", name, i, c[i], windowed_sinc(n_taps, fc, i)));
    end
    check(dc > 0, $sformatf("%s DC gain %0d", name, dc));
    if (headroom)
      check(abs_sum * 128 <= 32767, $sformatf("%s sum|h| = %0d overflows 16 bits", name, abs_sum));
  endtask

  initial begin
    int c2 [2], c4 [4], c11 [11];
    for (int i = 0; i < 2; i++)  c2[i]  = int'($signed(COEF_2TAP[i]));
    for (int i = 0; i < 4; i++)  c4[i]  = int'($signed(COEF_4TAP[i]));
    for (int i = 0; i < 11; i++) c11[i] = int'($signed(COEF_11TAP[i]));
    check(c2[0] == 102 && c2[1] == 102, "2-tap table is not 102, 102");
    check_table("2-tap", 2, c2, 0.0, 1);
    check_table("4-tap", 4, c4, 0.25, 1);
    check_table("11-tap", 11, c11, 0.0, 0);
    for (int n = 0; n < 24; n++)
      check(conv(c11, n) == y11_pub[n],
            $sformatf("11-tap y(%0d) = %0d, published %0d", n, conv(c11, n), y11_pub[n]));
    // 2-tap: the distinct successive values on each output
    begin
      int ie, io, last_e, last_o, v;
      ie = 0; io = 0; last_e = 1; last_o = 1;
      for (int n = 0; n < 24; n++) begin
        v = conv(c2, n);
        if (n % 2 == 0 && v != last_e && ie < 7) begin
          check(v == y2e_pub[ie], $sformatf("2-tap y2k value %0d: %0d, published %0d", ie, v, y2e_pub[ie]));
          ie++; last_e = v;
        end
        if (n % 2 == 1 && v != last_o && io < 4) begin
          check(v == y2o_pub[io], $sformatf("2-tap y2kplus1 value %0d: %0d, published %0d", io, v, y2o_pub[io]));
          io++; last_o = v;
        end
      end
      check(ie == 7 && io == 4, "2-tap published value sequence not completed");
    end
    check(X_W == 8 && C_W == 8 && ACC_W == 16, "widths");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

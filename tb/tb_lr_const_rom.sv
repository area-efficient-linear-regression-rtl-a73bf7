// tb_lr_const_rom: the ROM words against the closed-form factors.
// Every word must equal round(factor * 2^e) computed here in floating point,
// and lie within 1e-4 (relative) of the published four-digit constants:
// 7.1527e-7*2^37, 9.1196e-5*2^30, 1.5534e-2*2^23, 9.1196e-5*2^30 for 256
// samples and 5.7224e-6*2^34, 3.6337e-4*2^28, 3.0887e-2*2^22,
// 3.6337e-4*2^28 for 128 samples with 6 bits discarded. A second instance
// uses the default (7 bits for both models), whose 128-sample words have the
// scalings 2^34, 2^27, 2^21 and 2^28.
module tb_lr_const_rom;
  import linreg_pkg::*;

  model_e   m;
  coef_op_e op;
  logic signed [17:0] k6, k7;

  lr_const_rom #(.SHIFT_SHORT(6)) dut6 (.model(m), .op(op), .k_o(k6));
  lr_const_rom                    dut7 (.model(m), .op(op), .k_o(k7));

  int checks = 0, failures = 0;

  function automatic real factor(input int n, input int o);
    real s1 = real'(n) * (n - 1) / 2.0;
    real s2 = real'(n - 1) * n * (2.0 * n - 1) / 6.0;
    real det = n * s2 - s1 * s1;
    case (o) 0: return n / det; 2: return s2 / det; default: return s1 / det; endcase
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pub [2][4] = '{'{7.1527e-7, 9.1196e-5, 1.5534e-2, 9.1196e-5},
                        '{5.7224e-6, 3.6337e-4, 3.0887e-2, 3.6337e-4}};
    int  e6 [2][4] = '{'{37, 30, 23, 30}, '{34, 28, 22, 28}};
    int  e7 [2][4] = '{'{37, 30, 23, 30}, '{34, 27, 21, 28}};
    for (int mi = 0; mi < 2; mi++)
      for (int o = 0; o < 4; o++) begin
        int  n;
        real x6, x7;
        n = (mi == 0) ? 256 : 128;
        m = model_e'(mi);
        op = coef_op_e'(o);
        #1;
        x6 = factor(n, o) * 2.0 ** e6[mi][o];
        x7 = factor(n, o) * 2.0 ** e7[mi][o];
        check(k6 == 18'($rtoi(x6 + 0.5)), $sformatf("shift6 m%0d op%0d: %0d vs %f", mi, o, k6, x6));
        check(k7 == 18'($rtoi(x7 + 0.5)), $sformatf("shift7 m%0d op%0d: %0d vs %f", mi, o, k7, x7));
        check((real'(k6) / (pub[mi][o] * 2.0 ** e6[mi][o]) - 1.0) < 1e-4 &&
              (real'(k6) / (pub[mi][o] * 2.0 ** e6[mi][o]) - 1.0) > -1e-4,
              $sformatf("published m%0d op%0d: %0d", mi, o, k6));
        check(k6 > 0 && k7 > 0, "constants positive and within 18 bits");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

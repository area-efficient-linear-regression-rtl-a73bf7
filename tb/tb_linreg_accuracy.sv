// tb_linreg_accuracy: error of the fixed-point coefficients over many packets.
//
// Drives the default regression core with back-to-back packets of both
// lengths (random-walk, steep and noisy-line unwrapped phase) and compares a
// and b with a floating-point least-squares fit. It reports the largest error
// of each coefficient, in units of pi and as a count of meaningful fractional
// bits of the input unit (pi/128). Each error must stay within the bound of
// one truncated unit of sum(i*d_i) plus half a unit of every constant. The
// constant rounding term grows with the sums, so it dominates for packets
// whose phase is far from zero.
module tb_linreg_accuracy;
  import linreg_pkg::*;

  localparam int PACKETS = 400;

  logic clk = 1'b0, rst, start;
  model_e model, model_o;
  logic signed [16:0] d0, d1;
  logic valid;
  logic signed [47:0] a_o, b_o;

  linreg_core dut (.clk(clk), .rst(rst), .start_i(start), .model_i(model), .d0_i(d0), .d1_i(d1),
                   .valid_o(valid), .model_o(model_o), .a_o(a_o), .b_o(b_o));

  always #5 clk = ~clk;

  typedef struct { real a, b, a_tol, b_tol; model_e m; } exp_t;
  exp_t q[$];
  int   checks = 0, failures = 0, n_res = 0;
  real  max_ea [2] = '{0.0, 0.0};
  real  max_eb [2] = '{0.0, 0.0};

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk) begin
    if (!rst && valid) begin
      exp_t r;
      real ea, eb;
      r = q.pop_front();
      n_res++;
      ea = fabs(real'(a_o) / 2.0 ** 30 - r.a);
      eb = fabs(real'(b_o) / 2.0 ** 23 - r.b);
      if (ea > max_ea[r.m]) max_ea[r.m] = ea;
      if (eb > max_eb[r.m]) max_eb[r.m] = eb;
      check(model_o == r.m, "model");
      check(ea <= r.a_tol, $sformatf("a error %g > %g", ea, r.a_tol));
      check(eb <= r.b_tol, $sformatf("b error %g > %g", eb, r.b_tol));
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; model = MODEL_LONG; d0 = 0; d1 = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int p = 0; p < PACKETS; p++) begin
      model_e m;
      int     n, u, kind, slope;
      int     d[$];
      longint sd, sid;
      real    mi, md, sxx, sxy, k0, k3;
      exp_t   r;
      m = model_e'(p % 2);
      n = (m == MODEL_SHORT) ? 128 : 256;
      kind = $urandom_range(2);
      slope = $signed($urandom_range(400)) - 200;
      u = $signed($urandom_range(255)) - 128;
      d.delete();
      sd = 0; sid = 0;
      for (int i = 0; i < n; i++) begin
        if (i > 0)
          case (kind)
            0: u += $signed($urandom_range(510)) - 255;
            1: u += ($urandom_range(1) != 0) ? 254 : -256;
            default: u += slope + $signed($urandom_range(40)) - 20;
          endcase
        d.push_back(u);
        sd += u;
        sid += longint'(i) * u;
      end
      for (int c = 0; c < n / 2; c++) begin
        @(negedge clk);
        start = (c == 0);
        model = m;
        d0 = 17'(d[2 * c]);
        d1 = 17'(d[2 * c + 1]);
      end
      mi = real'(n - 1) / 2.0;
      md = real'(sd) / n;
      sxx = 0.0; sxy = 0.0;
      for (int i = 0; i < n; i++) begin
        sxx += (i - mi) * (i - mi);
        sxy += (i - mi) * (d[i] - md);
      end
      r.m = m;
      r.a = sxy / sxx;
      r.b = md - r.a * mi;
      // one truncated unit times the constant, plus half a unit per constant
      k0 = (m == MODEL_SHORT) ? 98310.0 / 2.0 ** 27 : 98306.0 / 2.0 ** 30;
      k3 = (m == MODEL_SHORT) ? 97542.0 / 2.0 ** 21 : 97921.0 / 2.0 ** 23;
      r.a_tol = k0 + 0.5 * (fabs(real'(sid)) / 128.0 + fabs(real'(sd)) + 2.0)
                / 2.0 ** ((m == MODEL_SHORT) ? 27 : 30);
      r.b_tol = k3 + 0.5 * (fabs(real'(sid)) / 128.0 + fabs(real'(sd)) + 2.0)
                / 2.0 ** ((m == MODEL_SHORT) ? 21 : 23);
      q.push_back(r);
    end
    @(negedge clk);
    start = 0;
    repeat (20) @(negedge clk);
    check(n_res == PACKETS && q.size() == 0, "one result per packet");
    for (int m = 0; m < 2; m++)
      $display("%s model: max |a error| = %g units = %g pi (%0.1f fractional bits), max |b error| = %g units = %g pi (%0.1f fractional bits)",
               m == 0 ? "256" : "128", max_ea[m], max_ea[m] / 128.0, -log2r(max_ea[m] + 1e-30),
               max_eb[m], max_eb[m] / 128.0, -log2r(max_eb[m] + 1e-30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

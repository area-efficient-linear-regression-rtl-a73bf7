// tb_linreg_core: the regression core on random sequences.
//
// Three instances: the default (256/128 samples, 7 bits discarded for both
// models), the per-model-shift variant (7 bits for 256, 6 for 128), fed the
// same stream, and a sm one (16/8 samples) fed back-to-back sequences of
// the minimum length of four cycles. Sequences are random, steepest and
// pyramid-shaped unwrapped-phase trajectories, run back to back, with gaps
// and with restarts. Each result is checked bit-exactly against a model
// computed here from the integer sums and the rounded closed-form factors,
// against a floating-point least-squares fit within the truncation and
// rounding bound (at the instance's own output scaling), and for its latency
// of 11 cycles after the last pair.
module tb_linreg_core;
  import linreg_pkg::*;

  localparam int LAT = 11;

  logic clk = 1'b0, rst;
  logic start, start_s;
  model_e model, model_s;
  logic signed [16:0] d0, d1, d0_s, d1_s;
  logic v [3];
  model_e mo [3];
  logic signed [47:0] a [3], b [3];

  linreg_core dut0 (.clk(clk), .rst(rst), .start_i(start), .model_i(model), .d0_i(d0), .d1_i(d1),
                    .valid_o(v[0]), .model_o(mo[0]), .a_o(a[0]), .b_o(b[0]));
  linreg_core #(.SHIFT_SHORT(6)) dut1 (.clk(clk), .rst(rst), .start_i(start), .model_i(model),
                    .d0_i(d0), .d1_i(d1), .valid_o(v[1]), .model_o(mo[1]), .a_o(a[1]), .b_o(b[1]));
  linreg_core #(.N_LONG(16), .N_SHORT(8)) dut2 (.clk(clk), .rst(rst), .start_i(start_s),
                    .model_i(model_s), .d0_i(d0_s), .d1_i(d1_s), .valid_o(v[2]), .model_o(mo[2]),
                    .a_o(a[2]), .b_o(b[2]));

  always #5 clk = ~clk;

  typedef struct {
    model_e m;
    longint a_exp, b_exp;
    real    a_true, b_true, a_tol, b_tol;
    int     fa, fb;
    longint due;
  } exp_t;

  exp_t   q [3][$];
  int     checks = 0, failures = 0, n_res [3] = '{0, 0, 0};
  int     n_abort = 0, n_gap = 0, n_b2b = 0;
  longint cyc = 0;
  int     nl [3] = '{256, 256, 16};
  int     ns [3] = '{128, 128, 8};
  int     sl [3] = '{7, 7, 7};
  int     ss [3] = '{7, 6, 7};

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic real fac(input int n, input int o);
    real s1 = real'(n) * (n - 1) / 2.0;
    real s2 = real'(n - 1) * n * (2.0 * n - 1) / 6.0;
    real det = n * s2 - s1 * s1;
    case (o) 0: return n / det; 2: return s2 / det; default: return s1 / det; endcase
  endfunction

  function automatic longint rk(input int n, input int o, input int e);
    return longint'($floor(fac(n, o) * 2.0 ** e + 0.5));
  endfunction

  // largest e such that the pair (op p with e+sp, op r with e+sr) fits 18 signed bits
  function automatic int efit(input int n, input int p, input int sp, input int r, input int sr);
    int e = 0;
    while (rk(n, p, e + 1 + sp) < 131072 && rk(n, r, e + 1 + sr) < 131072) e++;
    return e;
  endfunction

  function automatic exp_t reference(input int inst, input model_e m, input int d[$]);
    exp_t   res;
    int     n = d.size();
    int     s = (m == MODEL_SHORT) ? ss[inst] : sl[inst];
    int     ea = efit(n, 0, s, 1, 0), eb = efit(n, 2, 0, 3, s);
    int     ea_l = efit(nl[inst], 0, sl[inst], 1, 0), eb_l = efit(nl[inst], 2, 0, 3, sl[inst]);
    longint sd = 0, sid = 0, t;
    real    mi, md, sxx = 0.0, sxy = 0.0, mag;
    for (int i = 0; i < n; i++) begin
      sd += d[i];
      sid += longint'(i) * d[i];
    end
    t = sid >>> s;
    res.m = m;
    res.fa = ea_l;
    res.fb = eb_l;
    res.a_exp = (rk(n, 0, ea + s) * t - rk(n, 1, ea) * sd) <<< (ea_l - ea);
    res.b_exp = (rk(n, 2, eb) * sd - rk(n, 3, eb + s) * t) <<< (eb_l - eb);
    mi = real'(n - 1) / 2.0;
    md = real'(sd) / n;
    for (int i = 0; i < n; i++) begin
      sxx += (i - mi) * (i - mi);
      sxy += (i - mi) * (d[i] - md);
    end
    res.a_true = sxy / sxx;
    res.b_true = md - res.a_true * mi;
    mag = 0.5 * (fabs(real'(t)) + fabs(real'(sd))) + 2.0;
    res.a_tol = (real'(rk(n, 0, ea + s)) + mag) / 2.0 ** ea;
    res.b_tol = (real'(rk(n, 3, eb + s)) + mag) / 2.0 ** eb;
    return res;
  endfunction

  // one sequence on the wide instances (inst 0 and 1) or the sm one (2)
  task automatic run_seq(input bit sm, input model_e m, input int kind, input int abort_at);
    int n = sm ? ((m == MODEL_SHORT) ? 8 : 16) : ((m == MODEL_SHORT) ? 128 : 256);
    int u = $signed($urandom_range(255)) - 128;
    int d[$];
    for (int i = 0; i < n; i++) begin
      if (i > 0)
        case (kind)
          1: u += 254;
          2: u -= 256;
          3: u += (i < n / 2) ? 254 : -256;
          default: u += $signed($urandom_range(510)) - 256;
        endcase
      d.push_back(u);
    end
    for (int c = 0; c < n / 2; c++) begin
      if (abort_at > 0 && c == abort_at) begin
        n_abort++;
        return;
      end
      @(negedge clk);
      if (sm) begin
        start_s = (c == 0); model_s = (c == 0) ? m : model_e'($urandom_range(1));
        d0_s = 17'(d[2 * c]); d1_s = 17'(d[2 * c + 1]);
      end else begin
        start = (c == 0); model = (c == 0) ? m : model_e'($urandom_range(1));
        d0 = 17'(d[2 * c]); d1 = 17'(d[2 * c + 1]);
      end
    end
    for (int inst = 0; inst < 3; inst++)
      if ((inst == 2) == sm) begin
        exp_t r = reference(inst, m, d);
        r.due = cyc + LAT;
        q[inst].push_back(r);
      end
  endtask

  task automatic idle(input bit sm, input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      if (sm) begin start_s = 0; d0_s = 17'($urandom); d1_s = 17'($urandom); end
      else       begin start   = 0; d0   = 17'($urandom); d1   = 17'($urandom); end
    end
  endtask

  always @(negedge clk) begin
    if (!rst)
      for (int inst = 0; inst < 3; inst++)
        if (v[inst]) begin
          exp_t r;
          n_res[inst]++;
          if (q[inst].size() == 0) check(0, $sformatf("inst %0d: unexpected result", inst));
          else begin
            r = q[inst].pop_front();
            check(cyc == r.due, $sformatf("inst %0d latency: at %0d due %0d", inst, cyc, r.due));
            check(mo[inst] == r.m, $sformatf("inst %0d model", inst));
            check(a[inst] == r.a_exp, $sformatf("inst %0d a %0d exp %0d", inst, a[inst], r.a_exp));
            check(b[inst] == r.b_exp, $sformatf("inst %0d b %0d exp %0d", inst, b[inst], r.b_exp));
            check(fabs(real'(a[inst]) / 2.0 ** r.fa - r.a_true) <= r.a_tol,
                  $sformatf("inst %0d a %f vs %f", inst, real'(a[inst]) / 2.0 ** r.fa, r.a_true));
            check(fabs(real'(b[inst]) / 2.0 ** r.fb - r.b_true) <= r.b_tol,
                  $sformatf("inst %0d b %f vs %f", inst, real'(b[inst]) / 2.0 ** r.fb, r.b_true));
          end
        end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; start_s = 0; model = MODEL_LONG; model_s = MODEL_LONG;
    d0 = 0; d1 = 0; d0_s = 0; d1_s = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    fork
      begin
        for (int kind = 0; kind < 4; kind++) begin
          run_seq(0, MODEL_LONG, kind, 0);
          run_seq(0, MODEL_SHORT, kind, 0);
          n_b2b++;
        end
        idle(0, 5); n_gap++;
        run_seq(0, MODEL_LONG, 0, 40);
        run_seq(0, MODEL_SHORT, 0, 0);
        for (int i = 0; i < 8; i++) begin
          run_seq(0, model_e'($urandom_range(1)), $urandom_range(3), 0);
          if ($urandom_range(1)) idle(0, $urandom_range(6));
        end
        idle(0, 20);
      end
      begin
        for (int i = 0; i < 200; i++) begin
          run_seq(1, model_e'($urandom_range(1)), $urandom_range(3),
                   ($urandom_range(9) == 0) ? 2 : 0);
          if ($urandom_range(7) == 0) idle(1, $urandom_range(3));
        end
        idle(1, 20);
      end
    join
    for (int inst = 0; inst < 3; inst++)
      check(q[inst].size() == 0 && n_res[inst] > 0, $sformatf("inst %0d all results", inst));
    check(n_abort > 1 && n_gap > 0 && n_b2b > 0, "restart, gap and back-to-back exercised");
    $display("results: %0d %0d %0d, restarts %0d", n_res[0], n_res[1], n_res[2], n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_amc_linreg_top: end-to-end test of the phase-slope stage at its default
// parameters (256- and 128-sample models, 7 bits discarded for both).
//
// Phase trajectories are generated as unwrapped phase (steps of at most pi
// per sample) and fed wrapped to 8 bits, four per clock. For every complete
// packet the expected a and b are computed here twice: bit-exactly from the
// integer sums, the discard shift and constants rounded from the closed-form
// least-squares factors (scalings 2^37/2^30/2^23/2^30 for 256 samples and
// 2^34/2^27/2^21/2^28 for 128 samples), and as a floating-point least-squares
// fit that the result must match within the truncation and rounding bound.
// The latency from the last phases of a packet to valid_o must be 12 cycles.
// Exercised and counted: both models, back-to-back packets, idle gaps, a
// packet cut short by a new start, phase wrap-arounds and extreme slopes.
module tb_amc_linreg_top;
  import linreg_pkg::*;

  localparam int LAT = 12;

  logic clk = 1'b0;
  logic rst;
  logic signed [7:0] ph [4];
  logic start;
  model_e model;
  logic valid;
  model_e model_o;
  logic signed [47:0] a_o, b_o;

  amc_linreg_top dut (
    .clk(clk), .rst(rst), .ph_i(ph), .start_i(start), .model_i(model),
    .valid_o(valid), .model_o(model_o), .a_o(a_o), .b_o(b_o)
  );

  always #5 clk = ~clk;

  typedef struct {
    model_e      m;
    longint      a_exp, b_exp;
    real         a_true, b_true, a_tol, b_tol;
    longint      cyc_last;
  } exp_t;

  exp_t   q[$];
  int     checks = 0, failures = 0;
  longint cyc = 0;
  int     n_long = 0, n_short = 0, n_b2b = 0, n_gap = 0, n_abort = 0, n_wrap = 0,
          n_extreme = 0, n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ---- reference ----
  function automatic longint rnd_const(input longint num, input longint den, input int e);
    return longint'($floor(real'(num) * (2.0 ** e) / real'(den) + 0.5));
  endfunction

  function automatic exp_t reference(input model_e m, input int d[$]);
    exp_t   r;
    int     n = d.size();
    longint sd = 0, sid = 0, t, s1, s2, det, k0, k1, k2, k3;
    int     ea, eb, e0, e3;
    real    mi, md, sxx, sxy;
    for (int i = 0; i < n; i++) begin
      sd  += d[i];
      sid += longint'(i) * d[i];
    end
    t   = sid >>> 7;
    s1  = longint'(n) * (n - 1) / 2;
    s2  = longint'(n - 1) * n * (2 * n - 1) / 6;
    det = longint'(n) * s2 - s1 * s1;
    if (m == MODEL_LONG) begin ea = 30; eb = 23; e0 = 37; e3 = 30; end
    else                 begin ea = 27; eb = 21; e0 = 34; e3 = 28; end
    k0 = rnd_const(n,  det, e0);
    k1 = rnd_const(s1, det, ea);
    k2 = rnd_const(s2, det, eb);
    k3 = rnd_const(s1, det, e3);
    r.m = m;
    r.a_exp = (k0 * t - k1 * sd) <<< (30 - ea);
    r.b_exp = (k2 * sd - k3 * t) <<< (23 - eb);
    // floating-point least squares
    mi = real'(n - 1) / 2.0;
    md = real'(sd) / n;
    sxx = 0.0; sxy = 0.0;
    for (int i = 0; i < n; i++) begin
      sxx += (i - mi) * (i - mi);
      sxy += (i - mi) * (d[i] - md);
    end
    r.a_true = sxy / sxx;
    r.b_true = md - r.a_true * mi;
    r.a_tol = (real'(k0) + 0.5 * (real'(t < 0 ? -t : t) + real'(sd < 0 ? -sd : sd)) + 2.0)
              / (2.0 ** ea);
    r.b_tol = (real'(k3) + 0.5 * (real'(t < 0 ? -t : t) + real'(sd < 0 ? -sd : sd)) + 2.0)
              / (2.0 ** eb);
    return r;
  endfunction

  // ---- stimulus ----
  // kind: 0 random steps, 1 steepest rise, 2 steepest fall, 3 pyramid, 4 noisy line
  function automatic int next_step(input int kind, input int j, input int len, input int slope);
    case (kind)
      1: return 127;
      2: return -128;
      3: return (j < len / 2) ? 127 : -128;
      4: return slope + $signed($urandom_range(16)) - 8;
      default: return $signed($urandom_range(255)) - 128;
    endcase
  endfunction

  task automatic idle_cycle();
    @(negedge clk);
    start = 1'b0;
    for (int j = 0; j < 4; j++) ph[j] = 8'($urandom);
  endtask

  // drives one packet; abort_at > 0 stops it after that many clocks
  task automatic packet(input model_e m, input int kind, input int abort_at);
    int len  = (m == MODEL_LONG) ? 512 : 256;
    int u    = $signed($urandom_range(255)) - 128;
    int slope = $signed($urandom_range(200)) - 100;
    int d[$];
    exp_t r;
    byte prev = 0;
    for (int c = 0; c < len / 4; c++) begin
      if (abort_at > 0 && c == abort_at) begin
        n_abort++;
        return;
      end
      @(negedge clk);
      start = (c == 0);
      model = (c == 0) ? m : model_e'($urandom_range(1));
      for (int j = 0; j < 4; j++) begin
        int idx = 4 * c + j;
        int st;
        if (idx > 0) begin
          st = next_step(kind, idx, len, slope);
          if (st > 127) st = 127;
          if (st < -128) st = -128;
          u += st;
        end
        ph[j] = 8'(u);
        if (idx > 0 && ((ph[j] - prev) > 127 || (ph[j] - prev) < -128)) n_wrap++;
        prev = ph[j];
        if (j % 2 == 0) d.push_back(u);
      end
    end
    r = reference(m, d);
    r.cyc_last = cyc;
    q.push_back(r);
    if (m == MODEL_LONG) n_long++; else n_short++;
    if (kind == 1 || kind == 2 || kind == 3) n_extreme++;
  endtask

  // ---- monitor ----
  always @(negedge clk) begin
    if (!rst && valid) begin
      exp_t r;
      n_out++;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        r = q.pop_front();
        check(model_o == r.m, "model");
        check(cyc - r.cyc_last == LAT, $sformatf("latency %0d", cyc - r.cyc_last));
        check(a_o == r.a_exp, $sformatf("a bit-exact: got %0d exp %0d", a_o, r.a_exp));
        check(b_o == r.b_exp, $sformatf("b bit-exact: got %0d exp %0d", b_o, r.b_exp));
        check(fabs(real'(a_o) / 2.0 ** 30 - r.a_true) <= r.a_tol,
              $sformatf("a %f vs least squares %f", real'(a_o) / 2.0 ** 30, r.a_true));
        check(fabs(real'(b_o) / 2.0 ** 23 - r.b_true) <= r.b_tol,
              $sformatf("b %f vs least squares %f", real'(b_o) / 2.0 ** 23, r.b_true));
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    start = 1'b0;
    model = MODEL_LONG;
    for (int j = 0; j < 4; j++) ph[j] = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    idle_cycle();
    // the five trajectory kinds on both models, back to back
    for (int kind = 0; kind < 5; kind++) begin
      packet(MODEL_LONG, kind, 0);
      n_b2b++;
      packet(MODEL_SHORT, kind, 0);
      n_b2b++;
    end
    // idle gaps
    repeat (3) idle_cycle();
    n_gap++;
    packet(MODEL_SHORT, 0, 0);
    repeat (17) idle_cycle();
    n_gap++;
    // a packet cut short by a new start, then complete ones
    packet(MODEL_LONG, 0, 50);
    packet(MODEL_SHORT, 4, 0);
    packet(MODEL_SHORT, 0, 20);
    packet(MODEL_LONG, 4, 0);
    n_b2b++;
    for (int i = 0; i < 6; i++) packet(model_e'($urandom_range(1)), $urandom_range(4), 0);
    repeat (30) idle_cycle();
    check(q.size() == 0, "all packets produced a result");
    check(n_out == n_long + n_short, "one result per complete packet");
    $display("mechanisms: long=%0d short=%0d back_to_back=%0d gap=%0d abort=%0d wrap=%0d extreme=%0d",
             n_long, n_short, n_b2b, n_gap, n_abort, n_wrap, n_extreme);
    check(n_long > 0 && n_short > 0 && n_b2b > 0 && n_gap > 0 && n_abort > 0 &&
          n_wrap > 0 && n_extreme > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

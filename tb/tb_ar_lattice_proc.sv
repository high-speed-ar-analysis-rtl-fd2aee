// tb_ar_lattice_proc: end-to-end test of the lattice-filter AR processor at
// order P = 4 with N = Q*P = 400 samples per stage. An AR(2) signal,
// x(n) = 1.2 x(n-1) - 0.6 x(n-2) + w(n), is streamed without pause; its
// reflection coefficients are k_1 = -0.75, k_2 = 0.6, k_3 = k_4 = 0, and
// the estimates must come within 0.12 (k_1, k_2) or 0.2 (k_3, k_4, whose
// spread is larger) of them. Each loaded coefficient is also compared with
// a floating-point model of the processor fed the same samples on the same
// timing (tb_util_pkg::lattice_ref); these must agree within 0.005, which
// leaves only the fixed-point rounding. Also checked: one load per
// stage in order, the k outputs, one calc pulse per stage, the adaptation
// time (at most P*(N + 75) samples), and that the prediction error power
// at the output falls below 0.45 of the signal power after adaptation
// (the theoretical ratio is 0.28), while it equals the signal power before.
// The processor is then adapted a second time in buffered mode: one array
// of N samples is captured and played to the filter cyclically. The model
// is fed through a model of that buffer (tb_util_pkg::buffer_ref) and
// must agree as before; the
// estimates, all from one array, must come within 0.2 of the true values;
// the error power, load and calc counts and busy during the capture are
// checked again.
module tb_ar_lattice_proc;
  import tb_util_pkg::*;
  localparam int P = 4, Q = 100, N = P * Q;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, buffered = 0, x_valid = 0, k_valid, calc, busy, done, sat;
  logic signed [15:0] x = 0;
  logic signed [17:0] e_out, k_val;
  logic signed [17:0] k [P];
  logic [2:0] k_idx;

  ar_lattice_proc #(.P(P), .Q(Q), .DATA_W(16), .EW(18), .KW(18), .KF(16), .ACC_W(48)) dut (.*);

  int checks = 0, failures = 0;
  int n_load = 0, n_calc = 0;
  logic calc_d = 0;
  real kexp [5] = '{0.0, -0.75, 0.6, 0.0, 0.0};
  real ktol [5] = '{0.0, 0.12, 0.12, 0.2, 0.2};
  lattice_ref lref = new(P, N);

  buffer_ref bref = new(N);

  always @(posedge clk) begin
    bit  m_load, fv, cst;
    real m_k, fx;
    bref.step(start, buffered, done, x_valid, real'(x), fv, fx, cst);
    lref.step(cst, fv, fx, k_valid, m_load, m_k);
    if (k_valid) begin
      checks++;
      if (!m_load || fabs(m_k - real'(k_val) / 65536.0) > 0.005) begin
        failures++;
        $display("k%0d %f, model %f (model ready %0d)", k_idx, real'(k_val) / 65536.0, m_k, m_load);
      end
      $display("k%0d model %f", k_idx, m_k);
    end
    calc_d <= calc;
    if (calc && !calc_d) n_calc++;
    if (k_valid) begin
      real kg;
      n_load++;
      kg = real'(k_val) / 65536.0;
      checks += 2;
      if (k_idx != 3'((n_load - 1) % P + 1)) begin failures++; $display("load order"); end
      if (fabs(kg - kexp[k_idx]) > (buffered ? 0.2 : ktol[k_idx])) begin failures++; $display("k%0d %f exp %f", k_idx, kg, kexp[k_idx]); end
      $display("k%0d = %f", k_idx, kg);
    end
  end

  real x1 = 0.0, x2 = 0.0;
  task automatic sample();
    real v;
    v = ar2_next(x1, x2, 1500);
    x2 = x1; x1 = v;
    x = 16'(longint'(v)); x_valid = 1;
    @(posedge clk); #1;
  endtask

  task automatic power(output real px, output real pe);
    px = 0.0; pe = 0.0;
    for (int n = 0; n < 2000; n++) begin
      sample();
      px += real'(x) * real'(x);
      pe += real'(e_out) * real'(e_out);
    end
  endtask

  initial begin
    real px, pe;
    int t0, ns;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 100; n++) sample();
    power(px, pe);
    checks++;
    if (fabs(pe / px - 1.0) > 0.05) begin failures++; $display("unadapted ratio %f", pe / px); end
    start = 1;
    sample();
    start = 0;
    ns = 0;
    while (!done) begin sample(); ns++; end
    checks++;
    if (ns > P * (N + 75)) begin failures++; $display("adaptation took %0d samples", ns); end
    $display("adaptation took %0d samples", ns);
    for (int n = 0; n < 50; n++) sample();
    power(px, pe);
    $display("error power ratio %f", pe / px);
    checks += 4;
    if (pe / px > 0.45) begin failures++; $display("error power ratio %f", pe / px); end
    if (n_load != P) begin failures++; $display("loads %0d", n_load); end
    if (n_calc != P) begin failures++; $display("calc pulses %0d", n_calc); end
    if (busy) begin failures++; $display("busy after done"); end
    for (int j = 0; j < P; j++) begin
      checks++;
      if (fabs(real'(k[j]) / 65536.0 - kexp[j+1]) > ktol[j+1]) begin failures++; $display("k[%0d]", j); end
    end

    // second adaptation from one captured array of N samples, fed P times
    for (int n = 0; n < 37; n++) sample();
    buffered = 1;
    start = 1;
    sample();
    start = 0;
    ns = 0;
    while (!done) begin sample(); ns++; if (ns == N) begin checks++; if (!busy) begin failures++; $display("not busy while buffered"); end end end
    $display("buffered adaptation took %0d samples", ns);
    checks++;
    if (ns > N + P * (N + 75)) begin failures++; $display("buffered adaptation took %0d samples", ns); end
    buffered = 0;
    for (int n = 0; n < 50; n++) sample();
    power(px, pe);
    $display("error power ratio %f", pe / px);
    checks += 3;
    if (pe / px > 0.45) begin failures++; $display("error power ratio %f", pe / px); end
    if (n_load != 2 * P) begin failures++; $display("loads %0d", n_load); end
    if (n_calc != 2 * P) begin failures++; $display("calc pulses %0d", n_calc); end
    for (int j = 0; j < P; j++) begin
      checks++;
      if (fabs(real'(k[j]) / 65536.0 - kexp[j+1]) > 0.2) begin failures++; $display("k[%0d]", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

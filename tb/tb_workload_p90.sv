// tb_workload_p90: the larger configuration of the evaluation, prediction
// order p = 90 with 16-bit data and N = 10p = 900 samples, run on ar_top.
//   Durbin path: one frame of an AR(2) signal; all 90 k_i and a_i are
//   compared with a floating-point Levinson-Durbin solution of the frame's
//   autocorrelation (tolerance 0.03 (1 + |value|)), and the solve time is
//   reported.
//   Lattice path: one adaptation over 90 stages; k_1, k_2 must come within
//   0.1 of -0.75 and 0.6, the rest within 0.2 of 0, each must agree within
//   0.005 with a floating-point model of the processor fed the same samples
//   on the same timing (tb_util_pkg::lattice_ref), and the adaptation time
//   must be 90 * (N + 69) + 1 samples (counting the start sample).
module tb_workload_p90;
  import ar_pkg::*;
  import tb_util_pkg::*;
  localparam int P = 90, N = 900;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic d_x_valid = 0, d_coef_valid, d_coef_is_a, d_busy, d_done, d_overrun;
  logic signed [15:0] d_x = 0, l_x = 0;
  logic [6:0] d_coef_idx, l_k_idx;
  rat_t d_coef_frac;
  logic signed [31:0] d_coef_fixed;
  logic l_start = 0, l_buffered = 0, l_x_valid = 0, l_k_valid, l_calc, l_busy, l_done, l_sat;
  logic signed [17:0] l_e_out, l_k_val;
  logic signed [17:0] l_k [P];

  ar_top #(.P(P), .Q(10), .DATA_W(16)) dut (.*);

  int checks = 0, failures = 0;
  int out_cnt = 0, n_kload = 0, t_solve = 0, cyc = 0;
  rvec_t kref, aref;
  bit d_fin = 0, l_fin = 0;
  real kexp [3] = '{0.0, -0.75, 0.6};
  real maxerr = 0.0, lmaxerr = 0.0;
  lattice_ref lref = new(P, N);
  bit  m_load;
  real m_k;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    lref.step(l_start, l_x_valid, real'(l_x), l_k_valid, m_load, m_k);
    if (l_k_valid) begin
      real kg;
      n_kload++;
      kg = real'(l_k_val) / 65536.0;
      checks += 2;
      if (fabs(m_k - kg) > lmaxerr) lmaxerr = fabs(m_k - kg);
      if (!m_load || fabs(m_k - kg) > 0.005) begin
        failures++; $display("lattice k%0d %f, model %f (model ready %0d)", l_k_idx, kg, m_k, m_load);
      end
      if (fabs(kg - ((l_k_idx <= 2) ? kexp[l_k_idx] : 0.0)) > ((l_k_idx <= 2) ? 0.1 : 0.2)) begin
        failures++; $display("lattice k%0d %f", l_k_idx, kg);
      end
    end
    if (d_coef_valid) begin
      real g, e;
      int idx;
      idx = (out_cnt % P) + 1;
      checks += 2;
      if (d_coef_is_a != (out_cnt >= P) || d_coef_idx != 7'(idx)) begin failures++; $display("result order"); end
      e = (out_cnt >= P) ? aref[idx] : kref[idx];
      g = rat_real(d_coef_frac);
      if (fabs(g - e) > maxerr) maxerr = fabs(g - e);
      if (fabs(g - e) > 0.03 * (1.0 + fabs(e))) begin
        failures++; $display("durbin %s%0d %f exp %f", (out_cnt >= P) ? "a" : "k", idx, g, e);
      end
      out_cnt++;
    end
  end

  initial begin : durbin_path
    longint xs [N];
    real x1, x2, v;
    rvec_t rr;
    int t0;
    x1 = 0.0; x2 = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      xs[n] = longint'(v);
      d_x = 16'(xs[n]); d_x_valid = 1;
      @(posedge clk); #1;
    end
    d_x_valid = 0;
    for (int i = 0; i <= MAXP; i++) rr[i] = 0.0;
    for (int i = 0; i <= P; i++)
      for (int n = i; n < N; n++) rr[i] += real'(xs[n] * xs[n-i]);
    levinson(P, rr, kref, aref);
    t0 = cyc;
    while (!d_coef_valid) begin @(posedge clk); #1; end
    t_solve = cyc - t0;
    while (!d_done) begin @(posedge clk); #1; end
    repeat (50) @(posedge clk);
    #1;
    $display("durbin p=90: first result after %0d cycles, largest error %f", t_solve, maxerr);
    checks++;
    if (out_cnt != 2 * P) begin failures++; $display("results %0d", out_cnt); end
    d_fin = 1;
  end

  initial begin : lattice_path
    real x1, x2, v, px, pe;
    int ns;
    x1 = 0.0; x2 = 0.0;
    repeat (5) @(posedge clk);
    #1;
    l_start = 1;
    ns = 0;
    while (!l_done || ns == 0) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      l_x = 16'(longint'(v)); l_x_valid = 1;
      @(posedge clk); #1;
      l_start = 0;
      ns++;
    end
    px = 0.0; pe = 0.0;
    for (int n = 0; n < 3000; n++) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      l_x = 16'(longint'(v)); l_x_valid = 1;
      @(posedge clk); #1;
      if (n > 100) begin
        px += real'(l_x) * real'(l_x);
        pe += real'(l_e_out) * real'(l_e_out);
      end
    end
    $display("lattice p=90: adapted in %0d samples, error power ratio %f, largest difference from model %f", ns, pe / px, lmaxerr);
    checks += 3;
    if (ns != P * (N + 69) + 1) begin failures++; $display("adaptation time %0d", ns); end
    if (n_kload != P) begin failures++; $display("loads %0d", n_kload); end
    if (pe / px > 0.6) begin failures++; $display("error power ratio %f", pe / px); end
    l_fin = 1;
  end

  initial begin
    wait (d_fin && l_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

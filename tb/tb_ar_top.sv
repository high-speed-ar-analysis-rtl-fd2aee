// tb_ar_top: runs both AR processors of ar_top end to end with every
// parameter at its default (order P = 10, N = 10*P = 100 samples).
//   Durbin path: an AR(2) signal is streamed without pause for 40 frames;
//   every frame taken by the Durbin processor is checked (k_1..k_10 and
//   a_1..a_10, fraction and fixed point) against a floating-point
//   Levinson-Durbin solution of that frame's autocorrelation.
//   Lattice path: a second AR(2) signal is streamed, the processor adapted
//   once; k_1, k_2 must be within 0.2 of -0.75 and 0.6, the others within 0.4 of 0
//   (estimates from only 100 samples per stage), then adapted again in
//   buffered mode (one captured array of 100 samples fed to all stages;
//   all k within 0.4, adaptation N + P*(N + 69) + 1 samples); each loaded coefficient
//   must agree within 0.005 with a floating-point model of the processor
//   fed the same samples on the same timing (tb_util_pkg::lattice_ref), and
//   the prediction error power must fall well below the signal power.
// Mechanisms counted (a failure if one never happens): frames solved, frames
// dropped while the solver is busy (overrun), correlation accumulation
// overlapping a solve, fraction-to-fixed conversions, lattice coefficient
// loads and calculation periods, adaptations on the stream and buffered.
module tb_ar_top;
  import ar_pkg::*;
  import tb_util_pkg::*;
  localparam int P = 10, N = 100;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic d_x_valid = 0, d_coef_valid, d_coef_is_a, d_busy, d_done, d_overrun;
  logic signed [15:0] d_x = 0, l_x = 0;
  logic [3:0] d_coef_idx, l_k_idx;
  rat_t d_coef_frac;
  logic signed [31:0] d_coef_fixed;
  logic l_start = 0, l_buffered = 0, l_x_valid = 0, l_k_valid, l_calc, l_busy, l_done, l_sat;
  logic signed [17:0] l_e_out, l_k_val;
  logic signed [17:0] l_k [P];

  ar_top dut (.*);

  int checks = 0, failures = 0;
  int n_solved = 0, n_overrun = 0, n_overlap = 0, n_conv = 0, n_kload = 0, n_calc = 0;
  real kref [8][MAXP+1];
  real aref [8][MAXP+1];
  int  n_ref = 0, n_used = 0, cur = 0, out_cnt = 0;
  logic calc_d = 0;
  real kexp [3] = '{0.0, -0.75, 0.6};
  lattice_ref lref = new(P, N);

  bit  m_load, m_fv, m_cst;
  real m_k, m_fx;
  buffer_ref bref = new(N);
  int  n_buf_adapt = 0, n_stream_adapt = 0;
  always @(posedge clk) begin
    if (d_overrun) n_overrun++;
    if (d_done) n_solved++;
    if (d_busy && d_x_valid) n_overlap++;
    calc_d <= l_calc;
    if (l_calc && !calc_d) n_calc++;
    bref.step(l_start, l_buffered, l_done, l_x_valid, real'(l_x), m_fv, m_fx, m_cst);
    lref.step(m_cst, m_fv, m_fx, l_k_valid, m_load, m_k);
    if (l_k_valid) begin
      real kg;
      n_kload++;
      kg = real'(l_k_val) / 65536.0;
      checks += 2;
      if (fabs(kg - ((l_k_idx <= 2) ? kexp[l_k_idx] : 0.0)) > ((l_k_idx <= 2 && !l_buffered) ? 0.2 : 0.4)) begin
        failures++; $display("lattice k%0d %f", l_k_idx, kg);
      end
      if (!m_load || fabs(m_k - kg) > 0.005) begin
        failures++; $display("lattice k%0d %f, model %f (model ready %0d)", l_k_idx, kg, m_k, m_load);
      end
    end
    if (d_coef_valid) begin
      real g, e;
      longint qe;
      int idx;
      n_conv++;
      if (out_cnt == 0) begin
        if (n_used >= n_ref) begin failures++; $display("unexpected result"); end
        cur = n_used;
        n_used++;
      end
      idx = (out_cnt % P) + 1;
      checks += 3;
      if (d_coef_is_a != (out_cnt >= P) || d_coef_idx != 4'(idx)) begin failures++; $display("result order"); end
      e = (out_cnt >= P) ? aref[cur][idx] : kref[cur][idx];
      g = rat_real(d_coef_frac);
      if (fabs(g - e) > 0.02 * (1.0 + fabs(e))) begin
        failures++; $display("durbin %s%0d %f exp %f", (out_cnt >= P) ? "a" : "k", idx, g, e);
      end
      qe = (longint'(d_coef_frac.n) * 65536) / longint'(d_coef_frac.d);
      if (longint'(d_coef_fixed) != qe) begin failures++; $display("fixed %0d exp %0d", d_coef_fixed, qe); end
      out_cnt = (out_cnt == 2 * P - 1) ? 0 : out_cnt + 1;
    end
  end

  // Durbin path stimulus
  initial begin : durbin_path
    longint xs [N];
    real x1, x2, v;
    rvec_t rr, kk, aa;
    x1 = 0.0; x2 = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 40; f++) begin
      for (int n = 0; n < N; n++) begin
        v = ar2_next(x1, x2, 1500);
        x2 = x1; x1 = v;
        xs[n] = longint'(v);
        d_x = 16'(xs[n]); d_x_valid = 1;
        @(posedge clk); #1;
      end
      d_x_valid = 0;
      if (!d_busy) begin
        for (int i = 0; i <= MAXP; i++) rr[i] = 0.0;
        for (int i = 0; i <= P; i++)
          for (int n = i; n < N; n++) rr[i] += real'(xs[n] * xs[n-i]);
        levinson(P, rr, kk, aa);
        for (int i = 0; i <= MAXP; i++) begin kref[n_ref][i] = kk[i]; aref[n_ref][i] = aa[i]; end
        n_ref++;
      end
    end
    d_x_valid = 0;
  end

  // lattice path stimulus and final checks
  initial begin : lattice_path
    real x1, x2, v, px, pe;
    int ns;
    x1 = 0.0; x2 = 0.0;
    repeat (5) @(posedge clk);
    #1;
    for (int n = 0; n < 50; n++) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      l_x = 16'(longint'(v)); l_x_valid = 1;
      @(posedge clk); #1;
    end
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
      if (n > 20) begin
        px += real'(l_x) * real'(l_x);
        pe += real'(l_e_out) * real'(l_e_out);
      end
    end
    $display("lattice: adapted in %0d samples, error power ratio %f", ns, pe / px);
    checks++;
    if (pe / px > 0.5) begin failures++; $display("error power ratio %f", pe / px); end
    n_stream_adapt++;

    // again in buffered mode: one captured array of N samples fed P times
    l_buffered = 1;
    l_start = 1;
    ns = 0;
    while (!l_done || ns == 0) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      l_x = 16'(longint'(v)); l_x_valid = 1;
      @(posedge clk); #1;
      l_start = 0;
      ns++;
    end
    l_buffered = 0;
    n_buf_adapt++;
    px = 0.0; pe = 0.0;
    for (int n = 0; n < 3000; n++) begin
      v = ar2_next(x1, x2, 1500); x2 = x1; x1 = v;
      l_x = 16'(longint'(v)); l_x_valid = 1;
      @(posedge clk); #1;
      if (n > 20) begin
        px += real'(l_x) * real'(l_x);
        pe += real'(l_e_out) * real'(l_e_out);
      end
    end
    l_x_valid = 0;
    $display("lattice, buffered: adapted in %0d samples, error power ratio %f", ns, pe / px);
    checks += 2;
    if (pe / px > 0.5) begin failures++; $display("error power ratio %f", pe / px); end
    if (ns != N + P * (N + 69) + 1) begin failures++; $display("buffered adaptation %0d samples", ns); end

    // wait for the Durbin path to finish
    wait (n_ref > 0);
    while (d_x_valid || d_busy || n_used < n_ref) begin @(posedge clk); #1; end
    repeat (50) @(posedge clk);
    $display("durbin: solved %0d overrun %0d overlap %0d conversions %0d", n_solved, n_overrun, n_overlap, n_conv);
    $display("lattice: loads %0d calc periods %0d, adaptations on the stream %0d, buffered %0d", n_kload, n_calc, n_stream_adapt, n_buf_adapt);
    checks += 8;
    if (n_solved == 0) begin failures++; $display("no frame solved"); end
    if (n_solved != n_ref) begin failures++; $display("solved %0d expected %0d", n_solved, n_ref); end
    if (n_overrun == 0) begin failures++; $display("overrun never happened"); end
    if (n_overrun + n_ref != 40) begin failures++; $display("frames lost"); end
    if (n_overlap == 0) begin failures++; $display("no overlap"); end
    if (n_conv != 2 * P * n_ref) begin failures++; $display("conversions %0d", n_conv); end
    if (n_kload != 2 * P) begin failures++; $display("lattice loads %0d", n_kload); end
    if (n_calc != 2 * P) begin failures++; $display("calc periods %0d", n_calc); end
    checks += 2;
    if (n_stream_adapt == 0) begin failures++; $display("no adaptation on the stream"); end
    if (n_buf_adapt == 0) begin failures++; $display("no buffered adaptation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ar_durbin_proc: end-to-end test of the Durbin-based AR processor at
// order P = 4 with frames of N = Q*P = 200 samples. An AR(2) signal is
// streamed continuously (with a few idle cycles). For every frame the
// testbench decides from the busy output whether the frame is taken or
// dropped (then overrun must pulse), and for every frame taken it checks
// k_1..k_P and a_1..a_P, as fractions and in fixed point, against a
// floating-point Levinson-Durbin solution of the frame's own biased
// autocorrelation, and the fixed-point value against the fraction.
module tb_ar_durbin_proc;
  import ar_pkg::*;
  import tb_util_pkg::*;
  localparam int P = 4, Q = 50, N = P * Q;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic x_valid = 0, coef_valid, coef_is_a, busy, done, overrun;
  logic signed [15:0] x = 0;
  logic [2:0] coef_idx;
  rat_t coef_frac;
  logic signed [31:0] coef_fixed;

  ar_durbin_proc #(.P(P), .Q(Q), .DATA_W(16), .ACC_W(48), .OUT_W(32), .FRAC(16)) dut (.*);

  int checks = 0, failures = 0;
  int n_taken = 0, n_dropped = 0, n_overrun = 0, n_coef = 0, n_done = 0;

  real kref [16][MAXP+1];   // references of accepted frames
  real aref [16][MAXP+1];
  int  n_ref = 0, n_used = 0, cur = 0;
  int out_cnt = 0;

  always @(posedge clk) begin
    if (overrun) n_overrun++;
    if (done) n_done++;
    if (coef_valid) begin
      real g, e;
      longint qe;
      int idx;
      if (out_cnt == 0) begin
        if (n_used >= n_ref) begin failures++; $display("unexpected result"); end
        cur = n_used;
        n_used++;
      end
      idx = (out_cnt % P) + 1;
      checks += 3;
      if (coef_is_a != (out_cnt >= P) || coef_idx != 3'(idx)) begin failures++; $display("result order"); end
      e = (out_cnt >= P) ? aref[cur][idx] : kref[cur][idx];
      g = rat_real(coef_frac);
      if (fabs(g - e) > 0.01 * (1.0 + fabs(e))) begin
        failures++; $display("%s%0d %f exp %f", (out_cnt >= P) ? "a" : "k", idx, g, e);
      end
      qe = (longint'(coef_frac.n) * 65536) / longint'(coef_frac.d);
      if (longint'(coef_fixed) != qe) begin failures++; $display("fixed %0d exp %0d", coef_fixed, qe); end
      n_coef++;
      out_cnt = (out_cnt == 2 * P - 1) ? 0 : out_cnt + 1;
    end
  end

  initial begin
    longint xs [N];
    real x1, x2, v;
    rvec_t rr, kk, aa;
    bit taken;
    x1 = 0.0; x2 = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 12; f++) begin
      for (int n = 0; n < N; n++) begin
        v = ar2_next(x1, x2, 1500);
        x2 = x1; x1 = v;
        xs[n] = longint'(v);
        x = 16'(xs[n]); x_valid = 1;
        @(posedge clk); #1;
        x_valid = 0;
        if (n == 50) begin @(posedge clk); #1; end
      end
      // the cycle after the last sample: r_valid, taken if not busy
      taken = !busy;
      for (int i = 0; i <= MAXP; i++) rr[i] = 0.0;
      for (int i = 0; i <= P; i++)
        for (int n = i; n < N; n++) rr[i] += real'(xs[n] * xs[n-i]);
      if (taken) begin
        levinson(P, rr, kk, aa);
        for (int i = 0; i <= MAXP; i++) begin
          kref[n_ref][i] = kk[i]; aref[n_ref][i] = aa[i];
        end
        n_ref++;
        n_taken++;
      end else n_dropped++;
    end
    while (busy || n_used < n_ref) begin @(posedge clk); #1; end
    repeat (60) @(posedge clk);
    checks += 4;
    if (n_overrun != n_dropped) begin failures++; $display("overrun %0d dropped %0d", n_overrun, n_dropped); end
    if (n_coef != 2 * P * n_taken) begin failures++; $display("coefficients %0d", n_coef); end
    if (n_done != n_taken) begin failures++; $display("done %0d", n_done); end
    if (n_dropped == 0 || n_taken < 2) begin failures++; $display("frame pipeline not exercised"); end
    $display("frames taken %0d dropped %0d", n_taken, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

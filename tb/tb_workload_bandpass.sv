// tb_workload_bandpass: the prediction-error experiment of the evaluation:
// white noise filtered by a 6th-order IIR band-pass filter is analysed by
// the lattice-filter AR processor (default configuration, P = 10,
// N = 100). The band-pass filter here is three cascaded two-pole resonators
// (pole radius 0.9, angles 0.7, 0.8 and 0.9 rad), this testbench's own
// choice. Checked: all 10 coefficients are loaded with |k_j| < 1 and agree
// within 0.05 with a floating-point model of the processor fed the same
// samples on the same timing (tb_util_pkg::lattice_ref; the later stages
// see a residual of only a few LSBs of the 18-bit error path, so the
// rounding noise limits the agreement there), the
// prediction error power after adaptation is below 1/10 of the signal
// power, and the error power shrinks from the first to the last stage
// (measured during the adaptation, stage by stage, as the calc pulses
// mark the periods of the coefficient calculation). The Durbin path of the
// top is fed the same signal and its k_i must also satisfy |k_i| < 1.
module tb_workload_bandpass;
  import ar_pkg::*;
  import tb_util_pkg::*;
  localparam int P = 10;

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

  int checks = 0, failures = 0, n_kload = 0, n_dk = 0;
  real seg_pe [P+1];
  int  seg_n [P+1];
  lattice_ref lref = new(P, 10 * P);
  bit  m_load;
  real m_k;

  always @(posedge clk) begin
    lref.step(l_start, l_x_valid, real'(l_x), l_k_valid, m_load, m_k);
    if (l_k_valid) begin
      n_kload++;
      checks += 2;
      if (!m_load || fabs(m_k - real'(l_k_val) / 65536.0) > 0.05) begin
        failures++; $display("k%0d %f, model %f (model ready %0d)", l_k_idx, real'(l_k_val) / 65536.0, m_k, m_load);
      end
      if (l_k_val == -18'sd65536 || l_k_val > 18'sd65535 || l_k_val < -18'sd65535) begin
        failures++; $display("|k%0d| >= 1", l_k_idx);
      end
      $display("k%0d = %f (model %f)", l_k_idx, real'(l_k_val) / 65536.0, m_k);
    end
    if (d_coef_valid && !d_coef_is_a) begin
      n_dk++;
      checks++;
      if (fabs(rat_real(d_coef_frac)) >= 1.0) begin failures++; $display("durbin |k%0d| >= 1", d_coef_idx); end
    end
  end

  real y [3][2];
  real th [3] = '{0.7, 0.8, 0.9};
  function automatic real bandpass(input real w);
    real v;
    v = w;
    for (int s = 0; s < 3; s++) begin
      real o;
      o = 2.0 * 0.9 * $cos(th[s]) * y[s][0] - 0.81 * y[s][1] + v;
      y[s][1] = y[s][0]; y[s][0] = o;
      v = o * 0.19;    // per-section gain trim
    end
    return v;
  endfunction

  initial begin
    real v, px, pe;
    int ns;
    for (int s = 0; s < 3; s++) begin y[s][0] = 0.0; y[s][1] = 0.0; end
    for (int j = 0; j <= P; j++) begin seg_pe[j] = 0.0; seg_n[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 300; n++) begin
      v = bandpass(real'(int'($urandom_range(8000, 0)) - 4000));
      l_x = 16'(longint'(v)); l_x_valid = 1;
      d_x = l_x; d_x_valid = 1;
      @(posedge clk); #1;
    end
    l_start = 1;
    ns = 0;
    while (!l_done || ns == 0) begin
      v = bandpass(real'(int'($urandom_range(8000, 0)) - 4000));
      checks++;
      if (v > 32767.0 || v < -32768.0) begin failures++; $display("test signal clipped"); end
      l_x = 16'(longint'(v)); d_x = l_x;
      @(posedge clk); #1;
      l_start = 0;
      seg_pe[n_kload] += real'(l_e_out) * real'(l_e_out);
      seg_n[n_kload]++;
      ns++;
    end
    px = 0.0; pe = 0.0;
    for (int n = 0; n < 3000; n++) begin
      v = bandpass(real'(int'($urandom_range(8000, 0)) - 4000));
      l_x = 16'(longint'(v)); d_x = l_x;
      @(posedge clk); #1;
      if (n > 20) begin
        px += real'(l_x) * real'(l_x);
        pe += real'(l_e_out) * real'(l_e_out);
      end
    end
    l_x_valid = 0; d_x_valid = 0;
    while (d_busy) begin @(posedge clk); #1; end
    $display("error power ratio after adaptation %f", pe / px);
    for (int j = 0; j < P; j++)
      $display("mean error power while k_%0d is estimated: %f", j + 1, seg_pe[j] / real'(seg_n[j]));
    checks += 4;
    if (pe / px > 0.1) begin failures++; $display("error power ratio %f", pe / px); end
    if (n_kload != P) begin failures++; $display("loads %0d", n_kload); end
    if (seg_pe[P-1] / real'(seg_n[P-1]) > 0.2 * seg_pe[0] / real'(seg_n[0])) begin
      failures++; $display("error power did not fall during adaptation");
    end
    if (n_dk < P) begin failures++; $display("no Durbin result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

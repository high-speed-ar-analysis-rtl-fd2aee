// tb_durbin_processor: feeds the Durbin processor (order P = 10) with the
// autocorrelation of test signals computed in the testbench, and compares
// the streamed k_1..k_P and a_1..a_P with a floating-point Levinson-Durbin
// recursion. The output stream is throttled with a random ready. Signals:
// an AR(2) process, white noise and a narrow-band AR(2) process with poles
// close to the unit circle. The time from start to the first result must
// not exceed 65*P cycles: the document reports 610 for order 10, and this
// schedule (the k sum at one term per 4 cycles, the division, the
// coefficient updates with 1 - k^2 in their stream, the multiplication by
// E) takes 646.
module tb_durbin_processor;
  import ar_pkg::*;
  import tb_util_pkg::*;

  localparam int P = 10;
  localparam int L = 400;   // signal length

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, out_valid, out_ready = 0, out_is_a;
  logic [3:0] out_idx;
  rat_t out_val;
  logic signed [47:0] r [P+1];

  durbin_processor #(.P(P), .ACC_W(48)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(input int kind);
    real    xr [L];
    longint xi [L];
    rvec_t  rr, kr, ar;
    real x1, x2, v;
    int t0, bound, n_out;
    bit timed;
    x1 = 0.0; x2 = 0.0;
    for (int n = 0; n < L; n++) begin
      if (kind == 0) v = ar2_next(x1, x2, 2000);
      else if (kind == 1) v = real'(int'($urandom_range(20000, 0)) - 10000);
      else v = 1.6 * x1 - 0.95 * x2 + real'(int'($urandom_range(400, 0)) - 200);
      x2 = x1; x1 = v;
      xi[n] = longint'(v);
    end
    for (int i = 0; i <= P; i++) begin
      longint s;
      s = 0;
      for (int n = i; n < L; n++) s += xi[n] * xi[n-i];
      r[i] = 48'(s);
      rr[i] = real'(s);
    end
    for (int i = P + 1; i <= MAXP; i++) rr[i] = 0.0;
    levinson(P, rr, kr, ar);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    t0 = cyc;
    bound = 65 * P;
    n_out = 0;
    timed = 0;
    while (n_out < 2 * P) begin
      out_ready = ($urandom_range(2, 0) != 0);
      if (out_valid && !timed) begin
        timed = 1;
        checks++;
        if (cyc - t0 > bound) begin failures++; $display("solve took %0d > %0d", cyc - t0, bound); end
        $display("signal %0d: solve %0d cycles", kind, cyc - t0);
      end
      if (out_valid && out_ready) begin
        real g, e;
        int idx;
        idx = (n_out % P) + 1;
        checks++;
        if (out_is_a != (n_out >= P) || out_idx != 4'(idx)) begin
          failures++; $display("order of the output stream");
        end
        g = rat_real(out_val);
        e = (n_out >= P) ? ar[idx] : kr[idx];
        checks++;
        if (fabs(g - e) > 0.01 * (1.0 + fabs(e))) begin
          failures++; $display("signal %0d %s%0d got %f exp %f", kind, (n_out >= P) ? "a" : "k", idx, g, e);
        end
        n_out++;
      end
      @(posedge clk); #1;
    end
    out_ready = 0;
    checks++;
    if (!done) begin failures++; $display("done missing"); end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    for (int i = 0; i <= P; i++) r[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(0);
    run(1);
    run(2);
    run(0);
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

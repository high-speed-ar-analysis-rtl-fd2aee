// tb_rat_add: checks rational addition against floating-point arithmetic,
// exact results for small operands, the tag, the 4-cycle latency, issue at
// one operation per cycle, and an accumulation loop whose result is fed
// back to the input, which must run with a period of 4 cycles.
module tb_rat_add;
  import ar_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  rat_t x = RAT_ZERO, y = RAT_ONE, z;
  logic [7:0] in_tag = 0, out_tag;

  rat_add #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real        exp_q [$];
  int         issue_cyc [$];
  logic [7:0] tag_q [$];
  logic       exact_q [$];
  rat_t       exact_v [$];
  bit         checking = 1;

  function automatic rat_t rnd_rat(input bit sml);
    rat_t r;
    if (sml) begin
      r.n = 18'(int'($urandom_range(30, 0)) - 15);
      r.d = 18'($urandom_range(15, 1));
    end else begin
      r.n = 18'(int'($urandom_range(131070, 0)) - 65535);
      r.d = 18'($urandom_range(131071, 1));
    end
    return r;
  endfunction

  task automatic issue(input rat_t a, input rat_t b, input bit sml);
    rat_t e;
    x <= a; y <= b; in_valid <= 1; in_tag <= 8'($urandom);
    @(posedge clk);
    #1;
    exp_q.push_back(rat_real(a) + rat_real(b));
    e.n = a.n * b.d + b.n * a.d;
    e.d = a.d * b.d;
    exact_q.push_back(sml);
    exact_v.push_back(e);
    tag_q.push_back(in_tag);
    issue_cyc.push_back(cyc);
  endtask

  always @(posedge clk) begin
    if (out_valid && checking) begin
      real e, g, tol;
      rat_t ev;
      int ic;
      logic [7:0] t;
      logic sm;
      e = exp_q.pop_front(); ic = issue_cyc.pop_front(); t = tag_q.pop_front();
      sm = exact_q.pop_front(); ev = exact_v.pop_front();
      g = rat_real(z);
      // cancellation in the numerator costs precision relative to the
      // operands, so the bound is taken from the larger operand magnitude
      tol = 3.1e-5 * (1.0 + fabs(e)) * (1.0 + fabs(e)) + 1.0e-4;
      checks++;
      if (fabs(g - e) > tol) begin
        failures++; $display("value mismatch got %f exp %f", g, e);
      end
      checks++;
      // cyc still holds its pre-edge value here
      if (cyc + 1 - ic != 4) begin failures++; $display("latency %0d", cyc + 1 - ic); end
      checks++;
      if (out_tag != t) begin failures++; $display("tag mismatch %0d", cyc); end
      if (sm && ev.n != 0) begin
        checks++;
        if (z.n != ev.n || z.d != ev.d) begin
          failures++; $display("%0d exact mismatch", cyc); $display("exact mismatch %0d/%0d exp %0d/%0d", z.n, z.d, ev.n, ev.d);
        end
      end
    end
  end

  initial begin
    rat_t acc;
    real  acc_ref;
    int   t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      bit sm;
      sm = (i % 4 == 0);
      issue(rnd_rat(sm), rnd_rat(sm), sm);
      if (i % 7 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end

    // accumulation with feedback: acc = acc + 1/7, ten times
    checking = 0;
    acc = RAT_ZERO;
    acc_ref = 0.0;
    @(posedge clk);
    #1;
    for (int i = 0; i < 10; i++) begin
      x = acc; y = '{n: 18'sd1, d: 18'sd7}; in_valid = 1;
      @(posedge clk);
      #1;
      in_valid = 0;
      while (!out_valid) begin @(posedge clk); #1; end
      if (i == 0) t0 = cyc;
      acc = z;
      acc_ref += 1.0 / 7.0;
    end
    t1 = cyc;
    checks++;
    if ((t1 - t0) != 36) begin failures++; $display("accumulation period %0d/9", t1 - t0); end
    checks++;
    if (fabs(rat_real(acc) - acc_ref) > 1.0e-4) begin
      failures++; $display("accumulated %f exp %f", rat_real(acc), acc_ref);
    end
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

// tb_rat_muldiv: checks rational multiply and divide against floating-point
// arithmetic (relative error), exact results for sml operands, the tag,
// the 7-cycle latency and issue at one operation per cycle.
module tb_rat_muldiv;
  import ar_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  rat_op_e op = RAT_MUL;
  rat_t x = RAT_ZERO, y = RAT_ONE, z;
  logic [7:0] in_tag = 0, out_tag;

  rat_muldiv #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results queued at issue time
  real    exp_q [$];
  int     issue_cyc [$];
  logic [7:0] tag_q [$];
  logic   exact_q [$];
  rat_t   exact_v [$];

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

  task automatic issue(input rat_op_e o, input rat_t a, input rat_t b, input bit sml);
    rat_t e;
    x <= a; y <= b; op <= o; in_valid <= 1; in_tag <= 8'($urandom);
    @(posedge clk);
    #1;
    if (o == RAT_MUL) exp_q.push_back(rat_real(a) * rat_real(b));
    else              exp_q.push_back(rat_real(a) / rat_real(b));
    if (o == RAT_MUL) begin e.n = a.n * b.n; e.d = a.d * b.d; end
    else begin
      e.n = a.n * b.d; e.d = a.d * b.n;
      if (e.d < 0) begin e.n = -e.n; e.d = -e.d; end
    end
    exact_q.push_back(sml);
    exact_v.push_back(e);
    tag_q.push_back(in_tag);
    issue_cyc.push_back(cyc);
  endtask

  always @(posedge clk) begin
    if (out_valid) begin
      real e, g, tol;
      rat_t ev;
      int ic;
      logic [7:0] t;
      logic sm;
      e = exp_q.pop_front(); ic = issue_cyc.pop_front(); t = tag_q.pop_front();
      sm = exact_q.pop_front(); ev = exact_v.pop_front();
      g = rat_real(z);
      // one truncated unit in each part after renormalisation to 17 bits
      tol = 3.1e-5 * (1.0 + fabs(e)) * (1.0 + fabs(e));
      checks++;
      if (fabs(g - e) > tol) begin
        failures++; $display("value mismatch got %f exp %f", g, e);
      end
      checks++;
      // cyc still holds its pre-edge value here
      if (cyc + 1 - ic != 7) begin failures++; $display("latency %0d", cyc + 1 - ic); end
      checks++;
      if (out_tag != t) begin failures++; $display("tag mismatch"); end
      if (sm && ev.n != 0) begin
        checks++;
        if (z.n != ev.n || z.d != ev.d) begin
          failures++; $display("exact mismatch %0d/%0d exp %0d/%0d", z.n, z.d, ev.n, ev.d);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      bit sm;
      rat_t a, b;
      sm = (i % 4 == 0);
      a = rnd_rat(sm); b = rnd_rat(sm);
      if ((i % 2) == 1 && b.n == 0) b.n = 1;
      issue((i % 2) ? RAT_DIV : RAT_MUL, a, b, sm);
      // gaps every so often
      if (i % 7 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
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

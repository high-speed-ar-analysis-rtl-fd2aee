// tb_lattice_stage: random coefficients and errors through one lattice
// stage; the forward and backward outputs, the one-sample backward delay,
// saturation and the coefficient load/clear are compared with an integer
// model of E^f_j(n) = E^f_{j-1}(n) + k E^b_{j-1}(n-1) and
// E^b_j(n) = E^b_{j-1}(n-1) + k E^f_{j-1}(n) (k with 16 fraction bits).
module tb_lattice_stage;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, k_clr = 0, k_load = 0, sat;
  logic signed [17:0] k_val = 0, f_in = 0, b_in = 0, f_out, b_out, b_del, k_q;

  lattice_stage #(.EW(18), .KW(18), .KF(16)) dut (.*);

  int checks = 0, failures = 0;
  int n_sat = 0;

  function automatic longint clip(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  initial begin
    longint kk, bprev, ef, eb, pf, pb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    kk = 0; bprev = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 50 == 0) begin
        k_val = 18'(int'($urandom_range(131070, 0)) - 65535);
        k_load = 1;
        @(posedge clk); #1;
        k_load = 0;
        kk = longint'(k_val);
        checks++;
        if (k_q != k_val) begin failures++; $display("k load"); end
      end
      if (i == 1000) begin
        k_clr = 1;
        @(posedge clk); #1;
        k_clr = 0;
        kk = 0;
        checks++;
        if (k_q != 0) begin failures++; $display("k clear"); end
      end
      if (i % 100 < 10) begin
        f_in = 18'(int'($urandom_range(262143, 0)) - 131072);
        b_in = 18'(int'($urandom_range(262143, 0)) - 131072);
      end else begin
        f_in = 18'(int'($urandom_range(40000, 0)) - 20000);
        b_in = 18'(int'($urandom_range(40000, 0)) - 20000);
      end
      pf = (kk * bprev + 32768) >>> 16;
      pb = (kk * longint'(f_in) + 32768) >>> 16;
      ef = clip(longint'(f_in) + pf);
      eb = clip(bprev + pb);
      if (ef != longint'(f_in) + pf || eb != bprev + pb) n_sat++;
      en = 1;
      #1;
      checks++;
      if (sat != (ef != longint'(f_in) + pf || eb != bprev + pb)) begin failures++; $display("sat flag"); end
      @(posedge clk); #1;
      en = 0;
      checks += 3;
      if (longint'(f_out) != ef) begin failures++; $display("f_out %0d exp %0d", f_out, ef); end
      if (longint'(b_out) != eb) begin failures++; $display("b_out %0d exp %0d", b_out, eb); end
      if (b_del != b_in) begin failures++; $display("b_del"); end
      bprev = longint'(b_in);
      // a cycle without en must hold everything
      if (i % 13 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (longint'(f_out) != ef || b_del != b_in) begin failures++; $display("hold"); end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

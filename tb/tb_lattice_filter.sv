// tb_lattice_filter: a 4-stage lattice filter with random coefficients
// (loaded one stage at a time through the one-hot k_load) runs on random
// samples; its output, its taps and the coefficient registers are compared
// every sample with a cycle model of the stage chain written in the
// testbench.
module tb_lattice_filter;
  localparam int P = 4;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, k_clr = 0, sat_any;
  logic [P-1:0] k_load = 0;
  logic signed [15:0] x = 0;
  logic signed [17:0] k_val = 0, e_out;
  logic signed [17:0] f_tap [P], b_tap [P], k [P];

  lattice_filter #(.P(P), .DATA_W(16), .EW(18), .KW(18), .KF(16)) dut (.*);

  int checks = 0, failures = 0;

  function automatic longint clip(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  longint fo [P], bo [P], bd [P], kk [P];

  initial begin
    longint fi, bi;
    longint nfo [P], nbo [P], nbd [P];
    for (int j = 0; j < P; j++) begin fo[j] = 0; bo[j] = 0; bd[j] = 0; kk[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 200 == 0) begin
        int j;
        j = (i / 200) % P;
        k_val = 18'(int'($urandom_range(120000, 0)) - 60000);
        k_load = P'(1) << j;
        @(posedge clk); #1;
        k_load = 0;
        kk[j] = longint'(k_val);
      end
      if (i == 2500) begin
        k_clr = 1;
        @(posedge clk); #1;
        k_clr = 0;
        for (int j = 0; j < P; j++) kk[j] = 0;
      end
      x = 16'(int'($urandom_range(30000, 0)) - 15000);
      en = 1;
      #1;
      // taps before the edge
      for (int j = 0; j < P; j++) begin
        fi = (j == 0) ? longint'(x) : fo[j-1];
        checks += 3;
        if (longint'(f_tap[j]) != fi) begin failures++; $display("f_tap %0d", j); end
        if (longint'(b_tap[j]) != bd[j]) begin failures++; $display("b_tap %0d", j); end
        if (longint'(k[j]) != kk[j]) begin failures++; $display("k %0d", j); end
      end
      for (int j = 0; j < P; j++) begin
        fi = (j == 0) ? longint'(x) : fo[j-1];
        bi = (j == 0) ? longint'(x) : bo[j-1];
        nfo[j] = clip(fi + ((kk[j] * bd[j] + 32768) >>> 16));
        nbo[j] = clip(bd[j] + ((kk[j] * fi + 32768) >>> 16));
        nbd[j] = bi;
      end
      for (int j = 0; j < P; j++) begin fo[j] = nfo[j]; bo[j] = nbo[j]; bd[j] = nbd[j]; end
      @(posedge clk); #1;
      en = 0;
      checks++;
      if (longint'(e_out) != fo[P-1]) begin failures++; $display("e_out %0d exp %0d", e_out, fo[P-1]); end
      if (i % 17 == 0) begin @(posedge clk); #1; end
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

// tb_rat_to_fixed: random fractions are converted and compared with
// trunc(n * 2^16 / d) computed in 64-bit integers, saturated to 32 bits;
// checks the returned fraction and tag, the ready handshake and the
// conversion time (RAT_MAG + FRAC + 2 = 35 cycles from acceptance).
module tb_rat_to_fixed;
  import ar_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid;
  rat_t x = RAT_ZERO, out_x;
  logic [7:0] in_tag = 0, out_tag;
  logic signed [31:0] q;

  rat_to_fixed #(.OUT_W(32), .FRAC(16), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      rat_t a;
      longint e;
      int t0;
      logic [7:0] tg;
      if (i % 3 == 0) begin
        a.n = 18'(int'($urandom_range(131070, 0)) - 65535);
        a.d = 18'($urandom_range(131071, 1));
      end else begin
        a.n = 18'(int'($urandom_range(131070, 0)) - 65535);
        a.d = 18'($urandom_range(8, 1));
      end
      e = (longint'(a.n) * 65536) / longint'(a.d);   // truncates toward zero
      if (e > 64'sd2147483647) e = 64'sd2147483647;
      if (e < -64'sd2147483647) e = -64'sd2147483647;
      tg = 8'(i);
      x = a; in_tag = tg; in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("not ready when idle"); end
      @(posedge clk); #1;
      t0 = cyc;
      in_valid = 0;
      while (!out_valid) begin
        checks++;
        if (in_ready) begin failures++; $display("ready while busy"); end
        @(posedge clk); #1;
      end
      checks++;
      if (longint'(q) != e) begin failures++; $display("q %0d exp %0d (%0d/%0d)", q, e, a.n, a.d); end
      checks++;
      if (out_x != a || out_tag != tg) begin failures++; $display("tag/fraction lost"); end
      checks++;
      if (cyc - t0 != 35) begin failures++; $display("time %0d", cyc - t0); end
      if (i % 5 == 0) begin @(posedge clk); #1; end
    end
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

// tb_corr_processor: streams random samples (with idle cycles) through a
// correlation processor of order P = 4 with frames of N = Q*P = 12 samples
// and compares every frame's r_xx(0..P) with the biased window estimate
// sum_{n=i}^{N-1} x(n) x(n-i) computed in the testbench; r_valid must
// come one cycle after the last sample of the frame.
module tb_corr_processor;
  localparam int P = 4, Q = 3, N = P * Q;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic x_valid = 0, r_valid;
  logic signed [15:0] x = 0;
  logic signed [47:0] r [P+1];

  corr_processor #(.P(P), .Q(Q), .DATA_W(16), .ACC_W(48)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint xs [N];
    longint e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 10; f++) begin
      for (int n = 0; n < N; n++) begin
        xs[n] = longint'($signed(16'($urandom)));
        x = 16'(xs[n]); x_valid = 1;
        @(posedge clk); #1;
        x_valid = 0;
        checks++;
        if (r_valid != (n == N - 1)) begin failures++; $display("r_valid timing"); end
        if (n != N - 1 && $urandom_range(2, 0) == 0) begin
          @(posedge clk); #1;
          checks++;
          if (r_valid) begin failures++; $display("spurious r_valid"); end
        end
      end
      for (int i = 0; i <= P; i++) begin
        e = 0;
        for (int n = i; n < N; n++) e += xs[n] * xs[n-i];
        checks++;
        if (longint'(r[i]) != e) begin failures++; $display("frame %0d r[%0d]=%0d exp %0d", f, i, r[i], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_corr_cell: drives a correlation unit with random samples and lagged
// samples over frames of random length, and compares the frame sums, the
// lag register and the clearing at frame end with a model kept in 64-bit
// integers.
module tb_corr_cell;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, last = 0;
  logic signed [15:0] x = 0, lag_in = 0, lag_q;
  logic signed [47:0] r;

  corr_cell #(.DATA_W(16), .ACC_W(48)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint sum;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 20; f++) begin
      int len;
      logic signed [15:0] prev;
      len = int'($urandom_range(40, 1));
      sum = 0;
      for (int n = 0; n < len; n++) begin
        x = 16'($urandom); lag_in = 16'($urandom);
        if (f == 3) begin x = -16'sd32768; lag_in = -16'sd32768; end   // extreme
        en = 1; last = (n == len - 1);
        sum += longint'(x) * longint'(lag_in);
        prev = lag_in;
        @(posedge clk); #1;
        en = 0;
        checks++;
        if (!last && lag_q != prev) begin failures++; $display("lag register"); end
        if (last && lag_q != 0) begin failures++; $display("lag not cleared"); end
        if ($urandom_range(3, 0) == 0) begin @(posedge clk); #1; end   // idle cycle
      end
      checks++;
      if (longint'(r) != sum) begin failures++; $display("frame %0d r %0d exp %0d", f, r, sum); end
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

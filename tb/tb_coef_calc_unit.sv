// tb_coef_calc_unit: drives the taps of a 3-stage filter with random,
// partly correlated errors and checks every coefficient the unit loads
// against k_j = -sum(f b) / sqrt(sum f^2 * sum b^2) evaluated in floating
// point over the samples the unit is specified to use: after a start or a
// load, SETTLE = 2 samples are skipped and the next N = Q*P = 12 are
// accumulated from stage j's taps. Also checked: the one-hot load, k_idx,
// k_clr after start, calc, done after k_P, the clipping of a coefficient of
// magnitude 1 (f = b), a silent stage (k = 0), and that computing one
// coefficient after its last sample takes at most 70 cycles.
module tb_coef_calc_unit;
  import tb_util_pkg::*;
  localparam int P = 3, Q = 4, N = P * Q;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, en = 0, k_clr, calc, busy, done;
  logic signed [17:0] f_tap [P], b_tap [P];
  logic [P-1:0] k_load;
  logic signed [17:0] k_val;
  logic [1:0] k_idx;

  coef_calc_unit #(.P(P), .Q(Q), .EW(18), .KW(18), .KF(16), .ACC_W(48)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference bookkeeping, evaluated on pre-edge values
  typedef enum {P_IDLE, P_SETTLE, P_ACC, P_WAIT} ph_e;
  ph_e ph = P_IDLE;
  int cnt = 0, stage = 0, last_cyc = 0, n_done = 0, n_loads = 0;
  real c_s, f_s, b_s;
  int mode = 0;   // 0 random, 1: stage 1 has f = b, 2: stage 0 silent

  always @(posedge clk) begin
    if (start) begin
      ph <= P_SETTLE; cnt <= 0; stage <= 0;
    end else begin
      case (ph)
        P_SETTLE: if (en) begin
          if (cnt == 1) begin ph <= P_ACC; cnt <= 0; c_s = 0; f_s = 0; b_s = 0; end
          else cnt <= cnt + 1;
        end
        P_ACC: if (en) begin
          c_s += real'(f_tap[stage]) * real'(b_tap[stage]);
          f_s += real'(f_tap[stage]) * real'(f_tap[stage]);
          b_s += real'(b_tap[stage]) * real'(b_tap[stage]);
          checks++;
          if (!calc) begin failures++; $display("calc low while accumulating"); end
          if (cnt == N - 1) begin ph <= P_WAIT; last_cyc <= cyc; end
          cnt <= cnt + 1;
        end
        default: ;
      endcase
      if (k_load != 0) begin
        real ke, kg;
        n_loads++;
        checks += 4;
        if (ph != P_WAIT) begin failures++; $display("early load"); end
        if (k_load != (P'(1) << stage) || k_idx != 2'(stage + 1)) begin
          failures++; $display("load position");
        end
        if (cyc - last_cyc > 70) begin failures++; $display("compute %0d cycles", cyc - last_cyc); end
        ke = (f_s * b_s > 0.0) ? -c_s / $sqrt(f_s * b_s) : 0.0;
        if (ke > 65535.0 / 65536.0) ke = 65535.0 / 65536.0;
        if (ke < -65535.0 / 65536.0) ke = -65535.0 / 65536.0;
        kg = real'(k_val) / 65536.0;
        if (fabs(kg - ke) > 3.0 / 65536.0) begin
          failures++; $display("stage %0d k %f exp %f", stage, kg, ke);
        end
        if (stage < P - 1) begin
          stage <= stage + 1; ph <= P_SETTLE; cnt <= en ? 1 : 0;
        end else ph <= P_IDLE;
      end
    end
    if (done) n_done++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int run = 0; run < 6; run++) begin
      mode = run % 3;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      checks++;
      if (!k_clr) begin failures++; $display("k_clr missing"); end
      while (busy) begin
        for (int j = 0; j < P; j++) begin
          int u, v, w;
          u = int'($urandom_range(40000, 0)) - 20000;
          v = int'($urandom_range(40000, 0)) - 20000;
          w = int'($urandom_range(40000, 0)) - 20000;
          f_tap[j] = 18'(u + v / 2);
          b_tap[j] = 18'((j == 0 ? -u : u) / (j + 1) + w / 3);
          if (mode == 1 && j == 1) b_tap[j] = f_tap[j];
          if (mode == 2 && j == 0) begin f_tap[j] = 0; b_tap[j] = 0; end
        end
        en = ($urandom_range(5, 0) != 0);
        @(posedge clk); #1;
      end
      en = 0;
      repeat (3) @(posedge clk);
      #1;
    end
    checks += 2;
    if (n_done != 6) begin failures++; $display("done count %0d", n_done); end
    if (n_loads != 6 * P) begin failures++; $display("load count %0d", n_loads); end
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

// tb_lattice_input_buffer: checks the input buffer of the lattice
// processor with N = 7 (not a power of two) against its own model, built
// from the specification rather than from the RTL: transparent when
// buffered is low; after a start with buffered high, no samples out while
// the next N valid inputs are captured, cap_done with the N-th, then the
// captured array played back cyclically, one sample per clock, until stop;
// then transparent again. The input stream has random gaps. Also covered:
// a start with buffered low (stays transparent) and a new start during
// playback (a new capture). Every cycle the outputs are compared with the
// model (values sampled just before each clock edge).
module tb_lattice_input_buffer;
  localparam int N = 7;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic buffered = 0, start = 0, stop = 0, in_valid = 0;
  logic signed [15:0] in_x = 0;
  logic out_valid, cap_done, capturing;
  logic signed [15:0] out_x;

  lattice_input_buffer #(.DATA_W(16), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_cap = 0, n_play = 0;
  // model
  int mstate = 0;        // 0 pass, 1 capture, 2 play
  int wcnt = 0, ridx = 0;
  logic signed [15:0] arr [N];

  always @(posedge clk) begin
    if (rst_n) begin
      logic e_valid, e_done;
      logic signed [15:0] e_x;
      e_done = (mstate == 1) && in_valid && (wcnt == N - 1);
      case (mstate)
        1:       begin e_valid = 0;        e_x = 'x;        end
        2:       begin e_valid = 1;        e_x = arr[ridx]; end
        default: begin e_valid = in_valid; e_x = in_x;      end
      endcase
      checks += 3;
      if (out_valid !== e_valid) begin failures++; $display("%0t out_valid %b exp %b", $time, out_valid, e_valid); end
      if (e_valid && out_x !== e_x) begin failures++; $display("%0t out_x %0d exp %0d", $time, out_x, e_x); end
      if (cap_done !== e_done || capturing !== (mstate == 1)) begin failures++; $display("%0t cap_done/capturing", $time); end
      if (e_done) n_cap++;
      if (mstate == 2) n_play++;
      // advance the model
      if (start && buffered) begin
        mstate = 1; wcnt = 0;
      end else if (mstate == 1) begin
        if (in_valid) begin
          arr[wcnt] = in_x;
          wcnt++;
          if (wcnt == N) begin mstate = 2; ridx = 0; end
        end
      end else if (mstate == 2) begin
        ridx = (ridx + 1) % N;
        if (stop) mstate = 0;
      end
    end
  end

  task automatic cycles(int n, int pv);
    for (int i = 0; i < n; i++) begin
      in_valid = ($urandom_range(99, 0) < pv);
      in_x = 16'($urandom);
      @(posedge clk); #1;
      start = 0; stop = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    cycles(30, 70);                       // transparent
    start = 1; buffered = 0;
    cycles(20, 70);                       // start without buffering
    start = 1; buffered = 1;
    cycles(40, 60);                       // capture and play
    stop = 1;
    cycles(20, 70);                       // transparent again
    start = 1;
    cycles(30, 100);                      // capture at full rate, play
    start = 1;
    cycles(25, 50);                       // restart during playback
    stop = 1;
    cycles(10, 50);
    checks += 2;
    if (n_cap != 3) begin failures++; $display("captures %0d", n_cap); end
    if (n_play < 40) begin failures++; $display("playback cycles %0d", n_play); end
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

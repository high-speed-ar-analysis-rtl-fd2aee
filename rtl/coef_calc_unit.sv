// coef_calc_unit: the coefficient calculation unit of the lattice AR
// processor. It adapts the lattice filter one stage at a time, j = 1..P:
//
//   1. it attaches to the inputs of stage j, E^f_{j-1}(n) and
//      E^b_{j-1}(n-1) (taps f_tap[j-1], b_tap[j-1]);
//   2. over N = Q*P samples it accumulates the partial correlations
//      C = sum f*b, F = sum f^2, B = sum b^2 in ACC_W-bit integers;
//   3. it computes k_j = -C / sqrt(F * B): an integer square root of the
//      2*ACC_W-bit product F*B (ACC_W cycles), then a fractional division
//      giving KF quotient bits (KF cycles); since |C| <= sqrt(F*B) the
//      result is a fraction, |k_j| < 1, held with KF fraction bits and
//      clipped to (1 - 2^-KF) in magnitude;
//   4. it loads k_j into stage j and moves on to stage j+1.
// The formula, the stage-by-stage order and the integer arithmetic follow
// the document. The sample stream is not stopped: samples arriving while
// k_j is computed pass through the filter without being accumulated, and
// after each load SETTLE samples are skipped so that the taps of the next
// stage reflect the new coefficient (this skipping is this design's
// choice). A start pulse clears all coefficients and restarts from k_1.
//
// Outputs: k_load is one-hot over the stages with k_val, valid for one
// cycle (k_idx = j, 1..P, for observers); calc is high while a coefficient
// is being accumulated or computed; done pulses after k_P is loaded.
module coef_calc_unit #(
  parameter int unsigned P      = 10,
  parameter int unsigned Q      = 10,
  parameter int unsigned EW     = 18,
  parameter int unsigned KW     = 18,
  parameter int unsigned KF     = 16,
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned SETTLE = 2,
  parameter int unsigned IDX_W  = $clog2(P + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 en,
  input  logic signed [EW-1:0] f_tap [P],
  input  logic signed [EW-1:0] b_tap [P],
  output logic                 k_clr,
  output logic [P-1:0]         k_load,
  output logic signed [KW-1:0] k_val,
  output logic [IDX_W-1:0]     k_idx,
  output logic                 calc,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned N   = Q * P;
  localparam int unsigned NCW = $clog2(N + 1);
  localparam int unsigned KCW = $clog2(KF + 1);
  localparam logic [KF-1:0] QMAX = '1;

  typedef enum logic [2:0] {
    S_IDLE, S_SETTLE, S_ACC, S_SQRT, S_SQRT_WAIT, S_DIV, S_LOAD
  } state_e;

  state_e state;

  logic [IDX_W-1:0] j_q;        // stage index, 0-based
  logic [NCW-1:0]   cnt;        // sample counter
  logic [KCW-1:0]   dcnt;       // division step counter

  logic signed [ACC_W-1:0] c_acc;
  logic        [ACC_W-1:0] f_acc, b_acc;

  logic signed [EW-1:0]    f_sel, b_sel;
  logic signed [2*EW-1:0]  p_fb, p_ff, p_bb;

  logic                    sq_start, sq_busy, sq_done;
  logic [ACC_W-1:0]        sq_root;
  logic [ACC_W-1:0]        rem;
  logic [KF-1:0]           quo;
  logic                    c_neg;
  logic [ACC_W:0]          rem2;
  logic [ACC_W:0]          c_abs;
  logic [2*ACC_W-1:0]      fb_prod;

  assign f_sel = f_tap[j_q];
  assign b_sel = b_tap[j_q];
  assign p_fb  = f_sel * b_sel;
  assign p_ff  = f_sel * f_sel;
  assign p_bb  = b_sel * b_sel;

  isqrt #(.W(2 * ACC_W)) u_sqrt (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (sq_start),
    .radicand(fb_prod),
    .busy    (sq_busy),
    .done    (sq_done),
    .root    (sq_root)
  );

  assign sq_start = (state == S_SQRT);
  assign fb_prod  = f_acc * b_acc;
  assign c_abs    = c_acc[ACC_W-1] ? (ACC_W+1)'(-c_acc) : (ACC_W+1)'(c_acc);
  assign rem2     = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      j_q    <= '0;
      cnt    <= '0;
      dcnt   <= '0;
      c_acc  <= '0;
      f_acc  <= '0;
      b_acc  <= '0;
      rem    <= '0;
      quo    <= '0;
      c_neg  <= 1'b0;
      k_clr  <= 1'b0;
      k_load <= '0;
      k_val  <= '0;
      k_idx  <= '0;
      done   <= 1'b0;
    end else begin
      k_clr  <= 1'b0;
      k_load <= '0;
      done   <= 1'b0;
      if (start) begin
        k_clr <= 1'b1;
        j_q   <= '0;
        cnt   <= '0;
        state <= S_SETTLE;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_SETTLE: if (en) begin
            if (cnt == NCW'(SETTLE - 1)) begin
              cnt   <= '0;
              c_acc <= '0;
              f_acc <= '0;
              b_acc <= '0;
              state <= S_ACC;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          S_ACC: if (en) begin
            c_acc <= c_acc + ACC_W'(p_fb);
            f_acc <= f_acc + ACC_W'(p_ff);
            b_acc <= b_acc + ACC_W'(p_bb);
            cnt   <= cnt + 1'b1;
            if (cnt == NCW'(N - 1)) state <= S_SQRT;
          end
          S_SQRT: state <= S_SQRT_WAIT;
          S_SQRT_WAIT: if (sq_done) begin
            c_neg <= c_acc[ACC_W-1];
            rem   <= ACC_W'(c_abs);              // < S whenever it is used
            quo   <= '0;
            dcnt  <= '0;
            if (sq_root == 0) begin
              state <= S_LOAD;                    // no signal: k = 0
            end else if (c_abs >= {1'b0, sq_root}) begin
              quo   <= QMAX;                      // |C| = S by rounding
              state <= S_LOAD;
            end else begin
              state <= S_DIV;
            end
          end
          S_DIV: begin
            // one quotient bit of |C| * 2^KF / S per cycle
            if (rem2 >= {1'b0, sq_root}) begin
              rem <= ACC_W'(rem2 - {1'b0, sq_root});
              quo <= {quo[KF-2:0], 1'b1};
            end else begin
              rem <= ACC_W'(rem2);
              quo <= {quo[KF-2:0], 1'b0};
            end
            dcnt <= dcnt + 1'b1;
            if (dcnt == KCW'(KF - 1)) state <= S_LOAD;
          end
          S_LOAD: begin
            k_val        <= c_neg ? KW'(quo) : -KW'(quo);
            k_load[j_q]  <= 1'b1;
            k_idx        <= j_q + 1'b1;
            cnt          <= '0;
            if (j_q == IDX_W'(P - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              j_q   <= j_q + 1'b1;
              state <= S_SETTLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign calc = (state == S_ACC) || (state == S_SQRT) || (state == S_SQRT_WAIT) ||
                (state == S_DIV);
  assign busy = (state != S_IDLE);

  logic unused_ok;
  assign unused_ok = sq_busy;

  // one stage register is written at a time, never while clearing
  a_one_load: assert property (@(posedge clk)
    $onehot0(k_load) && !(k_clr && |k_load));

endmodule

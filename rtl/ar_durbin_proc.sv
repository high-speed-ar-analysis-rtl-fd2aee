// ar_durbin_proc: AR analysis processor based on the Durbin algorithm. The
// correlation processor (P+1 fixed-point accumulators) estimates
// r_xx(0..P) over each frame of N = Q*P input samples; at the end of a
// frame the Durbin processor takes the estimates and solves for k_1..k_P
// and a_1..a_P in rational-fraction arithmetic while the next frame is
// being accumulated (two-stage pipeline). Each result fraction is then
// turned into fixed point (FRAC fraction bits) by rat_to_fixed.
//
// If a frame ends while the Durbin processor is still busy with the
// previous one, that frame's correlations are dropped and overrun pulses
// (this policy is this design's choice).
//
// Interface: x/x_valid is the sample stream. Results leave one at a time
// with coef_valid (one-cycle pulse): k_1..k_P (coef_is_a = 0) then a_1..a_P
// (coef_is_a = 1), coef_idx = 1..P, each as a fraction (coef_frac) and in
// fixed point (coef_fixed). done pulses after a_P has left the Durbin
// processor.
module ar_durbin_proc
  import ar_pkg::*;
#(
  parameter int unsigned P      = 10,
  parameter int unsigned Q      = 10,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned OUT_W  = 32,
  parameter int unsigned FRAC   = 16,
  parameter int unsigned IDX_W  = $clog2(P + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     coef_valid,
  output logic                     coef_is_a,
  output logic [IDX_W-1:0]         coef_idx,
  output rat_t                     coef_frac,
  output logic signed [OUT_W-1:0]  coef_fixed,
  output logic                     busy,
  output logic                     done,
  output logic                     overrun
);
  logic signed [ACC_W-1:0] r [P+1];
  logic                    r_valid;
  logic                    d_busy, d_start;
  logic                    o_valid, o_ready, o_is_a;
  logic [IDX_W-1:0]        o_idx;
  rat_t                    o_val;
  logic [IDX_W:0]          c_tag;

  corr_processor #(
    .P(P), .Q(Q), .DATA_W(DATA_W), .ACC_W(ACC_W)
  ) u_corr (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_valid(x_valid),
    .x      (x),
    .r      (r),
    .r_valid(r_valid)
  );

  assign d_start = r_valid && !d_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overrun <= 1'b0;
    else        overrun <= r_valid && d_busy;
  end

  durbin_processor #(.P(P), .ACC_W(ACC_W)) u_durbin (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (d_start),
    .r        (r),
    .busy     (d_busy),
    .done     (done),
    .out_valid(o_valid),
    .out_ready(o_ready),
    .out_is_a (o_is_a),
    .out_idx  (o_idx),
    .out_val  (o_val)
  );

  rat_to_fixed #(.OUT_W(OUT_W), .FRAC(FRAC), .TAG_W(IDX_W + 1)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (o_valid),
    .in_ready (o_ready),
    .x        (o_val),
    .in_tag   ({o_is_a, o_idx}),
    .out_valid(coef_valid),
    .q        (coef_fixed),
    .out_x    (coef_frac),
    .out_tag  (c_tag)
  );

  assign coef_is_a = c_tag[IDX_W];
  assign coef_idx  = c_tag[IDX_W-1:0];
  assign busy      = d_busy;

endmodule

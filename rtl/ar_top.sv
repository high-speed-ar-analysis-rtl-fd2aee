// ar_top: the two AR (autoregressive) analysis processors side by side,
// each with its own sample input and result outputs:
//   * the Durbin processor path (correlation processor + rational-fraction
//     Durbin solver), ports prefixed d_;
//   * the adaptive lattice filter path (lattice filter + coefficient
//     calculation unit, with its input buffer), ports prefixed l_.
// Both take DATA_W-bit samples, at most one per clock, and are configured
// for prediction order P with frames of N = Q*P samples.
module ar_top
  import ar_pkg::*;
#(
  parameter int unsigned P      = 10,
  parameter int unsigned Q      = 10,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned IDX_W  = $clog2(P + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Durbin algorithm processor
  input  logic                     d_x_valid,
  input  logic signed [DATA_W-1:0] d_x,
  output logic                     d_coef_valid,
  output logic                     d_coef_is_a,
  output logic [IDX_W-1:0]         d_coef_idx,
  output rat_t                     d_coef_frac,
  output logic signed [31:0]       d_coef_fixed,
  output logic                     d_busy,
  output logic                     d_done,
  output logic                     d_overrun,
  // lattice filter processor
  input  logic                     l_start,
  input  logic                     l_buffered,
  input  logic                     l_x_valid,
  input  logic signed [DATA_W-1:0] l_x,
  output logic signed [17:0]       l_e_out,
  output logic                     l_k_valid,
  output logic [IDX_W-1:0]         l_k_idx,
  output logic signed [17:0]       l_k_val,
  output logic signed [17:0]       l_k [P],
  output logic                     l_calc,
  output logic                     l_busy,
  output logic                     l_done,
  output logic                     l_sat
);
  ar_durbin_proc #(
    .P(P), .Q(Q), .DATA_W(DATA_W), .ACC_W(48), .OUT_W(32), .FRAC(16)
  ) u_durbin_proc (
    .clk       (clk),
    .rst_n     (rst_n),
    .x_valid   (d_x_valid),
    .x         (d_x),
    .coef_valid(d_coef_valid),
    .coef_is_a (d_coef_is_a),
    .coef_idx  (d_coef_idx),
    .coef_frac (d_coef_frac),
    .coef_fixed(d_coef_fixed),
    .busy      (d_busy),
    .done      (d_done),
    .overrun   (d_overrun)
  );

  ar_lattice_proc #(
    .P(P), .Q(Q), .DATA_W(DATA_W), .EW(18), .KW(18), .KF(16), .ACC_W(48)
  ) u_lattice_proc (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (l_start),
    .buffered(l_buffered),
    .x_valid(l_x_valid),
    .x      (l_x),
    .e_out  (l_e_out),
    .k_valid(l_k_valid),
    .k_idx  (l_k_idx),
    .k_val  (l_k_val),
    .k      (l_k),
    .calc   (l_calc),
    .busy   (l_busy),
    .done   (l_done),
    .sat    (l_sat)
  );

endmodule

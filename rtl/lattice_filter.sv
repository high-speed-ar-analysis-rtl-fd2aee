// lattice_filter: the adaptive lattice prediction error filter, P stages of
// lattice_stage in a chain. The input sample x(n) (DATA_W bits) is
// sign-extended to the error width EW and feeds both paths of stage 1,
// E^f_0(n) = E^b_0(n) = x(n). The output is the forward prediction error
// of the last stage, E^f_P, delayed by P samples (one register per stage).
//
// For the coefficient calculation unit every stage j brings out its inputs
// f_tap[j-1] = E^f_{j-1}(n) and b_tap[j-1] = E^b_{j-1}(n-1). The unit loads
// k_j through k_load (a one-hot vector over the stages) and k_val; k_clr
// clears every coefficient. sat_any flags a saturated sum in any stage.
// Index 0 of all arrays is stage 1.
module lattice_filter #(
  parameter int unsigned P      = 10,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned EW     = 18,
  parameter int unsigned KW     = 18,
  parameter int unsigned KF     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     k_clr,
  input  logic [P-1:0]             k_load,
  input  logic signed [KW-1:0]     k_val,
  output logic signed [EW-1:0]     e_out,
  output logic signed [EW-1:0]     f_tap [P],
  output logic signed [EW-1:0]     b_tap [P],
  output logic signed [KW-1:0]     k [P],
  output logic                     sat_any
);
  logic signed [EW-1:0] f [P+1];
  logic signed [EW-1:0] b [P+1];
  logic [P-1:0]         sat;

  assign f[0] = EW'(x);
  assign b[0] = EW'(x);

  for (genvar j = 0; j < P; j++) begin : g_stage
    lattice_stage #(.EW(EW), .KW(KW), .KF(KF)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .k_clr (k_clr),
      .k_load(k_load[j]),
      .k_val (k_val),
      .f_in  (f[j]),
      .b_in  (b[j]),
      .f_out (f[j+1]),
      .b_out (b[j+1]),
      .b_del (b_tap[j]),
      .k_q   (k[j]),
      .sat   (sat[j])
    );
    assign f_tap[j] = f[j];
  end

  assign e_out   = f[P];
  assign sat_any = |sat;

endmodule

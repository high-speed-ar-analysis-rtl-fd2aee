// lattice_stage: one stage j of the lattice (FIR) prediction error filter:
//
//   E^f_j(n) = E^f_{j-1}(n)   + k_j * E^b_{j-1}(n-1)
//   E^b_j(n) = E^b_{j-1}(n-1) + k_j * E^f_{j-1}(n)
//
// b_del is the one-sample delay of the backward error (the delay element
// of the stage); it is also brought out, with f_in, as the tap the
// coefficient calculation unit reads. k_j is a signed fixed-point number
// with KF fraction bits (|k| < 1) held in a register loaded by k_load and
// cleared by k_clr. The two products are rounded to nearest to the error
// width after dropping KF bits and the sums saturate to EW bits; these
// number formats are this design's choice.
// Timing: all registers advance when en is high (one sample); the outputs
// are registered, so each stage adds one sample of latency to both paths
// alike.
module lattice_stage #(
  parameter int unsigned EW = 18,
  parameter int unsigned KW = 18,
  parameter int unsigned KF = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 k_clr,
  input  logic                 k_load,
  input  logic signed [KW-1:0] k_val,
  input  logic signed [EW-1:0] f_in,
  input  logic signed [EW-1:0] b_in,
  output logic signed [EW-1:0] f_out,
  output logic signed [EW-1:0] b_out,
  output logic signed [EW-1:0] b_del,
  output logic signed [KW-1:0] k_q,
  output logic                 sat
);
  localparam logic signed [EW+1:0] EMAX = (EW+2)'((1 << (EW - 1)) - 1);
  localparam logic signed [EW+1:0] EMIN = -(EW+2)'(1 << (EW - 1));

  logic signed [EW+KW-1:0] pf, pb;
  logic signed [EW+1:0]    f_sum, b_sum;
  logic                    f_sat, b_sat;

  assign pf    = k_q * b_del;
  assign pb    = k_q * f_in;
  // products rounded to nearest (adding half an LSB before the shift), so
  // the stages do not accumulate the -1/2 LSB bias of truncation
  assign f_sum = (EW+2)'(f_in)  + (EW+2)'((pf + (EW+KW)'(1 << (KF - 1))) >>> KF);
  assign b_sum = (EW+2)'(b_del) + (EW+2)'((pb + (EW+KW)'(1 << (KF - 1))) >>> KF);
  assign f_sat = (f_sum > EMAX) || (f_sum < EMIN);
  assign b_sat = (b_sum > EMAX) || (b_sum < EMIN);
  assign sat   = en && (f_sat || b_sat);

  function automatic logic signed [EW-1:0] clip(input logic signed [EW+1:0] v);
    if (v > EMAX) return EW'(EMAX);
    if (v < EMIN) return EW'(EMIN);
    return EW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0;
    end else if (k_clr) begin
      k_q <= '0;
    end else if (k_load) begin
      k_q <= k_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_out <= '0;
      b_out <= '0;
      b_del <= '0;
    end else if (en) begin
      f_out <= clip(f_sum);
      b_out <= clip(b_sum);
      b_del <= b_in;
    end
  end

endmodule

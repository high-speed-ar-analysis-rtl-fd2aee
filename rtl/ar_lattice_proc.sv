// ar_lattice_proc: AR analysis processor based on the adaptive lattice
// filter. The lattice filter (P stages) runs on the input stream; the
// coefficient calculation unit adapts it stage by stage after a start
// pulse, so one coefficient set k_1..k_P takes about P*(N + ~70) samples,
// N = Q*P. Two ways of feeding the adaptation, chosen by `buffered` at the
// start:
//   buffered = 1: the input buffer captures the next N samples and plays
//     that one array to the filter again and again while k_1..k_P are
//     found, as the document describes (one data array fed P times);
//   buffered = 0: no buffer; the stream itself is fed continuously, which
//     the document allows for a signal that is stationary over the
//     P*N-sample window, each stage then seeing new samples.
// After the adaptation the live stream is filtered again.
//
// Interface: x/x_valid is the sample stream (one sample per clock at most);
// e_out is the forward prediction error E^f_P at the filter output, updated
// on every sample fed to the filter. Each new coefficient is reported by
// k_valid/k_idx/k_val as it is loaded; k holds all of them. calc is high
// while a coefficient is being estimated (one pulse per stage); busy covers
// the capture and the adaptation; done pulses when k_P is loaded.
module ar_lattice_proc #(
  parameter int unsigned P      = 10,
  parameter int unsigned Q      = 10,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned EW     = 18,
  parameter int unsigned KW     = 18,
  parameter int unsigned KF     = 16,
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned IDX_W  = $clog2(P + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     buffered,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [EW-1:0]     e_out,
  output logic                     k_valid,
  output logic [IDX_W-1:0]         k_idx,
  output logic signed [KW-1:0]     k_val,
  output logic signed [KW-1:0]     k [P],
  output logic                     calc,
  output logic                     busy,
  output logic                     done,
  output logic                     sat
);
  logic signed [EW-1:0] f_tap [P];
  logic signed [EW-1:0] b_tap [P];
  logic                 k_clr;
  logic [P-1:0]         k_load;
  logic                 f_valid, cap_done, capturing, c_start, c_busy;
  logic signed [DATA_W-1:0] f_x;

  lattice_input_buffer #(.DATA_W(DATA_W), .N(Q * P)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .buffered (buffered),
    .start    (start),
    .stop     (done),
    .in_valid (x_valid),
    .in_x     (x),
    .out_valid(f_valid),
    .out_x    (f_x),
    .cap_done (cap_done),
    .capturing(capturing)
  );

  // the adaptation starts at once on the stream, or when the array is in
  assign c_start = (start && !buffered) || cap_done;

  lattice_filter #(
    .P(P), .DATA_W(DATA_W), .EW(EW), .KW(KW), .KF(KF)
  ) u_filter (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (f_valid),
    .x      (f_x),
    .k_clr  (k_clr),
    .k_load (k_load),
    .k_val  (k_val),
    .e_out  (e_out),
    .f_tap  (f_tap),
    .b_tap  (b_tap),
    .k      (k),
    .sat_any(sat)
  );

  coef_calc_unit #(
    .P(P), .Q(Q), .EW(EW), .KW(KW), .KF(KF), .ACC_W(ACC_W)
  ) u_coef (
    .clk   (clk),
    .rst_n (rst_n),
    .start (c_start),
    .en    (f_valid),
    .f_tap (f_tap),
    .b_tap (b_tap),
    .k_clr (k_clr),
    .k_load(k_load),
    .k_val (k_val),
    .k_idx (k_idx),
    .calc  (calc),
    .busy  (c_busy),
    .done  (done)
  );

  assign k_valid = |k_load;
  assign busy    = c_busy || capturing;

endmodule

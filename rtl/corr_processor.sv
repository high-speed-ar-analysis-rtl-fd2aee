// corr_processor: the correlation processor, a linear array of P+1
// fixed-point processor units (corr_cell) estimating r_xx(0..P) of the
// input signal x(n) over frames of N = Q*P samples (the document asks for
// at least q*p = 10p samples for stable estimates).
//
// x(n) is broadcast to all units; the lagged samples travel along the
// array, one register per unit. A frame counter marks the last sample of
// each frame; one cycle later r holds the new estimates and r_valid pulses.
// The next frame is accumulated while the previous results are held, so the
// correlation processor and the Durbin processor work as a two-stage
// pipeline. Frames are consecutive blocks of N input samples; whether the
// window is reset between frames is this design's choice (it is).
module corr_processor #(
  parameter int unsigned P      = 10,
  parameter int unsigned Q      = 10,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  r [P+1],
  output logic                     r_valid
);
  localparam int unsigned N  = Q * P;
  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] cnt;
  logic          last;
  logic signed [DATA_W-1:0] lag [P+2];

  assign last   = (cnt == CW'(N - 1));
  assign lag[0] = x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      r_valid <= 1'b0;
    end else begin
      r_valid <= x_valid && last;
      if (x_valid) cnt <= last ? '0 : cnt + 1'b1;
    end
  end

  for (genvar i = 0; i <= P; i++) begin : g_cell
    corr_cell #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (x_valid),
      .last  (last),
      .x     (x),
      .lag_in(lag[i]),
      .lag_q (lag[i+1]),
      .r     (r[i])
    );
  end

endmodule

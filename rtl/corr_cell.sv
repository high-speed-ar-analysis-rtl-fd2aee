// corr_cell: one processor unit of the correlation processor, the
// "Accumulator r_xx(i)" of the structure: it estimates one autocorrelation
// sample r_xx(i) = sum_n x(n) * x(n-i) over a frame of samples.
//
// The cell multiplies the broadcast sample x(n) by its lagged input
// lag_in = x(n-i) and accumulates the product in ACC_W-bit fixed point.
// lag_q registers lag_in so that chained cells form the delay line of the
// linear array (cell i+1 gets lag_q of cell i). On the last sample of a
// frame (last = 1 with en) the final sum is copied to r and the
// accumulator and lag register are cleared, so every frame is an
// independent window (samples before the window count as zero).
// Timing: one sample per clock when en is high; r is valid the cycle after
// the last sample.
module corr_cell #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     last,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] lag_in,
  output logic signed [DATA_W-1:0] lag_q,
  output logic signed [ACC_W-1:0]  r
);
  logic signed [ACC_W-1:0]    acc;
  logic signed [2*DATA_W-1:0] prod;
  logic signed [ACC_W-1:0]    sum;

  assign prod = x * lag_in;
  assign sum  = acc + ACC_W'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      lag_q <= '0;
      r     <= '0;
    end else if (en) begin
      if (last) begin
        r     <= sum;
        acc   <= '0;
        lag_q <= '0;
      end else begin
        acc   <= sum;
        lag_q <= lag_in;
      end
    end
  end

endmodule

// rat_to_fixed: converts a rational fraction n/d into a signed fixed-point
// number with FRAC fraction bits, q = trunc(n * 2^FRAC / d), saturated to
// OUT_W bits. This is the final "natural representation" division the
// document describes for the Durbin processor results; the sequential
// restoring division (one quotient bit per cycle) and the fixed-point
// format are this design's choice.
//
// Interface: valid/ready on the input (in_ready is high when idle); the
// result comes with a one-cycle out_valid pulse RAT_MAG+FRAC+2 cycles after
// the input was accepted, together with the input fraction and tag.
module rat_to_fixed
  import ar_pkg::*;
#(
  parameter int unsigned OUT_W = 32,
  parameter int unsigned FRAC  = 16,
  parameter int unsigned TAG_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  rat_t                    x,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] q,
  output rat_t                    out_x,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned NW = RAT_W + FRAC;
  localparam logic [NW-1:0] QMAX = NW'((64'd1 << (OUT_W - 1)) - 1);

  logic          div_start, div_busy, div_done;
  logic [NW-1:0] dividend, quotient;
  logic [RAT_W-1:0] remainder;
  logic [RAT_W-1:0] n_mag;
  logic          neg;
  logic          pending;
  logic [OUT_W-1:0] q_mag;

  assign n_mag     = x.n[RAT_W-1] ? RAT_W'(-x.n) : RAT_W'(x.n);
  assign dividend  = {n_mag, FRAC'(0)};
  assign in_ready  = !pending;
  assign div_start = in_valid && in_ready;

  udiv #(.NW(NW), .DW(RAT_W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (dividend),
    .divisor  (RAT_W'(x.d)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  assign q_mag = OUT_W'((quotient > QMAX) ? QMAX : quotient);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      out_valid <= 1'b0;
      neg       <= 1'b0;
      q         <= '0;
      out_x     <= RAT_ZERO;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (div_start) begin
        pending <= 1'b1;
        neg     <= x.n[RAT_W-1];
        out_x   <= x;
        out_tag <= in_tag;
      end else if (div_done) begin
        pending   <= 1'b0;
        out_valid <= 1'b1;
        q         <= neg ? -q_mag : q_mag;
      end
    end
  end

  // the remainder is not needed for truncation towards zero
  logic unused_ok;
  assign unused_ok = ^{remainder, div_busy};

endmodule

// rat_muldiv: pipelined multiplier / divider for rational fractions.
//
// x * y = (nx*ny) / (dx*dy)   and   x / y = (nx*dy) / (dx*ny).
// Each operation needs two 18x18 products, which map onto two DSP
// multipliers. A new operation can be issued every clock cycle (period 1)
// and its result appears exactly LATENCY = 7 cycles later, as the document
// states for this unit. The seven register stages are this design's split:
//   1 operand register, 2 product, 3 product register, 4 sign correction
//   (for a division the denominator is made positive), 5 leading-one
//   detection giving the common shift, 6 shift and pack, 7 output register.
// A tag travels with each operation so that the issuer can tell results
// apart. A division by zero saturates to +/-(2^17-1)/1 (see ar_pkg).
//
// Interface: in_valid/op/x/y/in_tag are sampled on the rising clock edge;
// out_valid/z/out_tag are registered outputs. No back-pressure.
module rat_muldiv
  import ar_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  rat_op_e          op,
  input  rat_t             x,
  input  rat_t             y,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output rat_t             z,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned LATENCY = 7;

  logic [LATENCY-1:0] vld;
  logic [TAG_W-1:0]   tag [LATENCY];

  // stage 1: operands
  rat_t    x1, y1;
  rat_op_e op1;
  // stage 2/3: products
  logic signed [2*RAT_W-1:0] pn2, pd2, pn3, pd3;
  // stage 4: sign-corrected wide pair
  logic signed [WIDE_W-1:0] n4, d4;
  // stage 5: shift amount
  logic signed [WIDE_W-1:0] n5, d5;
  logic [SH_W-1:0]          s5;
  // stage 6: packed result
  rat_t r6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
    end else begin
      vld <= {vld[LATENCY-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    tag[0] <= in_tag;
    for (int i = 1; i < LATENCY; i++) tag[i] <= tag[i-1];

    x1  <= x;
    y1  <= y;
    op1 <= op;

    if (op1 == RAT_MUL) begin
      pn2 <= x1.n * y1.n;
      pd2 <= x1.d * y1.d;
    end else begin
      pn2 <= x1.n * y1.d;
      pd2 <= x1.d * y1.n;
    end

    pn3 <= pn2;
    pd3 <= pd2;

    if (pd3 < 0) begin
      n4 <= -WIDE_W'(pn3);
      d4 <= -WIDE_W'(pd3);
    end else begin
      n4 <= WIDE_W'(pn3);
      d4 <= WIDE_W'(pd3);
    end

    n5 <= n4;
    d5 <= d4;
    s5 <= rat_shift_amt(wide_abs(n4) | wide_abs(d4));

    r6 <= rat_pack(n5, d5, s5);

    z <= r6;
  end

  assign out_valid = vld[LATENCY-1];
  assign out_tag   = tag[LATENCY-1];

endmodule

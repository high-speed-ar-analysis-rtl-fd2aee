// rat_add: pipelined adder for rational fractions.
//
// x + y = (nx*dy + ny*dx) / (dx*dy), three 18x18 products per addition.
// A new addition can be issued every cycle; its result appears LATENCY = 4
// cycles later. When the result is fed back to an input (accumulation) the
// period is therefore 4 cycles, the accumulation period the document gives.
// Stage split (this design's choice): 1 operand register, 2 products,
// 3 sum and leading-one detection, 4 shift, pack and output register.
// A tag travels with each operation.
//
// Interface: in_valid/x/y/in_tag sampled on the rising edge; out_valid/z/
// out_tag are registered. No back-pressure.
module rat_add
  import ar_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  rat_t             x,
  input  rat_t             y,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output rat_t             z,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned LATENCY = 4;

  logic [LATENCY-1:0] vld;
  logic [TAG_W-1:0]   tag [LATENCY];

  rat_t x1, y1;
  logic signed [2*RAT_W-1:0] p_a2, p_b2, p_d2;
  logic signed [WIDE_W-1:0]  n3, d3;
  logic [SH_W-1:0]           s3;
  logic signed [WIDE_W-1:0]  sum2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign sum2 = WIDE_W'(p_a2) + WIDE_W'(p_b2);

  always_ff @(posedge clk) begin
    tag[0] <= in_tag;
    for (int i = 1; i < LATENCY; i++) tag[i] <= tag[i-1];

    x1 <= x;
    y1 <= y;

    p_a2 <= x1.n * y1.d;
    p_b2 <= y1.n * x1.d;
    p_d2 <= x1.d * y1.d;

    n3 <= sum2;
    d3 <= WIDE_W'(p_d2);
    s3 <= rat_shift_amt(wide_abs(sum2) | wide_abs(WIDE_W'(p_d2)));

    z <= rat_pack(n3, d3, s3);
  end

  assign out_valid = vld[LATENCY-1];
  assign out_tag   = tag[LATENCY-1];

endmodule

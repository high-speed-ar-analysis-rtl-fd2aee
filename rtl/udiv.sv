// udiv: sequential unsigned restoring divider, one quotient bit per cycle.
//
// A start pulse loads dividend (NW bits) and divisor (DW bits); NW cycles
// later done pulses for one cycle and quotient/remainder hold the result
// until the next start. busy is high while dividing. A zero divisor gives
// an all-ones quotient (the restoring step always succeeds).
module udiv #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [DW-1:0] rem;
  logic [NW-1:0] num;
  logic [DW-1:0] dvs;
  logic [CW-1:0] cnt;
  logic [DW:0]   sh;

  // partial remainder with the next dividend bit shifted in
  assign sh = {rem, num[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      rem  <= '0;
      num  <= '0;
      dvs  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rem  <= '0;
        num  <= dividend;
        dvs  <= divisor;
        cnt  <= CW'(NW);
      end else if (busy) begin
        // shift the next dividend bit in and try to subtract
        if (sh >= {1'b0, dvs}) begin
          rem <= DW'(sh - {1'b0, dvs});
          num <= {num[NW-2:0], 1'b1};
        end else begin
          rem <= DW'(sh);
          num <= {num[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // num collects quotient bits from the right as dividend bits leave it
  assign quotient  = num;
  assign remainder = rem;

endmodule

// isqrt: sequential integer square root, digit by digit, one result bit per
// cycle. A start pulse loads an unsigned W-bit radicand (W even); W/2
// cycles later done pulses and root = floor(sqrt(radicand)) holds until the
// next start. busy is high while computing.
module isqrt #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int unsigned RW = W / 2;
  localparam int unsigned CW = $clog2(RW + 1);

  logic [W-1:0]  rad;
  logic [RW+1:0] rem;     // remainder <= 2*root, RW+2 bits
  logic [CW-1:0] cnt;

  // remainder gets the next two radicand bits; trial subtracts 4*root+1
  logic [RW+3:0] rem_sh;
  logic [RW+3:0] sub;
  assign rem_sh = {rem, rad[W-1:W-2]};
  assign sub    = {2'b00, root, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rad  <= radicand;
        rem  <= '0;
        root <= '0;
        cnt  <= CW'(RW);
      end else if (busy) begin
        rad <= {rad[W-3:0], 2'b00};
        if (rem_sh >= sub) begin
          rem  <= (RW+2)'(rem_sh - sub);
          root <= {root[RW-2:0], 1'b1};
        end else begin
          rem  <= (RW+2)'(rem_sh);
          root <= {root[RW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule

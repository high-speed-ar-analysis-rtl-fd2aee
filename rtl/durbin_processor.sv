// durbin_processor: solves the Yule-Walker equations R a = -r for the
// prediction coefficients a_1..a_P and reflection coefficients k_1..k_P with
// the Durbin (Levinson-Durbin) recursion, in rational-fraction arithmetic:
//
//   E_0 = r_0, a_0 = 1
//   for i = 1..P:
//     k_i = -(a_0 r_i + a_1 r_{i-1} + ... + a_{i-1} r_1) / E_{i-1}
//     a_i = k_i;  a_j = a_j + k_i a_{i-j}  (j = 1..i-1, old a values)
//     E_i = (1 - k_i^2) E_{i-1}
//
// Arithmetic: one pipelined multiplier/divider (rat_muldiv, period 1,
// latency 7) and one pipelined adder (rat_add, latency 4), as in the
// document. The critical loop of the recursion is the k_i sum: its
// products are issued every 4 cycles, and each product meets the adder at
// the cycle the previous partial sum leaves it, the sum being forwarded
// straight back to the adder input; the sum loop so runs with the
// document's period of 4 cycles per term. The a_j updates are independent
// and are streamed through both units one per cycle. k_i^2 takes the
// multiplier slot after them and 1 - k_i^2 the adder slot that product
// frees, so only the final multiplication by E_{i-1} follows the updates.
// (1 - k_i^2) is formed against an exact 1, which keeps E_i accurate when
// it becomes small. This schedule is this design's own; the document gives
// the units and periods, not the sequencing.
//
// Input conversion (this design's choice): the integer correlations r_i are
// all shifted right by the one amount that makes r_0 fit the 17-bit
// magnitude of a fraction part, and become the normalised fractions
// r_i/r_0. The recursion is scale invariant, so this does not change a or
// k, and it keeps every operand near or below 1 in magnitude, where a
// fraction with a common shift of numerator and denominator is most
// precise (E_0 = 1, |r_i/r_0| <= 1, |k_i| < 1). r_0 must be positive.
//
// Interface: start (one cycle, while idle) samples r. busy is high until the
// results have been delivered. The results leave as a valid/ready stream:
// k_1..k_P (out_is_a = 0) followed by a_1..a_P (out_is_a = 1), out_idx
// being the coefficient index 1..P. done pulses after the last transfer.
module durbin_processor
  import ar_pkg::*;
#(
  parameter int unsigned P     = 10,
  parameter int unsigned ACC_W = 48,
  parameter int unsigned IDX_W = $clog2(P + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] r [P+1],
  output logic                    busy,
  output logic                    done,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    out_is_a,
  output logic [IDX_W-1:0]        out_idx,
  output rat_t                    out_val
);
  localparam int unsigned SUM_PERIOD = 4;   // accumulation period

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_KSUM, S_KDIV, S_KWAIT, S_UPD,
    S_E1, S_E1W, S_E2, S_E2W, S_E3, S_E3W, S_NEXT, S_OUT
  } state_e;

  state_e state;

  rat_t rf    [P+1];     // correlations as fractions
  rat_t a_old [P+1];     // coefficients of order i-1
  rat_t a_new [P+1];     // coefficients of order i
  rat_t k_arr [P+1];     // reflection coefficients (index 0 unused)
  rat_t e_q;             // prediction error power E_{i-1}
  rat_t k_q;             // current k_i
  rat_t acc;             // running sum / scratch

  logic [IDX_W-1:0] i_q;      // order being computed, 1..P
  logic [IDX_W-1:0] iss;      // next operand index to issue
  logic [IDX_W-1:0] ret;      // results returned so far
  logic [1:0]       tmr;      // issue spacing in the k sum
  logic [IDX_W:0]   oi;       // output counter, 0..2P-1
  logic             e_iss;    // k_i^2 has been issued
  logic             e_got;    // ... and 1 - k_i^2 has returned (in acc)

  // arithmetic unit ports
  logic            md_in_valid, md_out_valid;
  rat_op_e         md_op;
  rat_t            md_x, md_y, md_z;
  logic [IDX_W-1:0] md_in_tag, md_out_tag;
  logic            ad_in_valid, ad_out_valid;
  rat_t            ad_x, ad_y, ad_z;
  logic [IDX_W-1:0] ad_in_tag, ad_out_tag;

  rat_muldiv #(.TAG_W(IDX_W)) u_muldiv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(md_in_valid), .op(md_op), .x(md_x), .y(md_y), .in_tag(md_in_tag),
    .out_valid(md_out_valid), .z(md_z), .out_tag(md_out_tag)
  );

  rat_add #(.TAG_W(IDX_W)) u_add (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ad_in_valid), .x(ad_x), .y(ad_y), .in_tag(ad_in_tag),
    .out_valid(ad_out_valid), .z(ad_z), .out_tag(ad_out_tag)
  );

  // common shift bringing r_0 into the fraction range
  logic [SH_W+1:0] r_sh;
  always_comb begin
    r_sh = '0;
    for (int b = RAT_MAG; b < ACC_W; b++) begin
      if (r[0][b]) r_sh = (SH_W+2)'(b - RAT_MAG + 1);
    end
  end

  // operand selection
  always_comb begin
    md_in_valid = 1'b0;
    md_op       = RAT_MUL;
    md_x        = RAT_ZERO;
    md_y        = RAT_ZERO;
    md_in_tag   = '0;
    ad_in_valid = 1'b0;
    ad_x        = RAT_ZERO;
    ad_y        = RAT_ZERO;
    ad_in_tag   = '0;
    unique case (state)
      S_KSUM: begin
        if (iss < i_q && tmr == 0) begin
          md_in_valid = 1'b1;
          md_x        = a_old[iss];
          md_y        = rf[i_q - iss];
        end
        if (md_out_valid) begin
          ad_in_valid = 1'b1;
          ad_x        = md_z;
          ad_y        = ad_out_valid ? ad_z : acc;   // forwarded partial sum
        end
      end
      S_KDIV: begin
        md_in_valid = 1'b1;
        md_op       = RAT_DIV;
        md_x        = rat_neg(acc);
        md_y        = e_q;
      end
      S_UPD: begin
        if (iss < i_q) begin
          md_in_valid = 1'b1;
          md_x        = k_q;
          md_y        = a_old[i_q - iss];
          md_in_tag   = iss;
        end else if (!e_iss) begin
          // k_i^2 in the free multiplier slot after the updates (tag 0)
          md_in_valid = 1'b1;
          md_x        = k_q;
          md_y        = k_q;
        end
        if (md_out_valid) begin
          ad_in_valid = 1'b1;
          if (md_out_tag != '0) begin
            ad_x      = a_old[md_out_tag];
            ad_y      = md_z;
            ad_in_tag = md_out_tag;
          end else begin
            ad_x      = RAT_ONE;                  // 1 - k_i^2, tag 0
            ad_y      = rat_neg(md_z);
          end
        end
      end
      S_E1: begin
        md_in_valid = 1'b1;
        md_x        = k_q;
        md_y        = k_q;
      end
      S_E2: begin
        ad_in_valid = 1'b1;
        ad_x        = RAT_ONE;
        ad_y        = rat_neg(acc);
      end
      S_E3: begin
        md_in_valid = 1'b1;
        md_x        = acc;
        md_y        = e_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      i_q   <= '0;
      iss   <= '0;
      ret   <= '0;
      tmr   <= '0;
      oi    <= '0;
      e_iss <= 1'b0;
      e_got <= 1'b0;
      e_q   <= RAT_ONE;
      k_q   <= RAT_ZERO;
      acc   <= RAT_ZERO;
      for (int n = 0; n <= P; n++) begin
        rf[n]    <= RAT_ZERO;
        a_old[n] <= RAT_ZERO;
        a_new[n] <= RAT_ZERO;
        k_arr[n] <= RAT_ZERO;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int n = 0; n <= P; n++) begin
            rf[n].n <= RAT_W'(r[n] >>> r_sh);
            rf[n].d <= RAT_W'(r[0] >>> r_sh);
          end
          state <= S_LOAD;
        end
        S_LOAD: begin
          for (int n = 0; n <= P; n++) begin
            a_old[n] <= (n == 0) ? RAT_ONE : RAT_ZERO;
            a_new[n] <= (n == 0) ? RAT_ONE : RAT_ZERO;
          end
          e_q   <= rf[0];
          i_q   <= IDX_W'(1);
          iss   <= '0;
          ret   <= '0;
          tmr   <= '0;
          acc   <= RAT_ZERO;
          state <= S_KSUM;
        end
        S_KSUM: begin
          if (md_in_valid) begin
            iss <= iss + 1'b1;
            tmr <= 2'(SUM_PERIOD - 1);
          end else if (tmr != 0) begin
            tmr <= tmr - 1'b1;
          end
          if (ad_out_valid) begin
            acc <= ad_z;
            ret <= ret + 1'b1;
            if (ret + 1'b1 == i_q) state <= S_KDIV;
          end
        end
        S_KDIV: state <= S_KWAIT;
        S_KWAIT: if (md_out_valid) begin
          k_q          <= md_z;
          k_arr[i_q]   <= md_z;
          a_new[i_q]   <= md_z;
          iss          <= IDX_W'(1);
          ret          <= '0;
          e_iss        <= 1'b0;
          e_got        <= 1'b0;
          state        <= (i_q == 1) ? S_E1 : S_UPD;
        end
        S_UPD: begin
          if (md_in_valid) begin
            if (iss < i_q) iss <= iss + 1'b1;
            else           e_iss <= 1'b1;
          end
          if (ad_out_valid) begin
            if (ad_out_tag != '0) begin
              a_new[ad_out_tag] <= ad_z;
              ret <= ret + 1'b1;
            end else begin
              acc   <= ad_z;
              e_got <= 1'b1;
            end
          end
          if (ret == i_q - 1'b1 && e_got) state <= S_E3;
        end
        S_E1:  state <= S_E1W;
        S_E1W: if (md_out_valid) begin acc <= md_z; state <= S_E2; end
        S_E2:  state <= S_E2W;
        S_E2W: if (ad_out_valid) begin acc <= ad_z; state <= S_E3; end
        S_E3:  state <= S_E3W;
        S_E3W: if (md_out_valid) begin e_q <= md_z; state <= S_NEXT; end
        S_NEXT: begin
          for (int n = 1; n <= P; n++) a_old[n] <= a_new[n];
          iss <= '0;
          ret <= '0;
          tmr <= '0;
          acc <= RAT_ZERO;
          if (i_q == IDX_W'(P)) begin
            oi    <= '0;
            state <= S_OUT;
          end else begin
            i_q   <= i_q + 1'b1;
            state <= S_KSUM;
          end
        end
        S_OUT: if (out_ready) begin
          if (oi == (IDX_W+1)'(2 * P - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
          oi <= oi + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_is_a  = (oi >= (IDX_W+1)'(P));
  assign out_idx   = out_is_a ? IDX_W'(oi - (IDX_W+1)'(P) + 1'b1) : IDX_W'(oi + 1'b1);
  assign out_val   = out_is_a ? a_old[out_idx] : k_arr[out_idx];

  // output stream rule: a word that is offered stays unchanged until taken
  // (out_valid is low in reset, so no reset guard is needed)
  a_out_hold: assert property (@(posedge clk)
    out_valid && !out_ready |=> out_valid && $stable(out_is_a) && $stable(out_idx) && $stable(out_val));

endmodule

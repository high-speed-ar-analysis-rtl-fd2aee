// lattice_input_buffer: input buffer of the lattice-filter AR processor.
// The adaptation finds k_1..k_P one after the other, each from N = Q*P
// samples, so one array of N samples is fed to the filter P times. This
// buffer holds that array. In buffered mode a start captures the next N
// valid input samples (the filter is not fed meanwhile) and then plays the
// array back at one sample per clock, cyclically, until the adaptation
// ends; then the live stream passes through again. With buffered low the
// buffer is transparent and the stream itself is fed to the filter, which
// suits a signal that is stationary over the whole P*N-sample adaptation.
//
// Interface: in_valid/in_x is the live stream; out_valid/out_x feed the
// filter; with buffered low they equal the input. start (with buffered
// high) begins a capture; cap_done pulses in the cycle that writes sample
// N, and playback starts in the next cycle; stop (the adaptation's done)
// ends playback. capturing is high during the capture. A new start during
// playback begins a new capture.
// Timing: the live input passes through combinationally; the array is a
// register array with one write port and an asynchronous read port.
// The document states that one data array is fed P times; the cyclic
// playback (so that the coefficient unit runs unchanged, each estimate
// covering every stored sample once) and the capture protocol are this
// design's choices.
module lattice_input_buffer #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned N      = 100,
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     buffered,
  input  logic                     start,
  input  logic                     stop,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_x,
  output logic                     cap_done,
  output logic                     capturing
);
  typedef enum logic [1:0] {B_PASS, B_CAP, B_PLAY} bstate_e;
  bstate_e state;

  logic signed [DATA_W-1:0] mem [N];
  logic [AW-1:0]            wptr, rptr;
  logic                     wr;

  assign capturing = (state == B_CAP);
  assign wr        = (state == B_CAP) && in_valid;
  assign cap_done  = wr && (wptr == AW'(N - 1));

  always_comb begin
    case (state)
      B_CAP:   begin out_valid = 1'b0;     out_x = in_x;      end
      B_PLAY:  begin out_valid = 1'b1;     out_x = mem[rptr]; end
      default: begin out_valid = in_valid; out_x = in_x;      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_PASS;
      wptr  <= '0;
      rptr  <= '0;
    end else if (start && buffered) begin
      state <= B_CAP;
      wptr  <= '0;
    end else begin
      case (state)
        B_CAP: if (in_valid) begin
          if (cap_done) begin
            state <= B_PLAY;
            rptr  <= '0;
          end
          wptr <= wptr + 1'b1;
        end
        B_PLAY: begin
          rptr <= (rptr == AW'(N - 1)) ? '0 : rptr + 1'b1;
          if (stop) state <= B_PASS;
        end
        default: ;
      endcase
    end
  end

  // the filter never sees a sample while the array is being captured
  a_cap_quiet: assert property (@(posedge clk) capturing |-> !out_valid);

endmodule

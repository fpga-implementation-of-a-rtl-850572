// rsc_encoder: recursive systematic convolutional (RSC) encoder with
// trellis termination, for one frame at a time (the "RSCencoder" block).
//
// A one-cycle pulse on start, while the encoder is idle, loads the parallel
// frame and clears the MEM-stage shift register. The encoder then emits one
// code bit pair per data_clk cycle: the DATA_BITS frame bits, least
// significant first, followed by MEM tail bits. During a tail cycle the
// input is forced to the feedback value, so the register input is 0 and the
// trellis is driven back to the all-zero state. Each systematic bit equals
// the input bit (frame bit or tail bit); each parity bit is the XOR of the
// register input and the state bits selected by FF_TAPS. The feedback is
// the XOR of the state bits selected by FB_TAPS.
//
// Outputs: sysbitout / paribitout carry the serial stream, registered, one
// bit per cycle. systematic_data / parity_data are shift registers that fill
// from the top, so once the frame is complete bit i holds the bit sent in
// cycle i. framehead pulses for one cycle in the cycle in which both
// parallel words are complete. They hold until the first bit of the next
// frame is shifted in, one edge after that frame's start is taken. busy is high while the frame is being sent;
// start is ignored while busy.
//
// Timing: start sampled high at clock edge t loads the frame; bit i appears
// on the serial outputs after edge t+1+i; framehead is high after edge
// t+DATA_BITS+MEM, and busy falls at the same edge, so the next start can be
// taken at edge t+DATA_BITS+MEM+1.
//
// From the source design: the port names, the 16-bit frame, the 20-bit
// parallel words, serial and parallel outputs together, the LSB-first order
// and the encoder polynomials of the default configuration (those that
// reproduce the published reference words). This design's choices: the
// start/busy handshake, the framehead timing and an asynchronous
// active-low reset.
module rsc_encoder #(
  parameter int unsigned DATA_BITS = mtc_pkg::DATA_BITS,
  parameter int unsigned MEM       = mtc_pkg::RSC_MEM,
  parameter logic [MEM:0] FB_TAPS  = mtc_pkg::RSC_FB_TAPS,
  parameter logic [MEM:0] FF_TAPS  = mtc_pkg::RSC_FF_TAPS,
  localparam int unsigned SYS_BITS = DATA_BITS + MEM
) (
  input  logic                 data_clk,
  input  logic                 reset_n,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] frame,
  output logic                 sysbitout,
  output logic                 paribitout,
  output logic [SYS_BITS-1:0]  systematic_data,
  output logic [SYS_BITS-1:0]  parity_data,
  output logic                 framehead,
  output logic                 busy
);

  localparam int unsigned CW = $clog2(SYS_BITS + 1);

  logic [DATA_BITS-1:0] data_sr;   // frame bits still to send, next at bit 0
  logic [MEM:1]         state;     // state[k] = register input delayed k cycles
  logic [CW-1:0]        cnt;       // index of the bit sent next

  logic in_tail, u, fb, a, p;

  // One trellis step.
  always_comb begin
    in_tail = (cnt >= CW'(DATA_BITS));
    fb      = ^(state & FB_TAPS[MEM:1]);
    u       = in_tail ? fb : data_sr[0];
    a       = u ^ fb;
    p       = ^({state, a} & FF_TAPS);
  end

  always_ff @(posedge data_clk or negedge reset_n) begin
    if (!reset_n) begin
      data_sr         <= '0;
      state           <= '0;
      cnt             <= '0;
      busy            <= 1'b0;
      framehead       <= 1'b0;
      sysbitout       <= 1'b0;
      paribitout      <= 1'b0;
      systematic_data <= '0;
      parity_data     <= '0;
    end else begin
      framehead <= 1'b0;
      if (!busy) begin
        if (start) begin
          data_sr         <= frame;
          state           <= '0;
          cnt             <= '0;
          busy            <= 1'b1;
        end
      end else begin
        data_sr         <= data_sr >> 1;
        state           <= {state[MEM-1:1], a};
        sysbitout       <= u;
        paribitout      <= p;
        systematic_data <= {u, systematic_data[SYS_BITS-1:1]};
        parity_data     <= {p, parity_data[SYS_BITS-1:1]};
        cnt             <= cnt + 1'b1;
        if (cnt == CW'(SYS_BITS - 1)) begin
          busy      <= 1'b0;
          framehead <= 1'b1;
        end
      end
    end
  end

  // After the last tail bit the trellis must be back in the zero state.
  a_terminated: assert property (@(posedge data_clk) disable iff (!reset_n)
                                 framehead |-> state == '0)
    else $error("rsc_encoder: trellis not terminated at end of frame");

endmodule

// tcs_tx_ctrl: sequencer of the sender side.
//
// The state says what the bus register will hold after the current edge
// completes, i.e. what is on the bus now: the zero vector (ZERO), the first
// code word of a data word (FIRST) or its second code word (SECOND).
//   FIRST          -> send the second code word (send_second).
//   ZERO           -> if a word waits, take it and send its first code word
//                     (take); no crosstalk check is needed, nothing falls.
//   SECOND         -> if a word waits and the analyzer reports no crosstalk,
//                     take it and send its first code word; if it reports
//                     crosstalk, send the CIV (civ) and keep the word, which
//                     then goes out one cycle later; if no word waits, send
//                     the zero vector (idle).
// clear is high whenever the zero vector is sent next.
// So a data word takes 2 bus cycles, or 3 when a CIV precedes it.
// All outputs are combinational from the state and the inputs.
//
// What happens on a flag (one zero cycle, the word held back one cycle) is as
// the scheme describes; gathering it into a three-state sequencer, and
// sending the zero vector while idle, are this design's choices.
module tcs_tx_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic word_valid,   // sender latch holds a word
  input  logic xt,           // analyzer: Class 5/6 against the bus
  output logic take,         // send first code word now, free the latch
  output logic send_second,  // send the held second code word
  output logic civ,          // zero vector sent as CIV
  output logic idle,         // zero vector sent, nothing to send
  output logic clear         // zero vector sent (civ or idle)
);
  typedef enum logic [1:0] {BUS_ZERO, BUS_FIRST, BUS_SECOND} bus_state_e;

  bus_state_e state_q, state_d;

  always_comb begin
    take        = 1'b0;
    send_second = 1'b0;
    civ         = 1'b0;
    idle        = 1'b0;
    state_d     = BUS_ZERO;
    unique case (state_q)
      BUS_FIRST: begin
        send_second = 1'b1;
        state_d     = BUS_SECOND;
      end
      BUS_SECOND: begin
        if (word_valid && !xt) begin
          take    = 1'b1;
          state_d = BUS_FIRST;
        end else if (word_valid) begin
          civ = 1'b1;
        end else begin
          idle = 1'b1;
        end
      end
      default: begin  // BUS_ZERO
        if (word_valid) begin
          take    = 1'b1;
          state_d = BUS_FIRST;
        end else begin
          idle = 1'b1;
        end
      end
    endcase
  end

  assign clear = civ | idle;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state_q <= BUS_ZERO;
    else        state_q <= state_d;

endmodule

// sender_latch: one-word latch between the sender and the TCS encoder.
//
// A word offered with in_valid is taken when in_ready is high and held on
// out_data with out_valid until the transmitter takes it (take high at a
// clock edge). The transmitter takes a word in the cycle its first code is
// put on the bus, so a word stays here for one cycle when no CIV is needed
// and for two cycles when one is. in_ready is high when the latch is empty
// or its word is taken in the same cycle, so a new word can follow without a
// gap.
//
// The valid/ready handshake is this design's choice; the latch itself and
// the one- and two-cycle holding are as the design describes.
module sender_latch #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [N-1:0] out_data,
  input  logic         take
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      out_data  <= in_data;
    end else if (take) begin
      out_valid <= 1'b0;
    end
  end

  assign in_ready = !out_valid || take;

  a_take_needs_word: assert property (@(posedge clk) disable iff (!rst_n) take |-> out_valid)
    else $error("sender_latch: take without a word");

endmodule

// receiver_latch: output register between the TCS decoder and the receiver.
//
// Captures the decoded word when the decoder marks it valid and presents it
// to the receiver for one cycle with out_valid, one clock edge later. The
// receiver cannot stall the bus, so there is no ready signal; out_data keeps
// the last word between valid pulses. Registering the output is this
// design's choice for the latch shown before the receiver.
module receiver_latch #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         out_valid,
  output logic [N-1:0] out_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end
endmodule

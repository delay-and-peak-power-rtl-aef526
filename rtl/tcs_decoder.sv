// tcs_decoder: receiver-side TCS decoder.
//
// A decode bit tells whether the bus word of this cycle is the second
// transmission of a data word. With the bit clear, an all-zero bus word (CIV
// or idle) is discarded; any other word is a first transmission: it is
// stored and the bit is set. With the bit set, the stored first word and the
// bus word are decoded block by block through the inverse of the TCS code
// table, and the bit is cleared. The original word appears on data with
// valid high in the cycle the second word is on the bus (combinational from
// the bus); code_err flags a 6-bit pattern that is no code word (only a
// corrupted bus can cause it; such a block decodes to 0).
//
// The decode bit, the zero-vector rule and the store-then-decode scheme are
// those of the TCS scheme; the combinational output and the error flag are
// this design's choices.
module tcs_decoder #(
  parameter int unsigned N = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N/4*3-1:0]   bus_word,
  output logic               valid,
  output logic [N-1:0]       data,
  output logic               code_err,
  output logic               discard
);
  import tcs_pkg::*;

  localparam int unsigned P = N / 4;
  localparam int unsigned W = P * 3;

  logic         decode_q;
  logic [W-1:0] first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decode_q <= 1'b0;
      first_q  <= '0;
    end else if (decode_q) begin
      decode_q <= 1'b0;
    end else if (bus_word != '0) begin
      decode_q <= 1'b1;
      first_q  <= bus_word;
    end
  end

  always_comb begin
    code_err = 1'b0;
    for (int i = 0; i < P; i++) begin
      logic ok;
      tcs_code_t c;
      c.first  = first_q[3*i +: 3];
      c.second = bus_word[3*i +: 3];
      data[4*i +: 4] = tcs_decode(c, ok);
      if (decode_q && !ok) code_err = 1'b1;
    end
  end

  assign valid   = decode_q;
  assign discard = !decode_q && (bus_word == '0);

endmodule

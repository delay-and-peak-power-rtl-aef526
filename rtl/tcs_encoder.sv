// tcs_encoder: TCS encoder of an N-bit word.
//
// The word is cut into P = N/4 blocks of 4 bits; block i (data[4i+3:4i]) is
// looked up in the TCS code table and its two 3-bit codes go to wires
// [3i+2:3i] of the encoded bus, MSB of the code on the higher wire. first_w is
// the bus word of the first transmission, second_w that of the second one.
// Each N-bit word thus needs two bus cycles on 3N/4 wires.
//
// Purely combinational (the design feeds the sender latch output to the
// encoder and to the crosstalk analyzer at the same time; the bus register
// sits in civ_driver). The code table and the block-to-wire mapping of each
// block are those of the design; the order of blocks on the wires (block 0 on
// the lowest wires) is this implementation's choice.
module tcs_encoder #(
  parameter int unsigned N = 32  // data width, a multiple of 4
) (
  input  logic [N-1:0]       data,
  output logic [N/4*3-1:0]   first_w,
  output logic [N/4*3-1:0]   second_w
);
  import tcs_pkg::*;

  localparam int unsigned P = N / 4;

  initial assert (N % 4 == 0 && N >= 8) else $error("N must be a multiple of 4, at least 8");

  for (genvar i = 0; i < P; i++) begin : g_blk
    tcs_code_t c;
    assign c = tcs_encode(data[4*i +: 4]);
    assign first_w[3*i +: 3]  = c.first;
    assign second_w[3*i +: 3] = c.second;
  end

endmodule

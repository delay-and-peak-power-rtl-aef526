// boundary_bit_xt_unit: boundary-bit crosstalk unit of the Crosstalk Class
// Analyzer.
//
// Each 4-bit block of the new word is put in one of three classes, given by
// the MSB/LSB pair of its first 3-bit code: 01 for blocks 0..6, 10 for 7..11
// and 11 for 12..15. The unit takes the MSB/LSB pair of every 3-bit group now
// on the bus and, for every pair of neighbouring groups, checks the two wires
// that meet at their border (LSB wire of group i, MSB wire of group i-1): if
// the new first codes would make these two wires switch in opposite
// directions, bnd_xt[i-1] and xt are set.
//
// Purely combinational. The classes and the use of the bus's MSB/LSB pairs
// are those of the design; the exact test (opposite switching of the two
// border wires) is this implementation's reading of "forms a Class 5 or
// Class 6 crosstalk".
module boundary_bit_xt_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]       new_data,
  input  logic [N/4*3-1:0]   bus_word,
  output logic               xt,
  output logic [N/4-2:0]     bnd_xt
);
  import tcs_pkg::*;

  localparam int unsigned P = N / 4;

  bclass_t cls [P];

  // Class of each block of the new word, by value range.
  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (new_data[4*i +: 4] <= 4'd6)       cls[i] = 2'b01;
      else if (new_data[4*i +: 4] <= 4'd11) cls[i] = 2'b10;
      else                                  cls[i] = 2'b11;
    end
  end

  // Border between group i-1 (its MSB wire 3i-1) and group i (its LSB wire 3i).
  always_comb begin
    for (int i = 1; i < P; i++)
      bnd_xt[i-1] = opposite(bus_word[3*(i-1)+2], cls[i-1][1],
                             bus_word[3*i],       cls[i][0]);
  end

  assign xt = |bnd_xt;

endmodule

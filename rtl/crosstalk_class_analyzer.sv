// crosstalk_class_analyzer: decides whether a CIV must be sent before the
// next word.
//
// The new data word is fed to this analyzer at the same time as to the
// encoder. Two units work side by side: the middle-bit unit (table lookup
// against the stored previous word) and the boundary-bit unit (block classes
// against the MSB/LSB pairs on the bus). If either finds that the next first
// transmission would make adjacent wires switch in opposite directions
// against the word now on the bus, xt is raised; the sender then puts the
// all-zero CIV on the bus for one cycle before the word.
//
// Interface and timing: xt, mid_xt and bnd_xt are combinational. load and
// clear are passed to the middle-bit unit (see there). The outputs mid_xt and
// bnd_xt tell which unit fired, for observation only.
module crosstalk_class_analyzer #(
  parameter int unsigned N = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0]       new_data,
  input  logic [N/4*3-1:0]   bus_word,
  input  logic               load,
  input  logic               clear,
  output logic               xt,
  output logic               mid_xt,
  output logic               bnd_xt
);
  logic [N/4-1:0] mid_grp;
  logic [N/4-2:0] bnd_grp;

  middle_bit_xt_unit #(.N(N)) u_mid (
    .clk, .rst_n, .new_data, .load, .clear,
    .xt(mid_xt), .grp_xt(mid_grp)
  );

  boundary_bit_xt_unit #(.N(N)) u_bnd (
    .new_data, .bus_word,
    .xt(bnd_xt), .bnd_xt(bnd_grp)
  );

  assign xt = mid_xt | bnd_xt;

endmodule

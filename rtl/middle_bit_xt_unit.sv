// middle_bit_xt_unit: middle-bit crosstalk unit of the Crosstalk Class
// Analyzer.
//
// It keeps the previous N-bit data word (the original, unencoded word whose
// second transmission is on the bus) and, for a new word, looks up a 16x16
// table per 4-bit block, indexed by the new block (row) and the previous block
// (column). A table entry is 1 when putting the new block's first code on the
// three wires that carry the previous block's second code would make the
// middle wire switch against one of its neighbours. xt is the OR over all
// blocks; grp_xt gives the per-block result.
//
// The table is computed at elaboration from the TCS code table
// (tcs_pkg::mid_xt_table), so it follows from the code and is not typed in.
//
// Interface and timing: xt is combinational from new_data and the stored
// word. load (one cycle, at the clock edge that puts the new word's first code
// on the bus) stores new_data as the previous word. clear (at the edge that
// puts the all-zero vector on the bus) marks the stored word as no longer on
// the bus; while it is marked so, xt is 0, since every transition out of the
// all-zero word only rises. The valid flag and clear input are this design's
// addition; the table and the stored word are as described for the unit.
module middle_bit_xt_unit #(
  parameter int unsigned N = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     new_data,
  input  logic             load,
  input  logic             clear,
  output logic             xt,
  output logic [N/4-1:0]   grp_xt
);
  import tcs_pkg::*;

  localparam int unsigned P = N / 4;
  localparam logic [255:0] TABLE = mid_xt_table();

  logic [N-1:0] prev_q;
  logic         prev_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q       <= '0;
      prev_valid_q <= 1'b0;
    end else if (load) begin
      prev_q       <= new_data;
      prev_valid_q <= 1'b1;
    end else if (clear) begin
      prev_valid_q <= 1'b0;
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++)
      grp_xt[i] = prev_valid_q && TABLE[{new_data[4*i +: 4], prev_q[4*i +: 4]}];
  end

  assign xt = |grp_xt;

endmodule

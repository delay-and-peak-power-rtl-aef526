// tcs_pkg: shared types, constants and code tables of the Temporal Crosstalk
// Shielding (TCS) bus code.
//
// The TCS code is an (n,3,4) code: every 4-bit block of the n-bit data word is
// sent as two 3-bit codes on three wires, in two consecutive bus cycles (the
// "first" and the "second" transmission). The code table below is the one of
// the design (16 entries, 4 bits to 6 bits). It has three properties the rest
// of the design builds on:
//   * first code -> second code of the same block never makes two adjacent
//     wires switch in opposite directions, and the LSB wire does not change,
//     so the transitions inside one data word are free of the worst crosstalk
//     classes (5 and 6) on every wire of the bus;
//   * no first code is 000, so an all-zero bus word (the Crosstalk
//     Identification Vector, CIV) can never be taken for a first transmission;
//   * the MSB/LSB pair of the first code falls in one of three classes
//     {01, 10, 11}, which the boundary check uses.
// The functions here are pure and synthesizable; modules use them for their
// lookups. The "opposite transition" test is this design's criterion for a
// possible Class 5/6 event: a wire can only see Class 5 or 6 delay when at
// least one neighbour switches the other way, so forbidding opposite
// transitions on adjacent wires is sufficient (it is conservative: a few
// Class 4 patterns are also flagged).
package tcs_pkg;

  localparam int unsigned K = 4;  // data bits per block
  localparam int unsigned M = 3;  // wires per block

  typedef logic [K-1:0] nibble_t;
  typedef logic [M-1:0] code3_t;

  // One encoded block: first and second 3-bit transmission.
  typedef struct packed {
    code3_t first;
    code3_t second;
  } tcs_code_t;

  // Boundary class of a block: {MSB, LSB} of its first code.
  typedef logic [1:0] bclass_t;

  // Table of the TCS code: 4-bit block -> (first, second).
  function automatic tcs_code_t tcs_encode(nibble_t d);
    tcs_code_t c;
    unique case (d)
      4'h0: c = '{first: 3'b001, second: 3'b001};
      4'h1: c = '{first: 3'b001, second: 3'b011};
      4'h2: c = '{first: 3'b001, second: 3'b101};
      4'h3: c = '{first: 3'b001, second: 3'b111};
      4'h4: c = '{first: 3'b011, second: 3'b001};
      4'h5: c = '{first: 3'b011, second: 3'b011};
      4'h6: c = '{first: 3'b011, second: 3'b111};
      4'h7: c = '{first: 3'b100, second: 3'b000};
      4'h8: c = '{first: 3'b100, second: 3'b100};
      4'h9: c = '{first: 3'b100, second: 3'b110};
      4'hA: c = '{first: 3'b110, second: 3'b000};
      4'hB: c = '{first: 3'b110, second: 3'b110};
      4'hC: c = '{first: 3'b111, second: 3'b001};
      4'hD: c = '{first: 3'b111, second: 3'b011};
      4'hE: c = '{first: 3'b111, second: 3'b101};
      default: c = '{first: 3'b111, second: 3'b111};
    endcase
    return c;
  endfunction

  // Inverse of tcs_encode. A 6-bit pattern that is not a code word decodes
  // to 0 with ok = 0.
  function automatic nibble_t tcs_decode(tcs_code_t c, output logic ok);
    nibble_t d;
    ok = 1'b1;
    unique case ({c.first, c.second})
      6'b001_001: d = 4'h0;
      6'b001_011: d = 4'h1;
      6'b001_101: d = 4'h2;
      6'b001_111: d = 4'h3;
      6'b011_001: d = 4'h4;
      6'b011_011: d = 4'h5;
      6'b011_111: d = 4'h6;
      6'b100_000: d = 4'h7;
      6'b100_100: d = 4'h8;
      6'b100_110: d = 4'h9;
      6'b110_000: d = 4'hA;
      6'b110_110: d = 4'hB;
      6'b111_001: d = 4'hC;
      6'b111_011: d = 4'hD;
      6'b111_101: d = 4'hE;
      6'b111_111: d = 4'hF;
      default: begin d = 4'h0; ok = 1'b0; end
    endcase
    return d;
  endfunction

  // True when wire a (a0 -> a1) and its neighbour b (b0 -> b1) switch in
  // opposite directions.
  function automatic logic opposite(logic a0, logic a1, logic b0, logic b1);
    return (a0 != a1) && (b0 != b1) && (a1 != b1);
  endfunction

  // Middle-wire check of one group: the bus carries code x, the next word
  // puts code y on the same three wires. Set when the middle wire switches
  // against either of its two neighbours in the group.
  function automatic logic mid_opposite(code3_t x, code3_t y);
    return opposite(x[2], y[2], x[1], y[1]) || opposite(x[1], y[1], x[0], y[0]);
  endfunction

  // 16x16 middle-bit crosstalk table, flattened. Row = new block (its first
  // code goes on the bus next), column = previous block (its second code is
  // on the bus now). Entry row*16+col.
  function automatic logic [255:0] mid_xt_table();
    logic [255:0] t;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        t[r*16+c] = mid_opposite(tcs_encode(nibble_t'(c)).second,
                                 tcs_encode(nibble_t'(r)).first);
    return t;
  endfunction

endpackage

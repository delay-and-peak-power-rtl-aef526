// tcs_ref_pkg: reference model used by the testbenches.
//
// Holds an independent copy of the TCS code table as 6-bit strings (first
// code in bits 5:3, second in 2:0), word-level encode/decode helpers built on
// it, and wire-level crosstalk checks written straight from the delay model:
// for wire k with transition d_k in {-1,0,+1}, the delay is
//   (1 + 2*lambda) * d_k^2 - lambda * d_k * (d_{k-1} + d_{k+1})   (inner wire)
//   (1 + lambda)   * d_k^2 - lambda * d_k * d_{k+1 or k-1}         (edge wire)
// in units of C_L*R_T, and the crosstalk class follows from it (class 5 =
// 1+3*lambda, class 6 = 1+4*lambda). Vectors are handled up to MAXW wires.
package tcs_ref_pkg;

  localparam int MAXW = 128;

  localparam logic [5:0] CODE [16] = '{
    6'b001001, 6'b001011, 6'b001101, 6'b001111,
    6'b011001, 6'b011011, 6'b011111, 6'b100000,
    6'b100100, 6'b100110, 6'b110000, 6'b110110,
    6'b111001, 6'b111011, 6'b111101, 6'b111111
  };

  // First (sel=0) or second (sel=1) bus word of an n-bit data word.
  function automatic logic [MAXW-1:0] ref_word(logic [MAXW-1:0] data, int n, bit sel);
    logic [MAXW-1:0] w = '0;
    for (int i = 0; i < n / 4; i++) begin
      logic [5:0] c = CODE[data[4*i +: 4]];
      for (int b = 0; b < 3; b++)
        w[3*i + b] = sel ? c[b] : c[3 + b];
    end
    return w;
  endfunction

  // Inverse by search; returns -1 for a pattern that is no code word.
  function automatic int ref_decode6(logic [2:0] f, logic [2:0] s);
    for (int v = 0; v < 16; v++)
      if (CODE[v] == {f, s}) return v;
    return -1;
  endfunction

  // Any pair of adjacent wires switching in opposite directions.
  function automatic bit any_opposite(logic [MAXW-1:0] a, logic [MAXW-1:0] b, int w);
    for (int k = 0; k + 1 < w; k++)
      if (a[k] != b[k] && a[k+1] != b[k+1] && b[k] != b[k+1]) return 1;
    return 0;
  endfunction

  // Crosstalk class (1..6) of wire k for the transition a -> b, from the
  // sign pattern of the transitions (class 1: the wire does not switch).
  function automatic int xt_class(logic [MAXW-1:0] a, logic [MAXW-1:0] b, int w, int k);
    int d, l, r, s;
    d = int'(b[k]) - int'(a[k]);
    if (d == 0) return 1;
    l = (k > 0)     ? int'(b[k-1]) - int'(a[k-1]) : 0;
    r = (k < w - 1) ? int'(b[k+1]) - int'(a[k+1]) : 0;
    // edge wires: (1+lambda) - lambda*d*dn, i.e. classes 2..4 only
    if (k == 0 || k == w - 1) begin
      s = d * (k == 0 ? r : l);
      return (s > 0) ? 2 : (s == 0) ? 3 : 4;
    end
    s = d * (l + r);           // +2 .. -2
    return 4 - s;              // +2 -> 2, +1 -> 3, 0 -> 4, -1 -> 5, -2 -> 6
  endfunction

  // Highest class over all wires.
  function automatic int worst_class(logic [MAXW-1:0] a, logic [MAXW-1:0] b, int w);
    int m = 1;
    for (int k = 0; k < w; k++) begin
      int c = xt_class(a, b, w, k);
      if (c > m) m = c;
    end
    return m;
  endfunction

endpackage

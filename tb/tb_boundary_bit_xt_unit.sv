// tb_boundary_bit_xt_unit: self-checking test of boundary_bit_xt_unit at
// N = 32. The bus word is the second transmission of a reference word (or
// zero), the new word is random or built from chosen blocks; every border
// flag is compared with the switching of the two wires that meet at the
// border, taken from the reference first code of the new word.
module tb_boundary_bit_xt_unit;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int P = N / 4;
  localparam int W = P * 3;

  logic [N-1:0] new_data;
  logic [W-1:0] bus_word;
  logic xt;
  logic [P-2:0] bnd_xt;
  int checks = 0, failures = 0, hits = 0;

  boundary_bit_xt_unit dut (.new_data, .bus_word, .xt, .bnd_xt);

  task automatic apply(logic [W-1:0] bw, logic [N-1:0] nw);
    logic [W-1:0] f;
    logic [P-2:0] e;
    bus_word = bw; new_data = nw;
    #1;
    f = W'(ref_word(MAXW'(nw), N, 0));
    for (int i = 1; i < P; i++) begin
      logic [1:0] a, b;
      a = {bw[3*i], bw[3*i-1]};
      b = {f[3*i], f[3*i-1]};
      e[i-1] = any_opposite(MAXW'(a), MAXW'(b), 2);
    end
    checks++;
    if (bnd_xt !== e || xt !== |e) begin
      failures++;
      $display("FAIL bus=%h new=%h got=%b exp=%b", bw, nw, bnd_xt, e);
    end
    if (|e) hits++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++)
          apply(W'(ref_word(MAXW'({P/2{4'(a), 4'(b)}}), N, 1)), {P/2{4'(c), 4'(15 - c)}});
    for (int t = 0; t < 3000; t++)
      apply(W'(ref_word(MAXW'($urandom()), N, 1)), $urandom());
    for (int t = 0; t < 200; t++)
      apply('0, $urandom());
    checks++; if (hits == 0) begin failures++; $display("FAIL never flagged"); end
    $display("flagged: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

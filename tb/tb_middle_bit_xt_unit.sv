// tb_middle_bit_xt_unit: self-checking test of middle_bit_xt_unit at N = 32.
// Pairs of words (previous, new) are applied: the previous one is loaded,
// then the per-group flags for the new one are compared with a wire-level
// check (middle wire against either neighbour) on the reference codes. All
// 256 block pairs are covered in every group, followed by random words. The
// clear input is checked to mask the output until the next load.
module tb_middle_bit_xt_unit;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int P = N / 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] new_data;
  logic load = 0, clear = 0;
  logic xt;
  logic [P-1:0] grp_xt;
  int checks = 0, failures = 0, hits = 0;

  middle_bit_xt_unit dut (.clk, .rst_n, .new_data, .load, .clear, .xt, .grp_xt);

  always #5 clk = ~clk;

  function automatic logic [P-1:0] expect_grp(logic [N-1:0] prev, logic [N-1:0] nw);
    logic [P-1:0] e;
    for (int i = 0; i < P; i++) begin
      logic [5:0] cp = CODE[prev[4*i +: 4]];
      logic [5:0] cn = CODE[nw[4*i +: 4]];
      // second code of prev (bits 2:0) -> first code of new (bits 5:3)
      e[i] = any_opposite(MAXW'(cp[2:0]), MAXW'(cn[5:3]), 3);
    end
    return e;
  endfunction

  task automatic pair(logic [N-1:0] prev, logic [N-1:0] nw);
    logic [P-1:0] e;
    @(negedge clk); new_data = prev; load = 1;
    @(negedge clk); load = 0; new_data = nw;
    #1;
    e = expect_grp(prev, nw);
    checks++;
    if (grp_xt !== e || xt !== |e) begin
      failures++;
      $display("FAIL prev=%h new=%h grp=%b exp=%b", prev, nw, grp_xt, e);
    end
    if (|e) hits++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset nothing is on the bus: no flag whatever the word
    @(negedge clk); new_data = 32'h7A7A7A7A; #1;
    checks++; if (xt !== 1'b0) begin failures++; $display("FAIL flag after reset"); end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        pair({P{4'(a)}}, {P{4'(b)}});
    for (int t = 0; t < 2000; t++)
      pair($urandom(), $urandom());
    // clear masks the result, load enables it again
    pair({P{4'h0}}, {P{4'hA}});   // 001 -> 110: flagged
    checks++; if (xt !== 1'b1) begin failures++; $display("FAIL expected flag"); end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; #1;
    checks++; if (xt !== 1'b0) begin failures++; $display("FAIL clear did not mask"); end
    checks++; if (hits == 0) begin failures++; $display("FAIL never flagged"); end
    $display("flagged pairs: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

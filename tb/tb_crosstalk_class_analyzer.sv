// tb_crosstalk_class_analyzer: self-checking test of crosstalk_class_analyzer
// at N = 32. A previous word is loaded and its second transmission put on the
// bus; for a new word the analyzer's flag must equal a check over all
// adjacent wire pairs of the whole bus (bus word -> reference first word of
// the new word). It also checks that the flag is off when the flag is clear,
// that no Class 5/6 transition remains when the flag is off, and that both
// units fire at least once on their own.
module tb_crosstalk_class_analyzer;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int W = N / 4 * 3;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] new_data;
  logic [W-1:0] bus_word;
  logic load = 0, clear = 0;
  logic xt, mid_xt, bnd_xt;
  int checks = 0, failures = 0, n_mid_only = 0, n_bnd_only = 0, n_both = 0;

  crosstalk_class_analyzer dut (
    .clk, .rst_n, .new_data, .bus_word, .load, .clear, .xt, .mid_xt, .bnd_xt);

  always #5 clk = ~clk;

  task automatic pair(logic [N-1:0] prev, logic [N-1:0] nw);
    logic [W-1:0] f;
    bit e;
    @(negedge clk); new_data = prev; load = 1;
    @(negedge clk); load = 0; new_data = nw;
    bus_word = W'(ref_word(MAXW'(prev), N, 1));
    #1;
    f = W'(ref_word(MAXW'(nw), N, 0));
    e = any_opposite(MAXW'(bus_word), MAXW'(f), W);
    checks++;
    if (xt !== e) begin
      failures++;
      $display("FAIL prev=%h new=%h xt=%b exp=%b", prev, nw, xt, e);
    end
    checks++;
    if (!xt && worst_class(MAXW'(bus_word), MAXW'(f), W) >= 5) begin
      failures++;
      $display("FAIL class 5/6 left unflagged prev=%h new=%h", prev, nw);
    end
    if (mid_xt && !bnd_xt) n_mid_only++;
    if (bnd_xt && !mid_xt) n_bnd_only++;
    if (bnd_xt && mid_xt) n_both++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_data = '0; bus_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++)
      pair($urandom(), $urandom());
    // bus at zero after a CIV: never a flag
    @(negedge clk); clear = 1; bus_word = '0;
    @(negedge clk); clear = 0;
    for (int t = 0; t < 50; t++) begin
      new_data = $urandom(); #1;
      checks++; if (xt !== 1'b0) begin failures++; $display("FAIL flag on zero bus"); end
    end
    checks++;
    if (n_mid_only == 0 || n_bnd_only == 0 || n_both == 0) begin
      failures++; $display("FAIL a unit never fired alone");
    end
    $display("middle only %0d, boundary only %0d, both %0d", n_mid_only, n_bnd_only, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

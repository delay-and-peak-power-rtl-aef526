// tb_tcs_decoder: self-checking test of tcs_decoder (N = 32). A bus sequence
// is built from reference code words: random runs of zero vectors, then the
// first and second word of a random data word. The decoder must discard
// every zero vector seen between words, decode each word in the cycle of its
// second transmission, and flag a pattern that is no code word.
module tb_tcs_decoder;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int W = N / 4 * 3;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] bus_word = '0;
  logic valid, code_err, discard;
  logic [N-1:0] data;
  int checks = 0, failures = 0, n_words = 0, n_disc = 0;

  tcs_decoder dut (.clk, .rst_n, .bus_word, .valid, .data, .code_err, .discard);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle_expect(logic [W-1:0] w, bit ev, logic [N-1:0] ed, bit edisc);
    @(negedge clk); bus_word = w; #1;
    checks++;
    if (valid !== ev || discard !== edisc || (ev && data !== ed) || (ev && code_err)) begin
      failures++;
      $display("FAIL bus=%h valid=%b/%b data=%h/%h discard=%b/%b err=%b",
               w, valid, ev, data, ed, discard, edisc, code_err);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] d;
      int z;
      d = $urandom();
      z = $urandom_range(0, 2);
      for (int k = 0; k < z; k++) begin cycle_expect('0, 0, '0, 1); n_disc++; end
      cycle_expect(W'(ref_word(MAXW'(d), N, 0)), 0, '0, 0);
      cycle_expect(W'(ref_word(MAXW'(d), N, 1)), 1, d, 0);
      n_words++;
    end
    // an all-zero second word (blocks 7 and 10 only) is data, not a CIV
    cycle_expect(W'(ref_word(MAXW'(32'h7A7A7A7A), N, 0)), 0, '0, 0);
    cycle_expect('0, 1, 32'h7A7A7A7A, 0);
    // corrupted pattern: first 010 is no code word
    @(negedge clk); bus_word = W'(3'b010); #1;
    @(negedge clk); bus_word = W'(3'b001); #1;
    checks++;
    if (!(valid && code_err)) begin failures++; $display("FAIL code_err not raised"); end
    $display("words %0d, zero vectors discarded %0d", n_words, n_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

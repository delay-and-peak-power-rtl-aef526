// tb_tcs_ctv: exhaustive test of the code on one six-wire window.
//
// With N = 8 the encoder and the crosstalk class analyzer cover exactly two
// neighbouring blocks, i.e. six adjacent wires. All 16^4 combinations of two
// consecutive words (d1 = {b, a}, d2 = {d, c}) are run through them, with the
// four transmissions d1 first, d1 second, d2 first, d2 second:
//   * transitions 1->2 and 3->4 (inside a word) must never switch adjacent
//     wires in opposite directions;
//   * for 2->3 (between words) the analyzer flag must equal the reference
//     check, and no unflagged transition may reach class 5 or 6.
// It prints the fraction of combinations that need a CIV (the crosstalk
// value of the code) under the flag rule and under strict class 5/6.
module tb_tcs_ctv;
  import tcs_ref_pkg::*;
  localparam int N = 8;
  localparam int W = 6;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] enc_in, new_data;
  logic [W-1:0] first_w, second_w, bus_word;
  logic load = 0, clear = 0, xt, mid_xt, bnd_xt;
  int checks = 0, failures = 0, n_flag = 0, n_56 = 0;

  tcs_encoder #(.N(N)) u_enc (.data(enc_in), .first_w, .second_w);
  crosstalk_class_analyzer #(.N(N)) u_cca (
    .clk, .rst_n, .new_data, .bus_word, .load, .clear, .xt, .mid_xt, .bnd_xt);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [N-1:0] d1, d2;
    logic [W-1:0] t1, t2, t3, t4;
    new_data = '0; bus_word = '0; enc_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < 65536; x++) begin
      d1 = x[7:0];
      d2 = x[15:8];
      enc_in = d1; #1; t1 = first_w; t2 = second_w;
      enc_in = d2; #1; t3 = first_w; t4 = second_w;
      checks++;
      if (any_opposite(MAXW'(t1), MAXW'(t2), W) || any_opposite(MAXW'(t3), MAXW'(t4), W)) begin
        failures++; $display("FAIL opposite switching inside a word d1=%h d2=%h", d1, d2);
      end
      // analyzer: d1 stored, its second transmission on the bus, d2 next
      @(negedge clk); new_data = d1; load = 1;
      @(negedge clk); load = 0; new_data = d2; bus_word = t2; #1;
      checks++;
      if (xt !== any_opposite(MAXW'(t2), MAXW'(t3), W)) begin
        failures++; $display("FAIL flag d1=%h d2=%h xt=%b", d1, d2, xt);
      end
      if (worst_class(MAXW'(t2), MAXW'(t3), W) >= 5) begin
        n_56++;
        checks++;
        if (!xt) begin failures++; $display("FAIL class 5/6 unflagged d1=%h d2=%h", d1, d2); end
      end
      if (xt) n_flag++;
    end
    $display("combinations needing a CIV: %0d of 65536 (%0.4f); strictly class 5/6: %0d (%0.4f)",
             n_flag, real'(n_flag) / 65536.0, n_56, real'(n_56) / 65536.0);
    checks++;
    if (n_flag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

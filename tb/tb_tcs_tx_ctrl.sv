// tb_tcs_tx_ctrl: self-checking test of tcs_tx_ctrl. Random word_valid and
// xt inputs are applied. A model of the bus contents (zero, first, second)
// gives the expected outputs each cycle. The test also measures the
// distance between consecutive takes under a steady supply of words: 2
// cycles without crosstalk, 3 when a CIV is inserted.
module tb_tcs_tx_ctrl;
  logic clk = 0, rst_n = 0;
  logic word_valid = 0, xt = 0;
  logic take, send_second, civ, idle, clear;
  int checks = 0, failures = 0;
  int st;  // 0 zero, 1 first, 2 second
  int last_take, n_gap2 = 0, n_gap3 = 0, cyc = 0;
  bit last_civ;

  tcs_tx_ctrl dut (.clk, .rst_n, .word_valid, .xt, .take, .send_second, .civ, .idle, .clear);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit steady);
    bit et, es, ec, ei;
    @(negedge clk);
    word_valid = steady ? 1'b1 : ($urandom_range(0, 2) != 0);
    xt = ($urandom_range(0, 2) == 0);
    #1;
    et = 0; es = 0; ec = 0; ei = 0;
    case (st)
      1: es = 1;
      2: if (word_valid && !xt) et = 1; else if (word_valid) ec = 1; else ei = 1;
      default: if (word_valid) et = 1; else ei = 1;
    endcase
    checks++;
    if ({take, send_second, civ, idle, clear} !== {et, es, ec, ei, ec | ei}) begin
      failures++;
      $display("FAIL st=%0d v=%b xt=%b got=%b%b%b%b%b", st, word_valid, xt,
               take, send_second, civ, idle, clear);
    end
    if (steady && take) begin
      if (cyc - last_take == 2) n_gap2++;
      else if (cyc - last_take == 3) n_gap3++;
      if (cyc - last_take != (last_civ ? 3 : 2) && last_take > 0) begin
        failures++; $display("FAIL word distance %0d", cyc - last_take);
      end
      checks++;
      last_take = cyc; last_civ = 0;
    end
    if (civ) last_civ = 1;
    st = et ? 1 : es ? 2 : 0;
    cyc++;
  endtask

  initial begin
    st = 0; last_take = 0; last_civ = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) step(0);
    last_take = 0;
    for (int t = 0; t < 3000; t++) step(1);
    checks++;
    if (n_gap2 == 0 || n_gap3 == 0) begin failures++; $display("FAIL gaps not seen"); end
    $display("2-cycle words %0d, 3-cycle words %0d", n_gap2, n_gap3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

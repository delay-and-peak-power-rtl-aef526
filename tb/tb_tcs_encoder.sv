// tb_tcs_encoder: self-checking test of tcs_encoder at N = 32.
// Every 4-bit value is placed in every block position, then random words are
// applied. Both bus words are compared with the reference code table; each
// first word is also checked to hold no all-zero group, and the first ->
// second transition to have no opposite switching on adjacent wires.
module tb_tcs_encoder;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int W = N / 4 * 3;

  logic [N-1:0] data;
  logic [W-1:0] first_w, second_w;
  int checks = 0, failures = 0;

  tcs_encoder dut (.data, .first_w, .second_w);

  task automatic check_word(logic [N-1:0] d);
    logic [W-1:0] ef, es;
    data = d;
    #1;
    ef = W'(ref_word(MAXW'(d), N, 0));
    es = W'(ref_word(MAXW'(d), N, 1));
    checks++;
    if (first_w !== ef || second_w !== es) begin
      failures++;
      $display("FAIL data=%h first=%h/%h second=%h/%h", d, first_w, ef, second_w, es);
    end
    checks++;
    for (int i = 0; i < N / 4; i++)
      if (first_w[3*i +: 3] == 3'b000) begin failures++; $display("FAIL zero first code"); end
    checks++;
    if (any_opposite(MAXW'(first_w), MAXW'(second_w), W)) begin
      failures++; $display("FAIL opposite switching inside word %h", d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N / 4; p++)
      for (int v = 0; v < 16; v++)
        check_word(N'(v) << (4 * p));
    for (int t = 0; t < 2000; t++)
      check_word($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sender_latch: self-checking test of sender_latch (N = 32). A random
// producer and a random consumer exchange numbered words; every word must
// come out once and in order, in_ready must follow the one-entry rule, and a
// word taken in the cycle after it was latched must have spent exactly one
// cycle in the latch (two when the consumer waits one cycle).
module tb_sender_latch;
  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, take = 0;
  logic [N-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, age = 0, n_one = 0, n_two = 0;

  sender_latch dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .take);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = N'(32'hC0DE0000 + sent);
      take     = out_valid && ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (in_ready !== (!out_valid || take)) begin failures++; $display("FAIL ready"); end
      if (take) begin
        checks++;
        if (out_data !== N'(32'hC0DE0000 + got)) begin
          failures++; $display("FAIL order got=%h exp=%0d", out_data, got);
        end
        if (age == 1) n_one++;
        if (age == 2) n_two++;
        got++;
      end
      @(posedge clk);
      if (in_valid && in_ready) begin sent++; age = 1; end
      else if (out_valid) age++;
    end
    checks++;
    if (got < 1000 || n_one == 0 || n_two == 0) begin
      failures++; $display("FAIL too few words %0d or holding times not seen", got);
    end
    $display("words %0d, held one cycle %0d, two cycles %0d", got, n_one, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

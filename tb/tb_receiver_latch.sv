// tb_receiver_latch: self-checking test of receiver_latch (N = 32). Random
// valid words are applied; one edge later out_valid must repeat in_valid and
// out_data must hold the last valid word.
module tb_receiver_latch;
  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [N-1:0] in_data = '0, out_data, last;
  int checks = 0, failures = 0;

  receiver_latch dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit v;
      @(negedge clk);
      v = $urandom_range(0, 1);
      in_valid = v; in_data = $urandom();
      if (v) last = in_data;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v || out_data !== last) begin
        failures++; $display("FAIL valid=%b/%b data=%h/%h", out_valid, v, out_data, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_civ_driver: self-checking test of civ_driver (W = 24). Random requests
// (first / second / none) are applied; after every edge the bus must hold
// the requested first word, the second word held from the last first-word
// request, or the all-zero vector.
module tb_civ_driver;
  localparam int W = 24;

  logic clk = 0, rst_n = 0;
  logic load_first = 0, send_second = 0;
  logic [W-1:0] first_w = '0, second_w = '0, bus;
  logic [W-1:0] exp_bus, exp_hold;
  int checks = 0, failures = 0, n_zero = 0, n_first = 0, n_second = 0;

  civ_driver dut (.clk, .rst_n, .load_first, .send_second, .first_w, .second_w, .bus);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_bus = '0; exp_hold = '0;
    repeat (2) @(negedge clk);
    checks++; if (bus !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 2);
      load_first  = (r == 1);
      send_second = (r == 2);
      first_w  = W'($urandom()) | W'(1);
      second_w = W'($urandom());
      if (r == 1) begin exp_bus = first_w; exp_hold = second_w; n_first++; end
      else if (r == 2) begin exp_bus = exp_hold; n_second++; end
      else begin exp_bus = '0; n_zero++; end
      @(posedge clk); #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++; $display("FAIL r=%0d bus=%h exp=%h", r, bus, exp_bus);
      end
    end
    checks++; if (n_zero == 0 || n_first == 0 || n_second == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tcs_timing_harness: one TCS link driven over a delay model of the wires.
//
// Used by tb_tcs_bus_timing. A tcs_bus_top sends a steady stream of words
// over bus_wire_model (coded bus, 24 wires), clocked at the class-4 wire delay
// of the coded bus plus MARGIN_PS, and the receiver output is compared with
// the words sent. The same words, as an uncoded 32-wire bus would carry them,
// drive a second wire model with the uncoded bus's capacitances.
// STREAM selects the word stream: 0 address-like (sequential +4, with a jump
// to a random address one time in eight), 1 data-like (a mix of small
// integers, small negative numbers, pointers into two regions and random
// words).
// Results: check/failure counts, cycle and CIV counts, and the time per word
// of the coded link, (bus cycles per word) * class-4 delay + codec delay,
// against the class-6 delay the uncoded bus needs as its cycle.
module tcs_timing_harness #(
  parameter string       NAME     = "90nm",
  parameter int unsigned STREAM   = 0,
  parameter int unsigned N_WORDS  = 3000,
  parameter int unsigned TAU_C    = 679,   // coded bus: R_T * C'_L in ps
  parameter int unsigned LAM_C    = 1541,  // coded bus: 1000 * C'_I / C'_L
  parameter int unsigned TAU_U    = 510,   // uncoded bus: R_T * C_L in ps
  parameter int unsigned LAM_U    = 3373,  // uncoded bus: 1000 * C_I / C_L
  parameter int unsigned CODEC_PS = 400,
  parameter int unsigned MARGIN_PS = 20
) (
  output bit done,
  output int checks,
  output int failures
);
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int W = 24;
  localparam int unsigned T4_PS = TAU_C * (1000 + 2 * LAM_C) / 1000;  // coded cycle
  localparam int unsigned T6_PS = TAU_U * (1000 + 4 * LAM_U) / 1000;  // uncoded cycle
  localparam int unsigned HALF_PS = (T4_PS + MARGIN_PS + 1) / 2;

  logic clk = 0, rst_n = 0;
  logic snd_valid = 0, snd_ready, rcv_valid;
  logic [N-1:0] snd_data = '0, rcv_data;
  logic [W-1:0] bus_tx, bus_rx;
  logic civ_sent, xt_mid, xt_bnd, dec_err;
  logic [N-1:0] unc_bus = '0, unc_out;
  int unsigned c_last, c_max, c_56, u_last, u_max, u_56;

  tcs_bus_top dut (
    .clk, .rst_n, .snd_valid, .snd_data, .snd_ready,
    .bus_tx, .bus_rx, .rcv_valid, .rcv_data,
    .civ_sent, .xt_mid, .xt_bnd, .dec_err
  );

  bus_wire_model #(.W(W), .TAU_PS(TAU_C), .LAMBDA_MILLI(LAM_C)) u_coded (
    .bus_in(bus_tx), .bus_out(bus_rx),
    .last_delay_ps(c_last), .max_delay_ps(c_max), .n_class56(c_56));

  bus_wire_model #(.W(N), .TAU_PS(TAU_U), .LAMBDA_MILLI(LAM_U)) u_uncoded (
    .bus_in(unc_bus), .bus_out(unc_out),
    .last_delay_ps(u_last), .max_delay_ps(u_max), .n_class56(u_56));

  always #(HALF_PS * 1ps) clk = ~clk;

  logic [N-1:0] exp_q [$];
  int n_rx = 0, n_civ = 0, n_take = 0, cyc = 0, first_take = -1, last_take = -1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (civ_sent) n_civ++;
    if (dut.take) begin
      unc_bus <= dut.lat_data;
      n_take++;
      if (first_take < 0) first_take = cyc;
      last_take = cyc;
    end
    if (rcv_valid) begin
      logic [N-1:0] e;
      checks++;
      e = exp_q.pop_front();
      if (rcv_data !== e) begin
        failures++;
        $display("[%s] FAIL received %h expected %h", NAME, rcv_data, e);
      end
      n_rx++;
    end
    if (dec_err) begin failures++; $display("[%s] FAIL code error", NAME); end
  end

  function automatic logic [N-1:0] next_data();
    unique case ($urandom_range(0, 7))
      0, 1, 2: return N'($urandom_range(0, 255));
      3:       return -N'($urandom_range(1, 16));
      4:       return 32'h1000_0000 | (N'($urandom()) & 32'h0000_FFFC);
      5:       return 32'h7FFF_0000 | (N'($urandom()) & 32'h0000_FFFC);
      default: return N'($urandom());
    endcase
  endfunction

  initial begin
    logic [N-1:0] addr, d;
    real per_word, t_coded, red;
    checks = 0; failures = 0; done = 0;
    addr = 32'h0040_0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N_WORDS; t++) begin
      if (STREAM == 0) begin
        d = addr;
        if ($urandom_range(0, 7) == 0) addr = N'($urandom()) & 32'h00FF_FFFC;
        else addr = addr + 4;
      end else begin
        d = next_data();
      end
      @(negedge clk);
      snd_valid = 1'b1;
      snd_data  = d;
      while (!snd_ready) @(negedge clk);
      @(posedge clk);
      exp_q.push_back(d);
    end
    @(negedge clk);
    snd_valid = 1'b0;
    repeat (8) @(negedge clk);

    checks++;
    if (n_rx != N_WORDS) begin failures++; $display("[%s] FAIL %0d of %0d words received", NAME, n_rx, N_WORDS); end
    checks++;
    if (c_56 != 0 || c_max > T4_PS) begin
      failures++; $display("[%s] FAIL coded bus: %0d class 5/6 changes, max delay %0d ps", NAME, c_56, c_max);
    end
    checks++;
    if (u_56 == 0 || u_max != T6_PS) begin
      failures++; $display("[%s] FAIL uncoded bus never reached class 6 (max %0d ps)", NAME, u_max);
    end
    checks++;
    if (2 * T4_PS + CODEC_PS >= T6_PS) begin
      failures++; $display("[%s] FAIL 2 coded cycles + codec not shorter than one uncoded cycle", NAME);
    end
    per_word = real'(last_take - first_take) / real'(n_take - 1);
    t_coded  = per_word * real'(T4_PS) + real'(CODEC_PS);
    red      = 100.0 * (1.0 - t_coded / real'(T6_PS));
    $display("[%s %s] words %0d, CIV fraction %0.3f, bus cycles per word %0.3f",
             NAME, STREAM == 0 ? "address" : "data", n_take, real'(n_civ) / real'(n_take), per_word);
    $display("[%s %s] coded cycle %0d ps (max wire delay seen %0d ps), uncoded cycle %0d ps; time per word %0.0f ps vs %0d ps: %0.1f%% reduction",
             NAME, STREAM == 0 ? "address" : "data", T4_PS, c_max, T6_PS, t_coded, T6_PS, red);
    done = 1;
  end
endmodule

// tb_tcs_bus_top: end-to-end test of the TCS bus link at its default size
// (N = 32, 24 bus wires). The bus output is wired straight back to the bus
// input (an ideal interconnect). Three phases of traffic are sent:
//   1. back-to-back random words (data-bus-like),
//   2. sparse random words with idle gaps,
//   3. an address-like stream (sequential addresses with random jumps),
//   plus a few words whose second transmission is all-zero.
// Checks:
//   * every word is received once, in order, unchanged;
//   * a word reaches the receiver exactly 2 cycles after its first code word
//     is sent, and consecutive words under steady supply are 2 cycles apart,
//     3 when a CIV was sent between them;
//   * no bus transition ever reaches crosstalk class 5 or 6 (per-wire class
//     from the delay model), and no adjacent wires switch in opposite
//     directions;
//   * each mechanism occurs: CIV insertion, flag from the middle-bit unit
//     alone, from the boundary-bit unit alone, idle zero vector, zero vector
//     discarded by the decoder, sender stall (word held two cycles), an
//     all-zero second transmission decoded as data.
// It also reports the fraction of words that needed a CIV per phase, and how
// often the same words sent uncoded on 32 wires would have caused class 5/6.
module tb_tcs_bus_top;
  import tcs_ref_pkg::*;
  localparam int N = 32;
  localparam int W = N / 4 * 3;

  logic clk = 0, rst_n = 0;
  logic snd_valid = 0, snd_ready;
  logic [N-1:0] snd_data = '0;
  logic [W-1:0] bus_tx, bus_rx;
  logic rcv_valid;
  logic [N-1:0] rcv_data;
  logic civ_sent, xt_mid, xt_bnd, dec_err;

  tcs_bus_top dut (
    .clk, .rst_n, .snd_valid, .snd_data, .snd_ready,
    .bus_tx, .bus_rx, .rcv_valid, .rcv_data,
    .civ_sent, .xt_mid, .xt_bnd, .dec_err
  );

  assign bus_rx = bus_tx;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] exp_q [$];
  int take_cyc_q [$];
  int cyc = 0;
  int n_words = 0, n_civ = 0, n_mid_only = 0, n_bnd_only = 0, n_idle = 0;
  int n_discard = 0, n_hold2 = 0, n_stall = 0, n_zero_second = 0;
  int n_gap2 = 0, n_gap3 = 0, n_coded56 = 0, n_uncoded56 = 0;
  int last_take = -1;
  bit civ_since_take = 0, steady = 0;
  logic [W-1:0] bus_prev = '0;
  logic [N-1:0] unc_prev = '0;
  int phase_words [3], phase_civ [3], phase_unc56 [3];
  int phase = 0;

  // monitor: everything sampled just before the rising edge
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    // bus transition of this cycle (bus_prev -> bus_tx)
    checks++;
    if (worst_class(MAXW'(bus_prev), MAXW'(bus_tx), W) >= 5) begin
      n_coded56++; failures++;
      $display("FAIL class 5/6 on bus %h -> %h", bus_prev, bus_tx);
    end
    if (any_opposite(MAXW'(bus_prev), MAXW'(bus_tx), W)) begin
      failures++; $display("FAIL opposite switching %h -> %h", bus_prev, bus_tx);
    end
    bus_prev <= bus_tx;
    if (civ_sent) begin
      n_civ++; phase_civ[phase]++; civ_since_take = 1;
      if (xt_mid && !xt_bnd) n_mid_only++;
      if (xt_bnd && !xt_mid) n_bnd_only++;
      n_hold2++;   // the waiting word stays a second cycle in the latch
    end
    if (dut.idle) n_idle++;
    if (dut.u_dec.discard && dut.u_dec.decode_q == 1'b0) n_discard++;
    if (snd_valid && !snd_ready) n_stall++;
    if (dut.u_dec.valid && bus_rx == '0) n_zero_second++;
    if (dut.take) begin
      // the uncoded bus would carry this word right after the previous one
      if (worst_class(MAXW'(unc_prev), MAXW'(dut.lat_data), N) >= 5) begin
        n_uncoded56++; phase_unc56[phase]++;
      end
      unc_prev <= dut.lat_data;
      take_cyc_q.push_back(cyc);
      phase_words[phase]++;
      if (steady && last_take >= 0) begin
        checks++;
        if (cyc - last_take != (civ_since_take ? 3 : 2)) begin
          failures++; $display("FAIL word spacing %0d civ=%b", cyc - last_take, civ_since_take);
        end
        if (cyc - last_take == 2) n_gap2++;
        if (cyc - last_take == 3) n_gap3++;
      end
      last_take <= cyc;
      civ_since_take = 0;
    end
    if (rcv_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected word %h", rcv_data);
      end else begin
        logic [N-1:0] e;
        int tc;
        e  = exp_q.pop_front();
        tc = take_cyc_q.pop_front();
        if (rcv_data !== e) begin
          failures++; $display("FAIL data %h expected %h", rcv_data, e);
        end
        checks++;
        if (cyc - tc != 3) begin
          failures++; $display("FAIL latency %0d", cyc - tc);
        end
      end
      n_words++;
    end
    checks++;
    if (dec_err) begin failures++; $display("FAIL decoder code error"); end
  end

  // Offer a word from a falling edge on; it is taken at the first rising
  // edge with snd_ready high. snd_valid stays high until gap() or the next
  // send() changes it.
  task automatic send(logic [N-1:0] d);
    @(negedge clk);
    snd_valid = 1'b1;
    snd_data  = d;
    while (!snd_ready) @(negedge clk);
    @(posedge clk);
    exp_q.push_back(d);
  endtask

  task automatic gap(int k);
    if (k > 0) begin
      @(negedge clk);
      snd_valid = 1'b0;
      repeat (k - 1) @(negedge clk);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] addr;
    for (int p = 0; p < 3; p++) begin phase_words[p] = 0; phase_civ[p] = 0; phase_unc56[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. back-to-back random data
    phase = 0;
    send($urandom());
    gap(4);
    steady = 1;
    last_take = -1;
    for (int t = 0; t < 4000; t++) send($urandom());
    gap(6);
    steady = 0;
    // 2. sparse random data with gaps
    phase = 1;
    for (int t = 0; t < 1500; t++) begin
      send($urandom());
      gap($urandom_range(0, 4));
    end
    // all-zero second transmissions
    send(32'h7A7A7A7A); send(32'hA7A7A7A7); send(32'h77777777);
    gap(6);
    // 3. address-like: mostly +4, sometimes a jump
    phase = 2;
    addr = 32'h0040_0000;
    for (int t = 0; t < 4000; t++) begin
      send(addr);
      if ($urandom_range(0, 7) == 0) addr = {$urandom()} & 32'h00FF_FFFC;
      else addr = addr + 4;
    end
    gap(10);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words lost", exp_q.size()); end
    checks++; if (n_civ == 0)         begin failures++; $display("FAIL no CIV inserted"); end
    checks++; if (n_mid_only == 0)    begin failures++; $display("FAIL middle unit alone never fired"); end
    checks++; if (n_bnd_only == 0)    begin failures++; $display("FAIL boundary unit alone never fired"); end
    checks++; if (n_idle == 0)        begin failures++; $display("FAIL no idle zero vector"); end
    checks++; if (n_discard == 0)     begin failures++; $display("FAIL decoder never discarded a zero vector"); end
    checks++; if (n_hold2 == 0)       begin failures++; $display("FAIL no word held two cycles"); end
    checks++; if (n_stall == 0)       begin failures++; $display("FAIL sender never stalled"); end
    checks++; if (n_zero_second == 0) begin failures++; $display("FAIL no all-zero second word"); end
    checks++; if (n_gap2 == 0 || n_gap3 == 0) begin failures++; $display("FAIL spacing cases"); end
    checks++; if (n_uncoded56 == 0)   begin failures++; $display("FAIL uncoded reference never saw class 5/6"); end
    $display("words %0d: CIV %0d (middle only %0d, boundary only %0d), idle %0d, discards %0d, stalls %0d, zero second %0d",
             n_words, n_civ, n_mid_only, n_bnd_only, n_idle, n_discard, n_stall, n_zero_second);
    $display("steady spacing: 2 cycles %0d, 3 cycles %0d", n_gap2, n_gap3);
    for (int p = 0; p < 3; p++)
      $display("phase %0d: words %0d, CIV fraction %0.3f, uncoded class 5/6 fraction %0.3f", p,
               phase_words[p], real'(phase_civ[p]) / real'(phase_words[p]),
               real'(phase_unc56[p]) / real'(phase_words[p]));
    $display("coded class 5/6 transitions %0d, uncoded %0d", n_coded56, n_uncoded56);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

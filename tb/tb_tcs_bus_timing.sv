// tb_tcs_bus_timing: the TCS link over delay models of a 10 mm global bus,
// for the two technology nodes (90 nm, 65 nm) and two kinds of traffic
// (address-like, data-like). Each of the four runs clocks the link at the
// class-4 delay of the wider-spaced coded bus and checks that every word
// still arrives intact, that no coded transition reaches class 5 or 6, and
// that the uncoded bus, fed the same words, does reach class 6. It reports
// the time per word against the uncoded bus.
// Wire figures: R = 187 / 423 Ohm/mm; ground and coupling capacitance
// 27.260 / 91.943 fF/mm uncoded and 36.287 / 55.909 fF/mm coded at 90 nm,
// 22.127 / 70.159 and 29.330 / 42.711 fF/mm at 65 nm; codec delay 0.4 ns.
module tb_tcs_bus_timing;
  bit done [4];
  int c [4], f [4];
  int checks = 0, failures = 0;

  tcs_timing_harness #(.NAME("90nm"), .STREAM(0), .TAU_C(679),  .LAM_C(1541),
                       .TAU_U(510), .LAM_U(3373)) h0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  tcs_timing_harness #(.NAME("90nm"), .STREAM(1), .TAU_C(679),  .LAM_C(1541),
                       .TAU_U(510), .LAM_U(3373)) h1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  tcs_timing_harness #(.NAME("65nm"), .STREAM(0), .TAU_C(1241), .LAM_C(1456),
                       .TAU_U(936), .LAM_U(3171)) h2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  tcs_timing_harness #(.NAME("65nm"), .STREAM(1), .TAU_C(1241), .LAM_C(1456),
                       .TAU_U(936), .LAM_U(3171)) h3 (.done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

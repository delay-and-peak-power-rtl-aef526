// bus_wire_model: behavioural model of a long on-chip bus (not synthesizable).
//
// Every wire copies its input to its output after a delay set by its
// crosstalk class, from the lumped delay model of a coupled bus: with the
// transition d_k in {-1, 0, +1} of wire k and of its neighbours,
//   inner wire: tau * ((1 + 2*lambda) - lambda * d_k * (d_{k-1} + d_{k+1}))
//   edge wire : tau * ((1 +   lambda) - lambda * d_k * d_neighbour)
// where tau = R_T * C_L (total wire resistance times ground capacitance) and
// lambda = C_I / C_L (coupling over ground capacitance). A wire that does not
// switch has no delay. So the six classes are 0, tau, tau(1+lambda),
// tau(1+2 lambda), tau(1+3 lambda), tau(1+4 lambda).
//
// Parameters are integers: TAU_PS in picoseconds, LAMBDA_MILLI = 1000 *
// lambda. The model also reports the largest wire delay of the last input
// change (last_delay_ps) and the largest seen so far (max_delay_ps), and
// counts the changes that put any wire in class 5 or 6 (n_class56).
// Inputs are expected to change at most once per bus cycle, with the cycle
// longer than every delay.
module bus_wire_model #(
  parameter int unsigned W            = 24,
  parameter int unsigned TAU_PS       = 679,   // 1870 Ohm * 362.87 fF
  parameter int unsigned LAMBDA_MILLI = 1541   // 55.909 / 36.287
) (
  input  logic [W-1:0] bus_in,
  output logic [W-1:0] bus_out,
  output int unsigned  last_delay_ps,
  output int unsigned  max_delay_ps,
  output int unsigned  n_class56
);
  logic [W-1:0] prev;
  int unsigned  dly [W];
  event         launch;

  initial begin
    prev          = '0;
    bus_out       = '0;
    last_delay_ps = 0;
    max_delay_ps  = 0;
    n_class56     = 0;
  end

  always @(bus_in) begin
    int d, l, r, s;
    int unsigned worst;
    bit c56;
    worst = 0;
    c56   = 0;
    for (int k = 0; k < W; k++) begin
      d = int'(bus_in[k]) - int'(prev[k]);
      l = (k > 0)     ? int'(bus_in[k-1]) - int'(prev[k-1]) : 0;
      r = (k < W - 1) ? int'(bus_in[k+1]) - int'(prev[k+1]) : 0;
      if (d == 0) begin
        dly[k] = 0;
      end else if (k == 0 || k == W - 1) begin
        s = d * ((k == 0) ? r : l);                  // +1, 0, -1
        dly[k] = TAU_PS * (1000 + LAMBDA_MILLI * (1 - s)) / 1000;
      end else begin
        s = d * (l + r);                             // +2 .. -2
        dly[k] = TAU_PS * (1000 + LAMBDA_MILLI * (2 - s)) / 1000;
        if (s < 0) c56 = 1;
      end
      if (dly[k] > worst) worst = dly[k];
    end
    -> launch;
    last_delay_ps = worst;
    if (worst > max_delay_ps) max_delay_ps = worst;
    if (c56) n_class56++;
    prev = bus_in;
  end

  // one delayed copy per wire
  for (genvar k = 0; k < W; k++) begin : g_wire
    always @(launch) bus_out[k] <= #(dly[k] * 1ps) bus_in[k];
  end
endmodule

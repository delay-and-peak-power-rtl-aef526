// tcs_bus_top: complete TCS-coded on-chip bus link, sender side and receiver
// side.
//
// Sender side: sender_latch -> (tcs_encoder and crosstalk_class_analyzer in
// parallel) -> civ_driver, sequenced by tcs_tx_ctrl. Every N-bit word is sent
// as two 3N/4-bit words; when the analyzer finds that the word's first
// transmission would make adjacent wires switch in opposite directions
// against the second transmission now on the bus, the zero vector (CIV) is
// sent first. Receiver side: tcs_decoder -> receiver_latch.
//
// The global wires themselves are not logic: the encoded bus leaves on bus_tx
// and comes back on bus_rx, and whatever models the interconnect sits
// between them (a plain connection makes a working link).
//
// Timing, with a plain connection: a word accepted from the sender at edge
// t (snd_valid && snd_ready) is in the latch after t; its first code word is
// on the bus after t+1 (t+2 with a CIV), the second after t+2 (t+3), and
// rcv_valid/rcv_data show it after t+3 (t+4). Back-to-back words go every two
// cycles, every three when a CIV is needed.
//
// Status outputs: civ_sent pulses in the cycle a CIV is chosen; xt_mid and
// xt_bnd show which analyzer unit flagged it; dec_err flags a received
// pattern that is no code word.
//
// The blocks and their connections follow the TCS link (sender latch,
// encoder, CIV, crosstalk class analyzer, interconnect, decoder, receiver
// latch); the handshakes and pipeline timing are this design's own.
//
// The assertion below checks the property the code is built for: no two
// adjacent bus wires ever switch in opposite directions.
module tcs_bus_top #(
  parameter int unsigned N = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // sender
  input  logic               snd_valid,
  input  logic [N-1:0]       snd_data,
  output logic               snd_ready,
  // encoded bus, out to and back from the interconnect
  output logic [N/4*3-1:0]   bus_tx,
  input  logic [N/4*3-1:0]   bus_rx,
  // receiver
  output logic               rcv_valid,
  output logic [N-1:0]       rcv_data,
  // status
  output logic               civ_sent,
  output logic               xt_mid,
  output logic               xt_bnd,
  output logic               dec_err
);
  localparam int unsigned W = N / 4 * 3;

  logic         lat_valid;
  logic [N-1:0] lat_data;
  logic         take, send_second, civ, idle, clear, xt;
  logic [W-1:0] first_w, second_w;

  sender_latch #(.N(N)) u_snd_latch (
    .clk, .rst_n,
    .in_valid(snd_valid), .in_data(snd_data), .in_ready(snd_ready),
    .out_valid(lat_valid), .out_data(lat_data), .take
  );

  tcs_encoder #(.N(N)) u_enc (
    .data(lat_data), .first_w, .second_w
  );

  crosstalk_class_analyzer #(.N(N)) u_cca (
    .clk, .rst_n,
    .new_data(lat_data), .bus_word(bus_tx),
    .load(take), .clear,
    .xt, .mid_xt(xt_mid), .bnd_xt(xt_bnd)
  );

  tcs_tx_ctrl u_ctrl (
    .clk, .rst_n,
    .word_valid(lat_valid), .xt,
    .take, .send_second, .civ, .idle, .clear
  );

  civ_driver #(.W(W)) u_civ (
    .clk, .rst_n,
    .load_first(take), .send_second,
    .first_w, .second_w,
    .bus(bus_tx)
  );

  assign civ_sent = civ;

  // receiver side
  logic         dec_valid;
  logic [N-1:0] dec_data;
  logic         dec_discard;

  tcs_decoder #(.N(N)) u_dec (
    .clk, .rst_n,
    .bus_word(bus_rx),
    .valid(dec_valid), .data(dec_data),
    .code_err(dec_err), .discard(dec_discard)
  );

  receiver_latch #(.N(N)) u_rcv_latch (
    .clk, .rst_n,
    .in_valid(dec_valid), .in_data(dec_data),
    .out_valid(rcv_valid), .out_data(rcv_data)
  );

  // No opposite transitions on adjacent wires of the driven bus.
  function automatic logic opposite_any(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] rise, fall;
    rise = b & ~a;
    fall = ~b & a;
    return |((rise & (fall << 1)) | (fall & (rise << 1)));
  endfunction

  a_no_opposite: assert property (@(posedge clk) disable iff (!rst_n)
                                  !opposite_any($past(bus_tx), bus_tx))
    else $error("tcs_bus_top: opposite transitions on adjacent bus wires");

endmodule

// civ_driver: bus driver of the sender, including the CIV source.
//
// The encoded bus is driven from one register. Each cycle it takes one of
// three values:
//   * load_first  : the first code word of a new data word (the second code
//                   word is kept in a hold register for the next cycle);
//   * send_second : the held second code word;
//   * neither     : the all-zero vector. This is the Crosstalk
//                   Identification Vector (CIV) when it is sent to break a
//                   Class 5/6 transition, and also the idle value of the bus.
// An all-zero word never causes opposite transitions: every wire either
// falls into it or rises out of it.
//
// Timing: the bus value changes at the clock edge after the request. Reset
// puts the zero vector on the bus. Sending zero when idle is this design's
// choice, needed so that the receiver's decode bit stays in step.
module civ_driver #(
  parameter int unsigned W = 24  // encoded bus width, 3N/4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_first,
  input  logic         send_second,
  input  logic [W-1:0] first_w,
  input  logic [W-1:0] second_w,
  output logic [W-1:0] bus
);
  logic [W-1:0] hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus    <= '0;
      hold_q <= '0;
    end else if (load_first) begin
      bus    <= first_w;
      hold_q <= second_w;
    end else if (send_second) begin
      bus    <= hold_q;
    end else begin
      bus    <= '0;
    end
  end

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !(load_first && send_second))
    else $error("civ_driver: first and second transmission requested together");

endmodule

// rupt_arb: interrupt arbiter of the fetch loop.
//
// Before every instruction Fetch asks for an interrupt guess (IG). The
// arbiter only probes the IRUPT channel: if a message is waiting it is taken
// and IG is true, otherwise IG is false and nothing is consumed. IRUPT
// messages come from the interrupt modules only for enabled interrupts, so
// the real interrupt-enable and priority checks are done later, and only
// when IG is true, by the interrupt registers. A "sleep" message puts the
// arbiter to sleep: it then answers no more guesses, which stops
// instruction fetch and with it all execution, until any new IRUPT message
// arrives; that message is left in the channel and turns the next guess
// true. No guess is given in the clock that takes the sleep message. This
// is the original arbiter's behaviour.
//
// Clocked timing (this design's): ig_valid/ig are combinational from the
// IRUPT channel; a guess is consumed in the clock where ig_req and ig_valid
// are both high. The IRUPT channel is valid/ready.
module rupt_arb
  import lut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // IRUPT channel from the timer/interrupt modules and interrupt registers
  input  logic       irupt_valid,
  input  irupt_msg_e irupt_msg,
  output logic       irupt_ready,
  // interrupt guess to Fetch
  input  logic       ig_req,
  output logic       ig_valid,
  output logic       ig,
  output logic       sleeping
);
  logic asleep;

  always_comb begin
    ig_valid    = !asleep && !(irupt_valid && irupt_msg == IRUPT_SLEEP);
    ig          = !asleep && irupt_valid && irupt_msg == IRUPT_OTHER;
    irupt_ready = !asleep && ig_req && irupt_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) asleep <= 1'b0;
    else if (!asleep && ig_req && irupt_valid && irupt_msg == IRUPT_SLEEP) asleep <= 1'b1;
    else if (asleep && irupt_valid) asleep <= 1'b0;
  end

  assign sleeping = asleep;
endmodule

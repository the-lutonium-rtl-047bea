// pulse_sync: pulse synchronizer between a pin and the core's channels.
//
// The pin is an arbitrary asynchronous waveform. It is sampled through a
// SYNC_STAGES-flop synchronizer, and every falling edge (one complete pulse
// on an 8051 counter or interrupt pin ends with 1 -> 0) produces one Tick
// message on a valid/ready channel. Nothing happens while the pin is quiet.
// One tick can wait for its receiver; a further edge while one is waiting is
// counted in `lost`. That the circuit emits one message per detected pulse
// is the original's; the flop synchronizer and edge choice are this
// clocked design's.
module pulse_sync #(
  parameter int SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pin,
  output logic tick_valid,
  input  logic tick_ready,
  output logic lost
);
  logic [SYNC_STAGES-1:0] sync;
  logic prev;
  logic fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0; prev <= 1'b0;
    end else begin
      sync <= {sync[SYNC_STAGES-2:0], pin};
      prev <= sync[SYNC_STAGES-1];
    end
  end
  assign fall = prev && !sync[SYNC_STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_valid <= 1'b0; lost <= 1'b0;
    end else begin
      if (fall) begin
        if (tick_valid && !tick_ready) lost <= 1'b1;
        tick_valid <= 1'b1;
      end else if (tick_ready) tick_valid <= 1'b0;
    end
  end
endmodule

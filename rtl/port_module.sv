// port_module: one 8-bit I/O port (pins read and written by software).
//
// Holds the port latch and a direction register. With a direction bit 0
// (the default) the pin behaves like a standard 8051 quasi-bidirectional
// pin: latch 0 drives the pin low, latch 1 releases it (an external pull-up
// gives the 1). With a direction bit 1 the pin is driven both ways from the
// latch, so no passive pull-up is needed. Reading the port returns the pin
// value through a two-flop synchronizer, so arbitrary pin waveforms are
// safe. Register writes take effect at the clock edge. The direction
// register, off by default, is from the original; its encoding is this
// design's.
module port_module (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we_latch,
  input  logic       we_dir,
  input  logic [7:0] wdata,
  output logic [7:0] latch,
  output logic [7:0] dir,
  output logic [7:0] pin_value,   // synchronized pin levels
  // pins
  input  logic [7:0] pin_in,
  output logic [7:0] pin_out,
  output logic [7:0] pin_oe
);
  logic [7:0] s1, s2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch <= 8'hFF; dir <= 8'h00; s1 <= 8'hFF; s2 <= 8'hFF;
    end else begin
      if (we_latch) latch <= wdata;
      if (we_dir)   dir   <= wdata;
      s1 <= pin_in;
      s2 <= s1;
    end
  end
  assign pin_value = s2;
  assign pin_out   = latch & dir;
  assign pin_oe    = dir | ~latch;
endmodule

// imem_bank: one leaf bank of the program memory, ROWS rows of two bytes.
// A read returns both bytes of a row one clock after the request; a write
// stores one byte (byte lane chosen by wr_lane). Plain array, so synthesis
// may map it onto an SRAM macro. The 64-row, 16-bit leaf follows the
// program-memory description; the one-cycle read latency is this design's.
module imem_bank #(
  parameter int ROWS = 64
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  output logic [15:0]              rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic                     wr_lane,
  input  logic [7:0]               wr_data
);
  logic [15:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_lane) mem[wr_row][15:8] <= wr_data;
      else         mem[wr_row][7:0]  <= wr_data;
    end
    if (rd_en) rd_data <= mem[rd_row];
  end
endmodule

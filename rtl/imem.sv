// imem: interleaved program memory of the fetch loop.
//
// 8 kB of code in 64 banks of 64 rows x 16 bits, arranged as a two-level
// 8-way tree. A read always returns an aligned pair of bytes (the even byte
// on lane 0, the odd byte on lane 1). Bits [2:0] of the pair index pick the
// first-level branch, bits [5:3] the second-level branch, and the remaining
// bits the row, so consecutive pairs sit in different banks. The bank
// organisation and interleave are those of the original design; the
// clocked timing is this design's: a read request is accepted every clock
// and its pair appears on rd_* one clock later (rsp_valid), with no
// back-pressure, so the requester must hold room for it. Only the addressed
// bank is enabled (the other 63 do not switch).
//
// Write port: one byte per clock (the instruction that writes program
// memory, and a boot loader). A read and a write to the same row in the same
// clock return the old contents.
module imem #(
  parameter int ADDR_W    = 13,   // byte address width: 8 kB
  parameter int BANK_ROWS = 64,
  parameter int WAYS      = 8     // branching factor of each tree level
) (
  input  logic              clk,
  input  logic              rst_n,
  // read request: pair index = byte address >> 1
  input  logic              req_valid,
  input  logic [ADDR_W-2:0] req_pair,
  // read response
  output logic              rsp_valid,
  output logic [ADDR_W-2:0] rsp_pair,
  output logic [7:0]        rsp_byte0,
  output logic [7:0]        rsp_byte1,
  // byte write
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data
);
  localparam int LW     = $clog2(WAYS);
  localparam int NBANKS = WAYS * WAYS;
  localparam int RW     = $clog2(BANK_ROWS);

  initial begin
    assert (ADDR_W - 1 == 2 * LW + RW)
      else $error("imem: ADDR_W does not match WAYS*WAYS banks of BANK_ROWS rows");
  end

  // address split: [first level | second level | row]
  logic [2*LW-1:0] rd_bank, wr_bank;
  logic [RW-1:0]   rd_row, wr_row;
  assign rd_bank = req_pair[2*LW-1:0];
  assign rd_row  = req_pair[ADDR_W-2 -: RW];
  assign wr_bank = wr_addr[2*LW:1];
  assign wr_row  = wr_addr[ADDR_W-1 -: RW];

  logic [15:0] bank_data [NBANKS];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    imem_bank #(.ROWS(BANK_ROWS)) u_bank (
      .clk    (clk),
      .rd_en  (req_valid && rd_bank == (2*LW)'(b)),
      .rd_row (rd_row),
      .rd_data(bank_data[b]),
      .wr_en  (wr_en && wr_bank == (2*LW)'(b)),
      .wr_row (wr_row),
      .wr_lane(wr_addr[0]),
      .wr_data(wr_data)
    );
  end

  // Data-read tree: the response is selected by the bank index of the
  // request, first among the WAYS groups, then within the group.
  logic [2*LW-1:0] rsp_bank;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_pair  <= '0;
    end else begin
      rsp_valid <= req_valid;
      if (req_valid) rsp_pair <= req_pair;
    end
  end
  assign rsp_bank = rsp_pair[2*LW-1:0];

  // Data-read tree: second level (pair[5:3]) inside each first-level
  // group, then first level (pair[2:0]). Bank b holds pairs whose low six
  // pair-index bits equal b.
  logic [15:0] group_data [WAYS];
  logic [15:0] word;
  always_comb begin
    for (int f = 0; f < WAYS; f++)
      group_data[f] = bank_data[int'(rsp_bank[2*LW-1:LW]) * WAYS + f];
  end
  assign word      = group_data[rsp_bank[LW-1:0]];
  assign rsp_byte0 = word[7:0];
  assign rsp_byte1 = word[15:8];
endmodule

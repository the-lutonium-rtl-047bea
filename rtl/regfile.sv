// regfile: RegFile, the internal data RAM with the banked registers R0-R7.
//
// DEPTH bytes. Working register Rn of the bank selected by PSW.RS (rs) is
// byte {rs, n}. One read port and one write port, each addressed in one of
// three modes: direct (8-bit address), register (Rn) or indirect (@Ri: Ri
// is read first, then the byte it points to, inside the unit, so nothing
// leaves the register file in the middle). Reads are combinational; writes
// take effect at the clock edge. ri_val returns the selected Ri itself. The
// banking and the internal Ri/@Ri sequence follow the original; 128 bytes
// (standard 8051) and the port structure are this design's choices.
module regfile #(
  parameter int DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] rs,
  // read port
  input  logic [1:0] rd_mode,   // 0 direct, 1 Rn, 2 @Ri
  input  logic [7:0] rd_addr,   // direct address, or n / i in the low bits
  output logic [7:0] rd_data,
  output logic [7:0] ri_val,
  // write port
  input  logic       wr_en,
  input  logic [1:0] wr_mode,
  input  logic [7:0] wr_addr,
  input  logic [7:0] wr_data
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];

  function automatic logic [AW-1:0] resolve(input logic [1:0] mode, input logic [7:0] a,
                                            input logic [1:0] bank);
    logic [AW-1:0] reg_a;
    reg_a = AW'({bank, a[2:0]});
    case (mode)
      2'd1:    return reg_a;
      2'd2:    return AW'(mem[AW'({bank, 2'b00, a[0]})]);
      default: return AW'(a);
    endcase
  endfunction

  assign rd_data = mem[resolve(rd_mode, rd_addr, rs)];
  assign ri_val  = mem[AW'({rs, 2'b00, rd_addr[0]})];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[resolve(wr_mode, wr_addr, rs)] <= wr_data;
    end
  end
endmodule

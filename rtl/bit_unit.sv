// bit_unit: the BitUnit, bit addressing and single-bit operations.
//
// Combinational. An 8051 bit address selects a bit in RAM bytes 20h-2Fh
// (addresses 00h-7Fh) or in a bit-addressable SFR (80h-FFh, byte address =
// bit address with the low three bits cleared). Given the byte read from
// that address, the unit returns the bit and the byte to write back for
// SETB / CLR / CPL / MOV bit,C (and JBC, which clears the bit it tests).
// These are the 8051 rules; the original names the unit only.
module bit_unit (
  input  logic [7:0] bit_addr,
  output logic [7:0] byte_addr,
  input  logic [7:0] byte_in,
  input  logic [1:0] op,        // 0 keep, 1 set, 2 clear, 3 complement
  input  logic       use_cin,   // write cin instead (MOV bit,C)
  input  logic       cin,
  output logic       bit_val,
  output logic [7:0] byte_out
);
  logic [7:0] mask;
  always_comb begin
    byte_addr = bit_addr[7] ? {bit_addr[7:3], 3'b000} : {4'h2, bit_addr[6:3]};
    mask      = 8'h01 << bit_addr[2:0];
    bit_val   = (byte_in & mask) != 8'h00;
    if (use_cin) byte_out = cin ? (byte_in | mask) : (byte_in & ~mask);
    else
      case (op)
        2'd1:    byte_out = byte_in | mask;
        2'd2:    byte_out = byte_in & ~mask;
        2'd3:    byte_out = byte_in ^ mask;
        default: byte_out = byte_in;
      endcase
  end
endmodule

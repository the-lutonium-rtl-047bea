// mult_div: the MultDiv execution unit (MUL AB, DIV AB).
//
// Combinational. MUL: B:A = A * B, OV set when the product exceeds 255,
// C cleared. DIV: A = A / B, B = A mod B, C cleared, OV set on division by
// zero, in which case A and B are returned unchanged. These are the 8051
// semantics; the original describes the unit only by name, so its insides
// (a single combinational multiplier and divider) are this design's.
module mult_div (
  input  logic       is_div,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] a_out,
  output logic [7:0] b_out,
  output logic       ov
);
  logic [15:0] prod;
  always_comb begin
    prod = 16'(a) * 16'(b);
    if (!is_div) begin
      a_out = prod[7:0];
      b_out = prod[15:8];
      ov    = prod[15:8] != 8'h00;
    end else if (b == 8'h00) begin
      a_out = a;
      b_out = b;
      ov    = 1'b1;
    end else begin
      a_out = a / b;
      b_out = a % b;
      ov    = 1'b0;
    end
  end
endmodule

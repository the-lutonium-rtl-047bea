// tb_bit_unit: every bit address, with all operations, against the 8051
// bit-address map worked out here.
module tb_bit_unit;
  int checks = 0, failures = 0;
  logic [7:0] ba, byte_addr, bin, bout;
  logic [1:0] op;
  logic use_cin, cin, bv;
  bit_unit dut (.bit_addr(ba), .byte_addr, .byte_in(bin), .op, .use_cin, .cin, .bit_val(bv),
                .byte_out(bout));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 5; k++) begin
        int ea, bitn, eb, ev;
        ba = 8'(i); bin = 8'($urandom); op = 2'(k % 4); use_cin = k == 4; cin = 1'($urandom);
        #1;
        ea = i < 128 ? 32 + i / 8 : (i / 8) * 8;
        bitn = i % 8;
        ev = (int'(bin) >> bitn) & 1;
        if (use_cin) eb = cin ? (int'(bin) | (1 << bitn)) : (int'(bin) & ~(1 << bitn));
        else case (k)
          1: eb = int'(bin) | (1 << bitn);
          2: eb = int'(bin) & ~(1 << bitn);
          3: eb = int'(bin) ^ (1 << bitn);
          default: eb = int'(bin);
        endcase
        checks++;
        if (int'(byte_addr) != ea || int'(bv) != ev || int'(bout) != (eb & 255)) begin
          failures++; $display("FAIL bit %h op %0d", ba, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

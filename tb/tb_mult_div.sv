// tb_mult_div: MUL AB and DIV AB against integer arithmetic, including
// division by zero.
module tb_mult_div;
  int checks = 0, failures = 0;
  logic is_div, ov;
  logic [7:0] a, b, ao, bo;
  mult_div dut (.is_div, .a, .b, .a_out(ao), .b_out(bo), .ov);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int p;
      a = 8'($urandom); b = (i % 50 == 0) ? 8'd0 : 8'($urandom); is_div = 1'(i % 2);
      #1;
      checks++;
      if (!is_div) begin
        p = int'(a) * int'(b);
        if (int'(ao) != p % 256 || int'(bo) != p / 256 || ov != (p > 255)) begin
          failures++; $display("FAIL MUL %0d*%0d", a, b);
        end
      end else if (b == 0) begin
        if (!ov) begin failures++; $display("FAIL DIV by zero flag"); end
      end else if (int'(ao) != int'(a) / int'(b) || int'(bo) != int'(a) % int'(b) || ov) begin
        failures++; $display("FAIL DIV %0d/%0d", a, b);
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

// tb_regfile: direct, banked-register and indirect accesses against a
// shadow array kept by the testbench.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] rs, rd_mode, wr_mode;
  logic [7:0] rd_addr, rd_data, ri_val, wr_addr, wr_data;
  logic wr_en;
  regfile dut (.*);
  logic [7:0] sh [128];

  function automatic int res(input logic [1:0] m, input logic [7:0] a, input logic [1:0] bank);
    case (m)
      2'd1: return int'(bank) * 8 + int'(a[2:0]);
      2'd2: return int'(sh[int'(bank) * 8 + int'(a[0])]) % 128;
      default: return int'(a) % 128;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) sh[i] = 0;
    wr_en = 0; rs = 0; rd_mode = 0; wr_mode = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int wa;
      rs = 2'($urandom);
      wr_en = 1'($urandom); wr_mode = 2'($urandom_range(0, 2));
      wr_addr = 8'($urandom_range(0, 127)); wr_data = 8'($urandom);
      if (i % 5 == 0) wr_data = 8'($urandom_range(0, 127));  // good pointers
      rd_mode = 2'($urandom_range(0, 2)); rd_addr = 8'($urandom_range(0, 127));
      #1;
      checks++;
      if (rd_data != sh[res(rd_mode, rd_addr, rs)] ||
          ri_val != sh[int'(rs) * 8 + int'(rd_addr[0])]) begin
        failures++; $display("FAIL read mode %0d addr %h bank %0d", rd_mode, rd_addr, rs);
      end
      wa = res(wr_mode, wr_addr, rs);
      @(negedge clk);
      if (wr_en) sh[wa] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

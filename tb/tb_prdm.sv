// tb_prdm: the two ports behind the SFR interface: writes to P1, P1DIR, P3,
// P3DIR, read-back of pins and directions, and misses for other addresses.
module tb_prdm;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sfr_we = 0, sfr_hit;
  logic [7:0] sfr_waddr = 0, sfr_wdata = 0, sfr_raddr = 0, sfr_rdata;
  logic [7:0] p1_in = 8'hFF, p1_out, p1_oe, p3_in = 8'hFF, p3_out, p3_oe;
  prdm dut (.*);
  logic [7:0] l1 = 8'hFF, d1 = 0, l3 = 8'hFF, d3 = 0;
  logic [7:0] addrs [5] = '{SFR_P1, SFR_P1DIR, SFR_P3, SFR_P3DIR, SFR_ACC};

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      sfr_we = 1'($urandom); sfr_waddr = addrs[$urandom_range(0, 4)]; sfr_wdata = 8'($urandom);
      if (i % 16 == 0) begin p1_in = 8'($urandom); p3_in = 8'($urandom); end
      @(posedge clk);
      if (sfr_we) case (sfr_waddr)
        SFR_P1: l1 = sfr_wdata;
        SFR_P1DIR: d1 = sfr_wdata;
        SFR_P3: l3 = sfr_wdata;
        SFR_P3DIR: d3 = sfr_wdata;
        default: ;
      endcase
      @(negedge clk);
      sfr_we = 0;
      checks++;
      if (p1_oe != (d1 | ~l1) || (p1_out & p1_oe) != (l1 & p1_oe) ||
          p3_oe != (d3 | ~l3) || (p3_out & p3_oe) != (l3 & p3_oe)) begin
        failures++; $display("FAIL pins");
      end
      sfr_raddr = addrs[$urandom_range(0, 4)]; #1;
      checks++;
      case (sfr_raddr)
        SFR_P1DIR: if (!sfr_hit || sfr_rdata != d1) begin failures++; $display("FAIL P1DIR"); end
        SFR_P3DIR: if (!sfr_hit || sfr_rdata != d3) begin failures++; $display("FAIL P3DIR"); end
        SFR_P1: if (!sfr_hit || (i % 16 > 2 && sfr_rdata != p1_in)) begin failures++; $display("FAIL P1 read"); end
        SFR_P3: if (!sfr_hit || (i % 16 > 2 && sfr_rdata != p3_in)) begin failures++; $display("FAIL P3 read"); end
        default: if (sfr_hit) begin failures++; $display("FAIL hit on %h", sfr_raddr); end
      endcase
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

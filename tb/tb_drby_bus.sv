// tb_drby_bus: every source/destination pair of the DRBY bus.
// For each of the 9 x 7 transfers the source presents a random byte, the
// control code is sent, and the testbench checks that exactly the chosen
// destination receives the byte, that the source was acknowledged, and that
// the transfer took as many clocks as stages it should cross: Main always,
// RegMerge for any source but the register file, AltMerge for RuptRegs /
// PRDM / SP / DPH, ExecSplit for any destination but Exchange.
module tb_drby_bus;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic ctrl_valid = 0, ctrl_ready;
  drby_ctrl_t ctrl;
  logic [NSRC-1:0] in_valid = '0, in_ready;
  logic [7:0] in_data [NSRC];
  logic [NDST-1:0] out_valid, out_ready = '0;
  logic [7:0] out_data [NDST];
  logic [1:0] stages_m1;

  drby_bus dut (.clk, .rst_n, .ctrl_valid, .ctrl, .ctrl_ready, .in_valid, .in_data, .in_ready,
                .out_valid, .out_data, .out_ready, .last_stages_minus1(stages_m1));

  int hist [5];
  initial begin
    ctrl = '0;
    for (int s = 0; s < NSRC; s++) in_data[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
    for (int s = 0; s < NSRC; s++)
      for (int d = 0; d < NDST; d++) begin
        int want, n, got_src;
        logic [7:0] v;
        v = 8'($urandom);
        want = 1 + (s != 0 ? 1 : 0) + ((s >= 5 && s <= 8) ? 1 : 0) + (d != 0 ? 1 : 0);
        in_valid = '0; in_valid[s] = 1; in_data[s] = v;
        ctrl_valid = 1; ctrl = drby_encode(drb_src_e'(s), drb_dst_e'(d));
        check(ctrl_ready, "bus idle before transfer");
        n = 0; got_src = 0;
        do begin
          @(posedge clk);
          if (in_ready[s]) got_src = 1;
          #1; ctrl_valid = 0;
          if (got_src) in_valid[s] = 0;
          n++;
        end while (out_valid == '0 && n < 10);
        check(out_valid == (NDST'(1) << d), $sformatf("dest %0d only (src %0d)", d, s));
        check(out_data[d] == v, $sformatf("data src %0d dst %0d", s, d));
        check(n == want, $sformatf("latency src %0d dst %0d: %0d, want %0d", s, d, n, want));
        check(got_src == 1, "source acknowledged");
        check(int'(stages_m1) + 1 == want, "stage count reported");
        hist[n]++;
        // keep the output for a random time before taking it
        repeat ($urandom_range(0, 2)) @(negedge clk);
        @(negedge clk); out_ready = out_valid;
        @(negedge clk); out_ready = '0;
      end
    $display("latency histogram: 1:%0d 2:%0d 3:%0d 4:%0d", hist[1], hist[2], hist[3], hist[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fetch_mix: fetch-loop throughput on a random instruction mix with
// branches (Fetch + program memory + SwitchBox, consumers always ready).
//
// A random program fills the 8 kB program memory: every instruction has a
// uniformly random opcode (so about one in five is branch-type) and random
// operand bytes. The testbench acts as the
// branch unit: it answers each branch one clock after Fetch starts waiting,
// with a random instruction start (taken) or the next address (not taken).
// Every delivered opcode and operand byte is checked against the program
// and the expected PC, and the average rate in bytes per clock is printed.
// The original quotes 1.37 bytes per cycle for random programs; in this
// clocked version every branch costs a few clocks (wait for the answer,
// flush, one-clock memory), so the rate is lower. The rate is printed and
// only checked to lie between 0.5 and 2 bytes per clock.
module tb_fetch_mix;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        mem_req, rsp_valid;
  logic [11:0] mem_pair, rsp_pair;
  logic [7:0]  rb0, rb1;
  logic        wr_en = 0;
  logic [12:0] wr_addr = 0;
  logic [7:0]  wr_data = 0;
  logic [1:0]  head_valid;
  logic [15:0] head_addr [2];
  logic [7:0]  head_byte [2];
  logic [1:0]  lane_count [2];
  logic [2:0]  route [2];
  logic        irq_ins, flush, i1_free, i2_free, i3_free;
  logic [15:0] irq_pc, br_pc = 0, pc;
  logic [2:0]  pc_hi;
  logic        ig_req, ig, br_valid = 0, br_ready, waiting;
  logic        i1_valid, i2_valid, i3_valid, acc_valid, acc_free;
  instr1_t     i1_data;
  logic [7:0]  i2_data, i3_data, acc_data;

  imem u_mem (.clk, .rst_n, .req_valid(mem_req), .req_pair(mem_pair), .rsp_valid, .rsp_pair,
              .rsp_byte0(rb0), .rsp_byte1(rb1), .wr_en, .wr_addr, .wr_data);
  switchbox u_sb (.clk, .rst_n, .mem_valid(rsp_valid), .mem_pair(rsp_pair), .mem_byte0(rb0),
                  .mem_byte1(rb1), .head_valid, .head_addr, .head_byte, .lane_count, .route,
                  .irq_ins, .irq_pc, .flush, .pc_hi, .i1_free, .i2_free, .i3_free,
                  .i1_valid, .i1_ready(1'b1), .i1_data, .i2_valid, .i2_ready(1'b1), .i2_data,
                  .i3_valid, .i3_ready(1'b1), .i3_data, .acc_valid, .acc_ready(1'b1), .acc_data,
                  .acc_free);
  fetch dut (.clk, .rst_n, .mem_req, .mem_pair, .head_valid, .head_addr, .head_byte, .lane_count,
             .route, .irq_ins, .irq_pc, .flush, .pc_hi, .i1_free, .i2_free, .i3_free,
             .ig_req, .ig_valid(1'b1), .ig(1'b0), .br_valid, .br_pc, .br_code(1'b0), .br_ready,
             .acc_free, .waiting_branch(waiting), .pc);
  assign ig = 1'b0;

  // ---- random program ----
  logic [7:0] img [8192];
  int         len_of [8192];      // instruction length at each start, 0 elsewhere
  int         starts [$];
  initial begin
    int a, r;
    a = 0;
    for (int i = 0; i < 8192; i++) begin img[i] = 8'h00; len_of[i] = 0; end
    while (a < 8180) begin
      // uniformly random opcode, operand bytes random; lengths from the
      // 8051 instruction-length table
      starts.push_back(a);
      img[a] = 8'($urandom);
      len_of[a] = int'(op_len(img[a]));
      for (int k = 1; k < len_of[a]; k++) img[a + k] = 8'($urandom);
      a += len_of[a];
    end
    starts.push_back(a);          // trailing NOPs up to the end
    for (int i = a; i < 8192; i++) len_of[i] = (i == a) ? 1 : 0;
  end

  // ---- stream checker ----
  logic [15:0] expect_pc = 0, last_pc = 0;
  int bytes = 0, n_instr = 0, n_br = 0;
  always @(posedge clk) if (rst_n) begin
    if (i2_valid) check(i2_data == img[13'(last_pc + 1)], $sformatf("byte 2 of %h", last_pc));
    if (i3_valid) check(i3_data == img[13'(last_pc + 2)], $sformatf("byte 3 of %h", last_pc));
    if (i1_valid) begin
      check(!i1_data.irq && i1_data.pc == expect_pc && i1_data.op == img[13'(i1_data.pc)],
            $sformatf("opcode at %h (expected %h)", i1_data.pc, expect_pc));
      last_pc = i1_data.pc;
      expect_pc = i1_data.pc + 16'(len_of[13'(i1_data.pc)]);
      bytes += len_of[13'(i1_data.pc)];
      n_instr++;
    end
  end

  // ---- branch unit ----
  int clocks = 0;
  initial begin
    for (int i = 0; i < 8192; i++) begin
      wr_en <= 1; wr_addr <= 13'(i); wr_data <= img[i];
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    rst_n <= 1;
    while (clocks < 4000) begin
      @(negedge clk); clocks++;
      if (br_ready && !br_valid) begin
        @(negedge clk); clocks++;
        br_valid = 1;
        if ($urandom_range(0, 1) == 0 || int'(expect_pc) >= 8180) br_pc = 16'(starts[$urandom_range(0, starts.size() - 2)]);
        else br_pc = expect_pc;
        @(negedge clk); clocks++;
        br_valid = 0;
        expect_pc = br_pc;
        n_br++;
      end
    end
    check(n_br > 100, "branches exercised");
    check(2 * bytes > clocks && bytes < 2 * clocks, $sformatf("rate %0d bytes in %0d clocks", bytes, clocks));
    $display("random mix: %0d instructions, %0d branches, %0d bytes in %0d clocks = %0d.%02d bytes/clock",
             n_instr, n_br, bytes, clocks, bytes / clocks, (bytes * 100 / clocks) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

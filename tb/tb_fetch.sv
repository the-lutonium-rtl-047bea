// tb_fetch: fetch-loop test (Fetch + program memory + SwitchBox).
//
// Program memory holds four regions reached through SJMP/LJMP, whose next PC
// the testbench supplies as the branch unit:
//   000h  32 one-byte NOPs           -> one opcode per clock
//   100h  16 two-byte MOV A,#imm     -> one opcode per clock (2 bytes/clock)
//   201h  16 three-byte MOV dir,#imm -> one opcode every 2 clocks (1.5 bytes/clock),
//         starting on an odd address; the first four clocks must match the
//         two-instruction fetch pattern (opcode alone, both operands, next
//         opcode alone, both operands from two different pairs)
//   300h  NOPs with one interrupt guess, then LJMP 310h
//   310h  MOVC A,@A+PC: the testbench answers with a code address (3F1h);
//         exactly that byte must come out on the A channel, then fetch
//         resumes at 311h with two NOPs and SJMP
// The decode side is always ready. Every delivered byte is compared with the
// memory image, every opcode address with the expected program order, and
// no program-memory read may pass the last pair of a branch while Fetch
// waits for the branch unit.
module tb_fetch;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- DUT and its loop partners ----
  logic        mem_req, rsp_valid;
  logic [11:0] mem_pair, rsp_pair;
  logic [7:0]  rb0, rb1;
  logic        wr_en = 0;
  logic [12:0] wr_addr = 0;
  logic [7:0]  wr_data = 0;
  logic [1:0]  head_valid;
  logic [15:0] head_addr [2];
  logic [7:0]  head_byte [2];
  logic [1:0]  lane_count [2];  // LANE_DEPTH 3
  logic [2:0]  route [2];
  logic        irq_ins, flush, i1_free, i2_free, i3_free;
  logic [15:0] irq_pc, br_pc, pc;
  logic [2:0]  pc_hi;
  logic        ig_req, ig_valid, ig, br_valid, br_ready, waiting, br_code;
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
             .ig_req, .ig_valid, .ig, .br_valid, .br_pc, .br_code, .br_ready,
             .acc_free, .waiting_branch(waiting), .pc);

  // ---- memory image ----
  logic [7:0] img [1024];
  initial begin
    for (int i = 0; i < 1024; i++) img[i] = 8'hFF;
    for (int i = 0; i < 32; i++) img[i] = 8'h00;
    img[32] = 8'h80; img[33] = 8'hDE;                               // SJMP
    for (int i = 0; i < 16; i++) begin img[256+2*i] = 8'h74; img[257+2*i] = 8'(i + 1); end
    img[288] = 8'h80; img[289] = 8'hDF;
    for (int i = 0; i < 16; i++) begin
      img[513+3*i] = 8'h75; img[514+3*i] = 8'(8'h30 + i); img[515+3*i] = 8'(8'h90 - i);
    end
    img[561] = 8'h80; img[562] = 8'hCC;
    for (int i = 0; i < 10; i++) img[768+i] = 8'h00;
    img[778] = 8'h02; img[779] = 8'h03; img[780] = 8'h10;            // LJMP 310h
    img[784] = 8'h83; img[785] = 8'h00; img[786] = 8'h00;            // MOVC A,@A+PC; NOP; NOP
    img[787] = 8'h80; img[788] = 8'hFE;                              // SJMP
    img[1009] = 8'hA7;                                               // the code byte read
  end

  // ---- stream checker ----
  int   cyc = 0;
  int   nop_c[$], mov2_c[$], mov3_c[$];
  logic [15:0] last_pc;
  int   last_len;
  int   irq_seen = 0, branches = 0, spec_viol = 0, n_acc = 0;
  logic [15:0] expect_pc = 0;
  logic        br_open = 0;           // a jump opcode has been routed, no reply yet
  int          br_last_pair = 0;      // last pair holding that jump's bytes
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    // no read beyond the last pair of a routed jump (SJMP 80h, LJMP 02h)
    if (br_open && !flush && mem_req && int'(mem_pair) > br_last_pair) begin
      spec_viol++; $display("read %h past the jump ending in pair %h", mem_pair, br_last_pair);
    end
    if (flush) br_open <= 0;
    for (int l = 0; l < 2; l++)
      if (head_valid[l] && route[l] == RT_I1 && head_byte[l] inside {8'h80, 8'h02}) begin
        br_open <= 1;
        br_last_pair <= (int'(head_addr[l]) + (head_byte[l] == 8'h02 ? 2 : 1)) / 2;
      end
    // opcode routing times, for the rate checks
    for (int l = 0; l < 2; l++)
      if (head_valid[l] && route[l] == RT_I1) begin
        if (head_addr[l] < 16'd32 && branches == 0) nop_c.push_back(cyc);
        else if (head_addr[l] >= 16'd256 && head_addr[l] < 16'd288) mov2_c.push_back(cyc);
        else if (head_addr[l] >= 16'd513 && head_addr[l] < 16'd561) mov3_c.push_back(cyc);
      end
    if (acc_valid) begin
      n_acc++;
      check(acc_data == img[1009], $sformatf("code byte %h", acc_data));
    end
    if (i2_valid) check(i2_data == img[10'(last_pc + 1)], $sformatf("byte 2 of %h", last_pc));
    if (i3_valid) check(i3_data == img[10'(last_pc + 2)], $sformatf("byte 3 of %h", last_pc));
    if (i1_valid) begin
      if (i1_data.irq) begin
        irq_seen++;
        check(i1_data.pc == expect_pc, $sformatf("irq return pc %h, want %h", i1_data.pc, expect_pc));
      end else begin
        check(i1_data.pc == expect_pc, $sformatf("opcode pc %h, want %h", i1_data.pc, expect_pc));
        check(i1_data.op == img[i1_data.pc[9:0]], $sformatf("opcode at %h", i1_data.pc));
        last_pc  = i1_data.pc;
        last_len = int'(op_len(i1_data.op));
        expect_pc = i1_data.pc + 16'(last_len);
      end
    end
    if (waiting && !flush && mem_req && mem_pair > 12'(expect_pc[12:1])) begin spec_viol++; $display("read %h while waiting, expect_pc %h", mem_pair, expect_pc); end
  end

  // ---- branch unit and interrupt source played by the testbench ----
  logic        guess_armed = 0;
  assign ig_valid = 1'b1;
  assign ig       = guess_armed && pc == 16'h0304;
  always @(posedge clk) if (ig_req && ig) guess_armed <= 0;

  task automatic reply(input logic [15:0] target);
    do @(negedge clk); while (!br_ready);
    repeat (2) @(negedge clk);
    br_valid = 1; br_pc = target;
    @(negedge clk);
    br_valid = 0;
    expect_pc = target;
    branches++;
  endtask
  // MOVC: answer with a code address; the program continues in sequence
  task automatic code_reply(input logic [15:0] addr);
    do @(negedge clk); while (!br_ready);
    br_valid = 1; br_pc = addr; br_code = 1;
    @(negedge clk);
    br_valid = 0; br_code = 0;
  endtask

  initial begin
    int t0;
    br_valid = 0; br_pc = 0; br_code = 0;
    // load the image through the write port while in reset
    for (int i = 0; i < 1024; i++) begin
      wr_en <= 1; wr_addr <= 13'(i); wr_data <= img[i];
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    rst_n <= 1;
    reply(16'h0100);
    reply(16'h0201);
    guess_armed = 1;
    reply(16'h0300);
    // interrupt pseudo-instruction: not taken, resume at the same PC
    reply(16'h0304);
    reply(16'h0310);
    code_reply(16'h03F1);
    reply(16'h0000);
    repeat (5) @(posedge clk);

    check(nop_c.size() == 32, $sformatf("NOP opcodes %0d", nop_c.size()));
    for (int i = 1; i < nop_c.size(); i++) check(nop_c[i] - nop_c[i-1] == 1, "1-byte rate");
    check(mov2_c.size() == 16, "2-byte opcodes");
    for (int i = 1; i < mov2_c.size(); i++) check(mov2_c[i] - mov2_c[i-1] == 1, "2-byte rate");
    check(mov3_c.size() == 16, "3-byte opcodes");
    for (int i = 1; i < mov3_c.size(); i++) check(mov3_c[i] - mov3_c[i-1] == 2, "3-byte rate");
    check(irq_seen == 1, "one interrupt pseudo-instruction");
    check(spec_viol == 0, "no read past a branch");
    check(n_acc == 1, $sformatf("one code byte on the A channel, saw %0d", n_acc));
    $display("fetch rates: NOP %0d opc in %0d clk, 2-byte %0d in %0d, 3-byte %0d in %0d",
             nop_c.size(), nop_c[$] - nop_c[0] + 1, mov2_c.size(), mov2_c[$] - mov2_c[0] + 1,
             mov3_c.size(), mov3_c[$] - mov3_c[0] + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two-instruction pattern at 201h: record which addresses are routed per clock
  int pat [4][2];
  int pat_n = 0;
  always @(posedge clk) if (rst_n && pat_n < 4) begin
    int k;
    int row [2];
    k = 0;
    row = '{-1, -1};
    for (int l = 0; l < 2; l++)
      if (head_valid[l] && route[l] >= RT_I1 && head_addr[l] >= 16'h201 && head_addr[l] <= 16'h206)
        row[k++] = int'(head_addr[l]);
    if (k == 2 && row[0] > row[1]) begin k = row[0]; row[0] = row[1]; row[1] = k; k = 2; end
    if (k > 0) begin pat[pat_n] = row; pat_n <= pat_n + 1; end
  end
  final begin end
  initial begin
    wait (pat_n == 4);
    // clock 0: opcode I0.1 alone; 1: I0.2 + I0.3; 2: I1.1 alone; 3: I1.2 + I1.3
    for (int i = 0; i < 4; i++) $display("pattern clock %0d: %h %h", i, pat[i][0], pat[i][1]);
    check(pat[0][0] == 'h201 && pat[0][1] == -1, "pattern clock 0");
    check(pat[1][0] == 'h202 && pat[1][1] == 'h203, "pattern clock 1");
    check(pat[2][0] == 'h204 && pat[2][1] == -1, "pattern clock 2");
    check(pat[3][0] == 'h205 && pat[3][1] == 'h206, "pattern clock 3");
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

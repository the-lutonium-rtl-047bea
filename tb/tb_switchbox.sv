// tb_switchbox: random but legal traffic: pairs arrive whenever both lanes
// have room, each lane head gets a random route (keep, discard, instr_1/2/3,
// accumulator) to a free and unshared destination, interrupt inserts and
// flushes happen now and then, and the consumers stall at random. Lane
// contents (with their byte addresses) and the four output registers are
// compared every clock with queues and registers kept by the testbench.
module tb_switchbox;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic mem_valid = 0, irq_ins = 0, flush = 0;
  logic [11:0] mem_pair = 0;
  logic [7:0] mem_byte0 = 0, mem_byte1 = 0;
  logic [1:0] head_valid;
  logic [15:0] head_addr [2];
  logic [7:0] head_byte [2];
  logic [1:0] lane_count [2];
  logic [2:0] route [2];
  logic [15:0] irq_pc = 0;
  logic [2:0] pc_hi = 3'd0;
  logic i1_free, i2_free, i3_free, acc_free;
  logic i1_valid, i1_ready = 0, i2_valid, i2_ready = 0, i3_valid, i3_ready = 0;
  logic acc_valid, acc_ready = 0;
  instr1_t i1_data;
  logic [7:0] i2_data, i3_data, acc_data;
  switchbox dut (.*);

  // model
  logic [23:0] lane [2][$];       // {addr, byte}
  logic        mv [4];            // output registers: i1, i2, i3, acc
  logic [24:0] md [4];
  int n_route [6];

  initial begin
    route = '{3'd0, 3'd0};
    for (int k = 0; k < 4; k++) begin mv[k] = 0; md[k] = '0; end
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      logic [3:0] used;
      logic [3:0] rdy, to;
      logic [24:0] nd [4];
      logic ins;
      rdy = 4'($urandom);
      {acc_ready, i3_ready, i2_ready, i1_ready} = rdy;
      flush = ($urandom_range(0, 60) == 0);
      used = '0; to = '0;
      ins = 0;
      for (int l = 0; l < 2; l++) begin
        int r;
        route[l] = RT_KEEP;
        if (lane[l].size() > 0) begin
          r = $urandom_range(0, 5);
          if (r >= RT_I1) begin
            int k;
            k = r - RT_I1;
            if (used[k] || (mv[k] && !rdy[k])) r = RT_KEEP;
          end
          route[l] = 3'(r);
          if (r >= RT_I1) begin
            used[r - RT_I1] = 1; to[r - RT_I1] = 1;
            nd[r - RT_I1] = (r == RT_I1) ? {1'b0, lane[l][0]} : {17'd0, lane[l][0][7:0]};
            if (r == RT_I1) nd[0] = {1'b0, lane[l][0][23:8], lane[l][0][7:0]};
          end
        end
      end
      if (!used[0] && (!mv[0] || rdy[0]) && $urandom_range(0, 20) == 0) begin
        ins = 1; irq_pc = 16'($urandom); to[0] = 1; nd[0] = {1'b1, irq_pc, 8'h00};
      end
      irq_ins = ins;
      // pairs: room after this clock's pops
      mem_valid = 0;
      if ($urandom_range(0, 2) != 0) begin
        int c0, c1;
        c0 = lane[0].size() - int'(route[0] != RT_KEEP && lane[0].size() > 0);
        c1 = lane[1].size() - int'(route[1] != RT_KEEP && lane[1].size() > 0);
        if (c0 < 3 && c1 < 3) begin
          mem_valid = 1; mem_pair = 12'($urandom); mem_byte0 = 8'($urandom); mem_byte1 = 8'($urandom);
        end
      end
      #1;
      // lane heads
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (head_valid[l] != (lane[l].size() > 0) ||
            (lane[l].size() > 0 && {head_addr[l], head_byte[l]} != lane[l][0])) begin
          failures++; $display("FAIL lane %0d head, cycle %0d", l, i);
        end
      end
      @(posedge clk);
      if (flush) begin
        lane[0].delete(); lane[1].delete();
      end else begin
        for (int l = 0; l < 2; l++) if (route[l] != RT_KEEP && lane[l].size() > 0) begin
          void'(lane[l].pop_front()); n_route[route[l]]++;
        end
        if (mem_valid) begin
          lane[0].push_back({pc_hi, mem_pair, 1'b0, mem_byte0});
          lane[1].push_back({pc_hi, mem_pair, 1'b1, mem_byte1});
        end
      end
      for (int k = 0; k < 4; k++) begin
        if (to[k]) begin mv[k] = 1; md[k] = nd[k]; end
        else if (rdy[k]) mv[k] = 0;
      end
      @(negedge clk);
      checks++;
      if (i1_valid != mv[0] || i2_valid != mv[1] || i3_valid != mv[2] || acc_valid != mv[3] ||
          (mv[0] && i1_data != md[0]) || (mv[1] && i2_data != md[1][7:0]) ||
          (mv[2] && i3_data != md[2][7:0]) || (mv[3] && acc_data != md[3][7:0])) begin
        failures++; $display("FAIL outputs, cycle %0d", i);
      end
    end
    checks++;
    for (int r = 1; r < 6; r++) if (n_route[r] == 0) begin
      failures++; $display("FAIL route %0d never used", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

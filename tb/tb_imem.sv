// tb_imem: fills all 8 kB through the byte write port with random data,
// then reads every pair in random order (one request per clock) and checks
// data, returned pair index and the one-clock latency.
module tb_imem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req_valid = 0, rsp_valid, wr_en = 0;
  logic [11:0] req_pair = 0, rsp_pair;
  logic [7:0] rsp_byte0, rsp_byte1, wr_data = 0;
  logic [12:0] wr_addr = 0;
  imem dut (.*);
  logic [7:0] m [8192];
  int order [4096];
  int expect_q [$];

  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) begin
      int p;
      checks++;
      if (expect_q.size() == 0) begin failures++; $display("FAIL unexpected response"); end
      else begin
        p = expect_q.pop_front();
        if (int'(rsp_pair) != p || rsp_byte0 != m[2 * p] || rsp_byte1 != m[2 * p + 1]) begin
          failures++; $display("FAIL pair %h: got %h %h%h", p, rsp_pair, rsp_byte1, rsp_byte0);
        end
      end
    end
    if (req_valid) expect_q.push_back(int'(req_pair));
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 8192; a++) begin
      m[a] = 8'($urandom);
      wr_en = 1; wr_addr = 13'(a); wr_data = m[a];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 4096; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 4096; i++) begin
      req_valid = ($urandom_range(0, 3) != 0);
      req_pair = 12'(order[i]);
      if (!req_valid) i--;
      @(negedge clk);
    end
    req_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("FAIL missing responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

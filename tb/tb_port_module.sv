// tb_port_module: latch/direction writes and pin behaviour. With direction
// 0 a pin is quasi-bidirectional (drives only a 0, otherwise floats high);
// with direction 1 it is a push-pull output. Pin levels come back through
// a two-flop synchronizer.
module tb_port_module;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we_latch = 0, we_dir = 0;
  logic [7:0] wdata = 0, latch, dir, pin_value, pin_in = 8'hFF, pin_out, pin_oe;
  port_module dut (.*);
  logic [7:0] m_latch = 8'hFF, m_dir = 0;
  logic [7:0] hist [3];

  initial begin
    @(negedge clk);
    checks++;
    if (latch != 8'hFF || dir != 0 || pin_oe != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    hist = '{8'hFF, 8'hFF, 8'hFF};
    for (int i = 0; i < 2000; i++) begin
      we_latch = 1'($urandom); we_dir = 1'($urandom); wdata = 8'($urandom);
      pin_in = 8'($urandom);
      @(posedge clk);
      if (we_latch) m_latch = wdata;
      if (we_dir) m_dir = wdata;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = pin_in;
      @(negedge clk);
      checks++;
      if (latch != m_latch || dir != m_dir) begin failures++; $display("FAIL regs"); end
      for (int b = 0; b < 8; b++) begin
        // driven: every push-pull pin, and quasi pins holding 0
        logic drv;
        drv = m_dir[b] || !m_latch[b];
        checks++;
        if (pin_oe[b] != drv || (drv && pin_out[b] != m_latch[b])) begin
          failures++; $display("FAIL pin %0d oe %b out %b latch %b dir %b", b, pin_oe[b],
                               pin_out[b], m_latch[b], m_dir[b]);
        end
      end
      checks++;
      if (pin_value != hist[1]) begin failures++; $display("FAIL sync %h want %h", pin_value, hist[1]); end
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

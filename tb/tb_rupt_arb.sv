// tb_rupt_arb: random IRUPT traffic and interrupt-guess requests against a
// model of the arbiter's CHP: each guess request probes IRUPT; a pending
// non-sleep message gives a true guess and is consumed, no message gives a
// false guess, a sleep message is consumed with no guess and the arbiter
// then waits for the next message.
module tb_rupt_arb;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic irupt_valid = 0, irupt_ready, ig_req = 0, ig_valid, ig, sleeping;
  irupt_msg_e irupt_msg = IRUPT_OTHER;
  rupt_arb dut (.*);
  int m_asleep = 0, n_true = 0, n_sleep = 0, n_wake = 0, taken = 0;

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int e_ready, e_igv, e_ig;
      if (!irupt_valid || taken) begin
        irupt_valid = ($urandom_range(0, 3) == 0);
        irupt_msg = ($urandom_range(0, 4) == 0) ? IRUPT_SLEEP : IRUPT_OTHER;
      end
      ig_req = 1'($urandom);
      #1;
      if (m_asleep) begin e_ready = 0; e_igv = 0; e_ig = 0; end
      else begin
        e_ready = ig_req && irupt_valid;
        e_igv = !(irupt_valid && irupt_msg == IRUPT_SLEEP);
        e_ig = irupt_valid && irupt_msg == IRUPT_OTHER;
      end
      checks++;
      if (int'(irupt_ready) != e_ready || int'(ig_valid) != e_igv || (e_igv && int'(ig) != e_ig)
          || int'(sleeping) != m_asleep) begin
        failures++;
        $display("FAIL cycle %0d: rdy %b igv %b ig %b slp %b want %0d %0d %0d %0d", i,
                 irupt_ready, ig_valid, ig, sleeping, e_ready, e_igv, e_ig, m_asleep);
      end
      @(posedge clk);
      taken = e_ready;
      if (m_asleep && irupt_valid) begin m_asleep = 0; n_wake++; end
      else if (e_ready && irupt_msg == IRUPT_SLEEP) begin m_asleep = 1; n_sleep++; end
      else if (e_ready) n_true++;
      @(negedge clk);
    end
    checks++;
    if (n_true == 0 || n_sleep == 0 || n_wake == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

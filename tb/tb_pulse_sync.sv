// tb_pulse_sync: random asynchronous-looking pin waveform (levels held
// for a random number of half clocks). Every falling edge must give
// exactly one tick, 2..4 clocks after the edge; with the consumer stalled
// a second edge must raise the lost flag.
module tb_pulse_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pin = 1, tick_valid, tick_ready = 1, lost;
  pulse_sync dut (.*);
  int edges = 0, ticks = 0;
  longint t_edge [$];

  always @(negedge pin) if (rst_n) begin edges++; t_edge.push_back($time); end
  always @(posedge clk) if (rst_n && tick_valid && tick_ready) begin
    longint d;
    ticks++;
    checks++;
    d = $time - t_edge.pop_front();
    if (d < 10 || d > 40) begin failures++; $display("FAIL tick delay %0d", d); end
  end

  initial begin
    #23 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      #(10 * $urandom_range(3, 8) + $urandom_range(0, 9));
      pin = ~pin;
    end
    pin = 1;
    #100;
    checks++;
    if (edges != ticks || lost) begin
      failures++; $display("FAIL edges %0d ticks %0d lost %b", edges, ticks, lost);
    end
    // stalled consumer: two edges, one must be reported lost
    @(negedge clk); tick_ready = 0;
    pin = 0; #60 pin = 1; #60 pin = 0; #60 pin = 1; #60;
    checks++;
    if (!tick_valid || !lost) begin failures++; $display("FAIL lost not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

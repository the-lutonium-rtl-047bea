// tb_timer: timers 0 and 1 side by side on one SFR port, in all modes,
// counting ticks from either input, with random SFR writes and flag clears,
// against reference counters kept here. Checks that each timer uses its own
// TMOD nibble, TCON bits and TLx/THx addresses, and that only timer 0
// answers TMOD reads.
module tb_timer;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] pin_tick_valid = 0, pin_tick_ready, tf, tr, clr_tf = 0, sfr_hit;
  logic clk_tick_valid = 0;
  logic [1:0] clk_tick_ready;
  logic sfr_we = 0;
  logic [7:0] sfr_waddr = 0, sfr_wdata = 0, sfr_raddr = 0;
  logic [7:0] sfr_rdata [2];
  timer #(.IDX(0)) dut0 (.clk, .rst_n, .pin_tick_valid(pin_tick_valid[0]), .pin_tick_ready(pin_tick_ready[0]),
                         .clk_tick_valid, .clk_tick_ready(clk_tick_ready[0]), .sfr_we, .sfr_waddr, .sfr_wdata,
                         .sfr_raddr, .sfr_rdata(sfr_rdata[0]), .sfr_hit(sfr_hit[0]),
                         .tf(tf[0]), .tr(tr[0]), .clr_tf(clr_tf[0]));
  timer #(.IDX(1)) dut1 (.clk, .rst_n, .pin_tick_valid(pin_tick_valid[1]), .pin_tick_ready(pin_tick_ready[1]),
                         .clk_tick_valid, .clk_tick_ready(clk_tick_ready[1]), .sfr_we, .sfr_waddr, .sfr_wdata,
                         .sfr_raddr, .sfr_rdata(sfr_rdata[1]), .sfr_hit(sfr_hit[1]),
                         .tf(tf[1]), .tr(tr[1]), .clr_tf(clr_tf[1]));
  int m_tmod = 0;
  int m_tl [2], m_th [2], m_tf [2], m_tr [2];
  logic [7:0] a_tl [2], a_th [2];

  task automatic rd(input int k, input logic [7:0] a, input int want, input logic hit, input string name);
    sfr_raddr = a; #1;
    checks++;
    if (sfr_hit[k] != hit || (hit && int'(sfr_rdata[k]) != want)) begin
      failures++; $display("FAIL t=%0t timer%0d %s = %h hit %b want %h (tmod %h)", $time, k, name, sfr_rdata[k], sfr_hit[k], want, m_tmod);
    end
  endtask

  initial begin
    a_tl[0] = SFR_TL0; a_th[0] = SFR_TH0; a_tl[1] = SFR_TL1; a_th[1] = SFR_TH1;
    for (int k = 0; k < 2; k++) begin m_tl[k] = 0; m_th[k] = 0; m_tf[k] = 0; m_tr[k] = 0; end
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int tick [2];
      int mode, sel;
      pin_tick_valid = 2'($urandom); clk_tick_valid = 1'($urandom);
      clr_tf[0] = ($urandom_range(0, 30) == 0);
      clr_tf[1] = ($urandom_range(0, 30) == 0);
      sfr_we = ($urandom_range(0, 30) == 0);
      sel = $urandom_range(0, 5);
      sfr_waddr = sel == 0 ? SFR_TMOD : sel == 1 ? SFR_TCON : sel == 2 ? SFR_TL0 :
                  sel == 3 ? SFR_TH0 : sel == 4 ? SFR_TL1 : SFR_TH1;
      sfr_wdata = 8'($urandom);
      if (sel >= 2) sfr_wdata = 8'($urandom_range(240, 255));
      if (sel == 1) begin
        sfr_wdata[4] = ($urandom_range(0, 3) != 0);
        sfr_wdata[6] = ($urandom_range(0, 3) != 0);
      end
      if (sel == 0) begin
        sfr_wdata[1:0] = 2'($urandom_range(0, 2));
        sfr_wdata[5:4] = 2'($urandom_range(0, 2));
      end
      // reference
      for (int k = 0; k < 2; k++) begin
        mode = (m_tmod >> (4 * k)) % 16;
        tick[k] = m_tr[k] && ((mode & 4) != 0 ? int'(pin_tick_valid[k]) : int'(clk_tick_valid));
      end
      @(posedge clk);
      for (int k = 0; k < 2; k++) begin
        mode = (m_tmod >> (4 * k)) % 16;
        if (tick[k]) begin
          case (mode % 4)
            2: if (m_tl[k] == 255) begin m_tl[k] = m_th[k]; m_tf[k] = 1; end else m_tl[k]++;
            0: begin
              if (m_tl[k] % 32 == 31) begin
                m_tl[k] = m_tl[k] - 31;
                if (m_th[k] == 255) m_tf[k] = 1;
                m_th[k] = (m_th[k] + 1) % 256;
              end else m_tl[k]++;
            end
            default: begin
              int v;
              v = m_th[k] * 256 + m_tl[k] + 1;
              if (v == 65536) begin m_tf[k] = 1; v = 0; end
              m_th[k] = v / 256; m_tl[k] = v % 256;
            end
          endcase
        end
        if (clr_tf[k]) m_tf[k] = 0;
        if (sfr_we) begin
          if (sfr_waddr == a_tl[k]) m_tl[k] = int'(sfr_wdata);
          if (sfr_waddr == a_th[k]) m_th[k] = int'(sfr_wdata);
          if (sfr_waddr == SFR_TCON) begin
            m_tf[k] = int'(sfr_wdata[5 + 2 * k]); m_tr[k] = int'(sfr_wdata[4 + 2 * k]);
          end
        end
      end
      if (sfr_we && sfr_waddr == SFR_TMOD) m_tmod = int'(sfr_wdata);
      @(negedge clk);
      sfr_we = 0; clr_tf = 0;
      for (int k = 0; k < 2; k++) begin
        rd(k, a_tl[k], m_tl[k], 1'b1, "TL"); rd(k, a_th[k], m_th[k], 1'b1, "TH");
        rd(k, SFR_TMOD, m_tmod, k == 0, "TMOD");
        rd(k, a_tl[1 - k], 0, 1'b0, "other TL");
        checks++;
        if (int'(tf[k]) != m_tf[k] || int'(tr[k]) != m_tr[k]) begin
          failures++; $display("FAIL timer%0d TF/TR %b%b want %0d%0d", k, tf[k], tr[k], m_tf[k], m_tr[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

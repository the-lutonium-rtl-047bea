// timer: one timer/counter (0 or 1) of the peripheral interface.
//
// Counts Tick messages, not a clock: with C/T set in its TMOD nibble it
// counts pulses of its pin (T0 = P3.4, T1 = P3.5), otherwise of the CLOCK
// input pin, each delivered by a pulse synchronizer. With no tick nothing
// switches, and it keeps counting while the CPU sleeps. TRx enables
// counting. Mode 1 (M1:M0=01) is a 16-bit counter THx:TLx, mode 2 (10) an
// 8-bit counter TLx reloaded from THx, mode 0 a 13-bit counter (TLx[4:0]);
// mode 3 is treated as mode 1. An overflow sets TFx, which the interrupt
// registers see and clear when the interrupt is taken. IDX selects the
// timer: its TLx/THx addresses, its TMOD nibble (0: [3:0], 1: [7:4]) and its
// TCON bits (0: TF0/TR0 = bits 5/4, 1: TF1/TR1 = bits 7/6). Both instances
// keep a copy of TMOD; only timer 0 answers TMOD reads. SFR writes take
// effect at the clock edge; reads are combinational.
// Gating (TMOD.GATE) is not built. That counters run from pins and keep
// counting in deep sleep is from the original; the register map and modes
// are the standard 8051 ones.
module timer
  import lut_pkg::*;
#(
  parameter int IDX = 0               // 0: timer 0, 1: timer 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pin_tick_valid,    // from the Tx-pin synchronizer
  output logic       pin_tick_ready,
  input  logic       clk_tick_valid,    // from the CLOCK-pin synchronizer
  output logic       clk_tick_ready,
  // SFR port
  input  logic       sfr_we,
  input  logic [7:0] sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic [7:0] sfr_raddr,
  output logic [7:0] sfr_rdata,
  output logic       sfr_hit,
  // flags
  output logic       tf,
  output logic       tr,
  input  logic       clr_tf
);
  localparam logic [7:0] A_TL = IDX == 0 ? SFR_TL0 : SFR_TL1;
  localparam logic [7:0] A_TH = IDX == 0 ? SFR_TH0 : SFR_TH1;
  localparam int         B_TR = IDX == 0 ? 4 : 6;

  logic [7:0] tmod, tl, th;
  logic [3:0] mode;
  logic       ct, tick;

  assign mode           = IDX == 0 ? tmod[3:0] : tmod[7:4];
  assign ct             = mode[2];
  assign pin_tick_ready = 1'b1;
  assign clk_tick_ready = 1'b1;
  assign tick           = tr && (ct ? pin_tick_valid : clk_tick_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmod <= '0; tl <= '0; th <= '0; tf <= 1'b0; tr <= 1'b0;
    end else begin
      if (tick) begin
        case (mode[1:0])
          2'b10: begin
            if (tl == 8'hFF) begin tl <= th; tf <= 1'b1; end
            else tl <= tl + 8'd1;
          end
          2'b00: begin
            if (tl[4:0] == 5'h1F) begin
              tl[4:0] <= '0;
              th <= th + 8'd1;
              if (th == 8'hFF) tf <= 1'b1;
            end else tl[4:0] <= tl[4:0] + 5'd1;
          end
          default: begin
            {th, tl} <= {th, tl} + 16'd1;
            if ({th, tl} == 16'hFFFF) tf <= 1'b1;
          end
        endcase
      end
      if (clr_tf) tf <= 1'b0;
      if (sfr_we) begin
        if (sfr_waddr == SFR_TMOD) tmod <= sfr_wdata;
        if (sfr_waddr == A_TL) tl <= sfr_wdata;
        if (sfr_waddr == A_TH) th <= sfr_wdata;
        if (sfr_waddr == SFR_TCON) begin tf <= sfr_wdata[B_TR+1]; tr <= sfr_wdata[B_TR]; end
      end
    end
  end

  always_comb begin
    sfr_hit = 1'b1;
    if (sfr_raddr == SFR_TMOD && IDX == 0) sfr_rdata = tmod;
    else if (sfr_raddr == A_TL)            sfr_rdata = tl;
    else if (sfr_raddr == A_TH)            sfr_rdata = th;
    else begin sfr_rdata = '0; sfr_hit = 1'b0; end
  end
endmodule

// prdm: PRDM, the port-register side of the CPU's peripheral interface.
//
// Answers the SFR accesses to ports P1 and P3 and their direction
// registers P1DIR/P3DIR, each served by a port_module. A read of P1/P3
// returns the synchronized pin levels, a read of a direction register its
// contents. The CPU-side role of PRDM is the original's; the register
// addresses of the direction registers and the choice of ports (P1 and P3;
// P0/P2 carry the external-memory interface, not built here) are this
// design's.
module prdm
  import lut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sfr_we,
  input  logic [7:0] sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic [7:0] sfr_raddr,
  output logic [7:0] sfr_rdata,
  output logic       sfr_hit,
  input  logic [7:0] p1_in,
  output logic [7:0] p1_out,
  output logic [7:0] p1_oe,
  input  logic [7:0] p3_in,
  output logic [7:0] p3_out,
  output logic [7:0] p3_oe
);
  logic [7:0] l1, d1, v1, l3, d3, v3;

  port_module u_p1 (.clk, .rst_n,
    .we_latch(sfr_we && sfr_waddr == SFR_P1), .we_dir(sfr_we && sfr_waddr == SFR_P1DIR),
    .wdata(sfr_wdata), .latch(l1), .dir(d1), .pin_value(v1),
    .pin_in(p1_in), .pin_out(p1_out), .pin_oe(p1_oe));
  port_module u_p3 (.clk, .rst_n,
    .we_latch(sfr_we && sfr_waddr == SFR_P3), .we_dir(sfr_we && sfr_waddr == SFR_P3DIR),
    .wdata(sfr_wdata), .latch(l3), .dir(d3), .pin_value(v3),
    .pin_in(p3_in), .pin_out(p3_out), .pin_oe(p3_oe));

  always_comb begin
    sfr_hit = 1'b1;
    case (sfr_raddr)
      SFR_P1:    sfr_rdata = v1;
      SFR_P1DIR: sfr_rdata = d1;
      SFR_P3:    sfr_rdata = v3;
      SFR_P3DIR: sfr_rdata = d3;
      default:   begin sfr_rdata = '0; sfr_hit = 1'b0; end
    endcase
  end
endmodule

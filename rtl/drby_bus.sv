// drby_bus: DRBY, the segmented direct-read bus.
//
// Carries one operand from a selected source register (register file, A, B,
// PSW, DPL, DPH, SP, interrupt registers, port registers) to a selected
// execution unit (Exchange, FBlock, ALU, BitUnit, PCL, PCH, data memory).
// Instead of one wide 9-to-7 crossbar it is a tree of small stages placed by
// use frequency, so a common transfer crosses fewer stages:
//   AltMerge  : RuptRegs / PRDM / SP / DPH          -> RegMerge
//   RegMerge  : A / B / PSW / DPL / AltMerge        -> Main
//   Main      : RegFile / RegMerge -> Exchange / ExecSplit
//   ExecSplit : -> ALU / FBlock / PCL / PCH / BitUnit / DMem
// RegFile to Exchange, the most common case, crosses Main only. The control
// is segmented: Main always receives its two bits, the other stages their
// fields only when the transfer passes through them (drby_encode in lut_pkg).
//
// Tree shape and control follow the original design; the data-memory
// destination, which the bus specification lists but the tree drawing does
// not place, hangs off ExecSplit here. Clocked timing (this design's): each
// stage is a register, so a transfer takes 1 to 4 clocks from the clock in
// which its control is accepted (source data present), and one transfer is
// in flight at a time: ctrl_ready is low until its output has been taken.
// All channels are valid/ready.
module drby_bus
  import lut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl_valid,
  input  drby_ctrl_t ctrl,
  output logic       ctrl_ready,
  input  logic [NSRC-1:0] in_valid,
  input  logic [7:0]      in_data [NSRC],
  output logic [NSRC-1:0] in_ready,
  output logic [NDST-1:0] out_valid,
  output logic [7:0]      out_data [NDST],
  input  logic [NDST-1:0] out_ready,
  output logic [1:0]      last_stages_minus1  // stages used by the last transfer, minus 1
);
  drby_ctrl_t c_q, c;
  logic busy, active;
  logic am_v, rm_v, main_v;
  logic [7:0] am_q, rm_q, main_q;
  logic am_done, rm_done, main_done;

  assign ctrl_ready = !busy;
  assign active     = busy || ctrl_valid;
  assign c          = busy ? c_q : ctrl;

  function automatic int am_src(input am_sel_e s);
    case (s)
      AM_RUPT: return int'(SRC_RUPTREGS);
      AM_PRDM: return int'(SRC_PRDM);
      AM_SP:   return int'(SRC_SP);
      default: return int'(SRC_DPH);
    endcase
  endfunction
  function automatic int rm_src(input rm_sel_e s);
    case (s)
      RM_A:    return int'(SRC_A);
      RM_B:    return int'(SRC_B);
      RM_PSW:  return int'(SRC_PSW);
      default: return int'(SRC_DPL);
    endcase
  endfunction
  function automatic int es_dst(input es_sel_e s);
    case (s)
      ES_ALU:     return int'(DST_ALU);
      ES_FBLOCK:  return int'(DST_FBLOCK);
      ES_PCL:     return int'(DST_PCL);
      ES_PCH:     return int'(DST_PCH);
      ES_BITUNIT: return int'(DST_BITUNIT);
      default:    return int'(DST_DMEM);
    endcase
  endfunction

  logic need_am, need_rm, need_es;
  logic am_fire, rm_fire, main_fire, es_fire, finish;
  logic [7:0] rm_in, main_in;
  int   ai, ri, ei;

  always_comb begin
    need_am = c.main_src_other && c.rm_from_alt;
    need_rm = c.main_src_other;
    need_es = c.main_dst_other;
    ai = am_src(c.am_sel);
    ri = rm_src(c.rm_sel);
    ei = es_dst(c.es_sel);
    in_ready = '0;

    am_fire = active && need_am && !am_done && in_valid[ai];
    if (am_fire) in_ready[ai] = 1'b1;

    rm_fire = active && need_rm && !rm_done && (c.rm_from_alt ? am_v : in_valid[ri]);
    rm_in   = c.rm_from_alt ? am_q : in_data[ri];
    if (rm_fire && !c.rm_from_alt) in_ready[ri] = 1'b1;

    main_fire = active && !main_done &&
                (c.main_src_other ? rm_v : in_valid[SRC_REGFILE]) &&
                (c.main_dst_other || !out_valid[DST_EXCHANGE]);
    main_in   = c.main_src_other ? rm_q : in_data[SRC_REGFILE];
    if (main_fire && !c.main_src_other) in_ready[SRC_REGFILE] = 1'b1;

    es_fire = active && need_es && main_v && !out_valid[ei];
    finish  = need_es ? es_fire : main_fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; c_q <= '0;
      am_v <= 1'b0; rm_v <= 1'b0; main_v <= 1'b0;
      am_done <= 1'b0; rm_done <= 1'b0; main_done <= 1'b0;
      am_q <= '0; rm_q <= '0; main_q <= '0;
      out_valid <= '0;
      last_stages_minus1 <= '0;
      for (int d = 0; d < NDST; d++) out_data[d] <= '0;
    end else begin
      if (!busy && ctrl_valid) begin busy <= 1'b1; c_q <= ctrl; end
      out_valid <= out_valid & ~out_ready;
      if (am_fire) begin am_v <= 1'b1; am_q <= in_data[ai]; am_done <= 1'b1; end
      if (rm_fire) begin rm_v <= 1'b1; rm_q <= rm_in; rm_done <= 1'b1; if (c.rm_from_alt) am_v <= 1'b0; end
      if (main_fire) begin
        main_done <= 1'b1;
        if (c.main_src_other) rm_v <= 1'b0;
        if (c.main_dst_other) begin main_v <= 1'b1; main_q <= main_in; end
        else begin out_valid[DST_EXCHANGE] <= 1'b1; out_data[DST_EXCHANGE] <= main_in; end
      end
      if (es_fire) begin
        main_v <= 1'b0;
        out_valid[ei] <= 1'b1;
        out_data[ei]  <= main_q;
      end
      if (finish) begin
        busy <= 1'b0;
        am_done <= 1'b0; rm_done <= 1'b0; main_done <= 1'b0;
        last_stages_minus1 <= 2'(int'(need_am) + int'(need_rm) + int'(need_es));
      end
    end
  end

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready))
    else $error("drby_bus: two sources taken at once");
endmodule

// lut_core: Decode, Sequencer and the execution side of the microcontroller.
//
// Instructions arrive from the SwitchBox on three channels: the opcode
// (instr_1, or an interrupt pseudo-instruction inserted by Fetch) first,
// then the second and third bytes (instr_2, instr_3) as they exist. The
// opcode is taken into a register of its own as soon as it arrives, so the
// opcode of the next instruction can come in the same clock as the last
// operand of the current one (opcode first, operand bytes about a clock
// later, as in the original decoder).
//
// An instruction whose operand is a register, a RAM byte or an SFR gets it
// over the DRBY segmented bus (drby_bus): the decoder names the source bank
// (register file, A, B, PSW, DPL, DPH, SP, interrupt registers, port
// registers) and the destination unit (Exchange for moves and exchanges,
// ALU, BitUnit, PCH/PCL for returns, DMem for pushes), and the bus takes 1
// to 4 clocks depending on how common the pair is. Immediate operands and
// the accumulator reach the units on their own paths. Special registers (A,
// B, PSW, SP, DPTR) are kept here with their own update logic, e.g. DPTR
// increments in one step without the bus.
//
// The Sequencer runs the few two-step instructions: LCALL/ACALL and a taken
// interrupt push the return address in two register-file writes, RET/RETI
// pop it in two bus reads. For an interrupt pseudo-instruction the
// interrupt registers decide whether the interrupt is really taken; if not,
// execution resumes at the same address. Every branch-type instruction and
// pseudo-instruction ends by sending the next PC to Fetch, taken or not.
//
// Executed instructions: all 8051 data moves, arithmetic, logic, rotates,
// bit operations, jumps, calls and returns on internal RAM and SFRs, MUL,
// DIV, PUSH/POP, DA, XCHD, MOVC (the byte comes back from Fetch on the
// accumulator channel of the SwitchBox), plus the extra A5h (A -> program
// memory at DPTR). Not executed (treated as NOP): MOVX (no external memory).
// The division into opcode stage, bus, units and sequencer follows the
// original; the clocked state machine, encodings and the exact subset are
// this design's.
module lut_core
  import lut_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction channels
  input  logic        i1_valid,
  input  instr1_t     i1_data,
  output logic        i1_ready,
  input  logic        i2_valid,
  input  logic [7:0]  i2_data,
  output logic        i2_ready,
  input  logic        i3_valid,
  input  logic [7:0]  i3_data,
  output logic        i3_ready,
  // next PC to Fetch
  output logic        br_valid,
  output logic [15:0] br_pc,
  output logic        br_code,      // br_pc is a code-read address (MOVC)
  input  logic        br_ready,
  // code-read byte from the SwitchBox
  input  logic        acc_valid,
  input  logic [7:0]  acc_data,
  output logic        acc_ready,
  // program-memory write (instruction A5h)
  output logic        imem_we,
  output logic [12:0] imem_waddr,
  output logic [7:0]  imem_wdata,
  // SFR bus to the peripheral interface
  output logic        sfr_we,
  output logic [7:0]  sfr_waddr,
  output logic [7:0]  sfr_wdata,
  output logic [7:0]  sfr_raddr,
  input  logic [7:0]  rupt_rdata,
  input  logic [7:0]  prdm_rdata,
  // interrupt decision
  output logic        irq_query,
  input  logic        irq_take,
  input  logic [15:0] irq_vector,
  input  logic [1:0]  irq_ret_adjust,
  output logic        reti,
  // observation
  output logic [7:0]  acc,
  output logic [7:0]  b_reg,
  output logic [7:0]  psw,
  output logic [7:0]  sp,
  output logic [15:0] dptr,
  output logic        retired,
  output logic [7:0]  retired_op,
  output logic        bus_done,
  output logic [1:0]  bus_stages_m1,
  output logic        seq_step
);
  // ---------------- the instruction being executed ----------------
  logic [7:0]  x_op, x_b1, x_b2, x_v;
  logic [15:0] x_pc, x_npc;

  // ---------------- state ----------------
  typedef enum logic [2:0] {S_IDLE, S_RD, S_PUSH2, S_RET2, S_BR, S_CODE} state_e;
  state_e st;

  logic        op_v;
  instr1_t     op_q;          // opcode stage
  logic [7:0]  b1_q, b2_q;    // operands of an instruction waiting on the bus
  instr1_t     xi_q;
  logic [1:0]  sm_q;          // source mode / address of the bus read
  logic [7:0]  sa_q;
  drb_dst_e    dst_q;
  logic [7:0]  pch_q;
  logic        ret_step;      // RET second read issued
  logic [15:0] push_hi_target;
  logic [7:0]  push_hi;

  logic [7:0]  a_r, b_r, psw_r, sp_r, dpl_r, dph_r;
  logic        par;
  assign par  = ^a_r;
  assign acc  = a_r;
  assign b_reg = b_r;
  assign psw  = {psw_r[7:1], par};
  assign sp   = sp_r;
  assign dptr = {dph_r, dpl_r};

  // ---------------- decode: where does the operand come from ----------------
  typedef struct packed {
    logic       use_bus;
    logic [1:0] mode;     // 0 direct, 1 Rn, 2 @Ri, 3 stack top
    logic [7:0] addr;     // direct address, or register number
    drb_dst_e   dst;
  } opnd_t;

  function automatic opnd_t decode_opnd(input logic [7:0] op, input logic [7:0] b1);
    opnd_t d;
    logic [3:0] hi, lo;
    logic       rn, ri, dir;
    hi = op[7:4]; lo = op[3:0];
    rn  = lo[3];
    ri  = lo[3:1] == 3'b011;
    dir = lo == 4'h5;
    d = '{use_bus: 1'b0, mode: rn ? 2'd1 : (ri ? 2'd2 : 2'd0),
          addr: rn ? {5'd0, lo[2:0]} : (ri ? {7'd0, lo[0]} : b1), dst: DST_EXCHANGE};
    if (rn || ri || dir) begin
      case (hi)
        4'h0, 4'h1:             begin d.use_bus = 1'b1; d.dst = DST_ALU; end  // INC/DEC
        4'h2, 4'h3, 4'h4, 4'h5,
        4'h6, 4'h9:             begin d.use_bus = 1'b1; d.dst = DST_ALU; end  // arith/logic
        4'h8:                   begin d.use_bus = 1'b1; d.dst = DST_EXCHANGE;  // MOV dir,src
                                      if (dir) d.addr = b1; end
        4'hA:                   if (!dir) begin d.use_bus = 1'b1;             // MOV Rn/@Ri,dir
                                      d.mode = 2'd0; d.addr = b1; end
        4'hB:                   begin d.use_bus = 1'b1; d.dst = DST_ALU; end  // CJNE
        4'hC, 4'hE:             begin d.use_bus = 1'b1; d.dst = DST_EXCHANGE; end // XCH, MOV A
        4'hD:                   if (rn || dir) begin d.use_bus = 1'b1; d.dst = DST_ALU; end // DJNZ
                                else begin d.use_bus = 1'b1; d.dst = DST_EXCHANGE; end   // XCHD
        default: ;
      endcase
      if (dir && hi == 4'h7) d.use_bus = 1'b0;     // MOV dir,#
      if (ri && hi == 4'h7) d.use_bus = 1'b0;      // MOV @Ri,#
      if (rn && hi == 4'h7) d.use_bus = 1'b0;      // MOV Rn,#
    end
    case (op)
      8'h42, 8'h52, 8'h62, 8'h43, 8'h53, 8'h63:   // logic to direct
        d = '{use_bus: 1'b1, mode: 2'd0, addr: b1, dst: DST_ALU};
      8'hC0: d = '{use_bus: 1'b1, mode: 2'd0, addr: b1, dst: DST_DMEM};      // PUSH
      8'hD0: d = '{use_bus: 1'b1, mode: 2'd3, addr: 8'd0, dst: DST_EXCHANGE}; // POP
      8'h22, 8'h32: d = '{use_bus: 1'b1, mode: 2'd3, addr: 8'd0, dst: DST_PCH}; // RET(I)
      8'hC2, 8'hD2, 8'hB2, 8'h92, 8'hA2, 8'h82, 8'h72, 8'hB0, 8'hA0,
      8'h10, 8'h20, 8'h30:
        d = '{use_bus: 1'b1, mode: 2'd0,
              addr: b1[7] ? {b1[7:3], 3'b000} : {4'h2, b1[6:3]}, dst: DST_BITUNIT};
      8'hE2, 8'hE3, 8'hF2, 8'hF3, 8'hF6, 8'hF7: d.use_bus = 1'b0;
      default: ;
    endcase
    // MOV dir,A / MOV Rn,A / MOV @Ri,A have no bus operand
    if (hi == 4'hF) d.use_bus = 1'b0;
    return d;
  endfunction

  function automatic drb_src_e src_of(input logic [1:0] mode, input logic [7:0] addr);
    if (mode != 2'd0 || !addr[7]) return SRC_REGFILE;
    case (addr)
      SFR_ACC: return SRC_A;
      SFR_B:   return SRC_B;
      SFR_PSW: return SRC_PSW;
      SFR_DPL: return SRC_DPL;
      SFR_DPH: return SRC_DPH;
      SFR_SP:  return SRC_SP;
      SFR_P1, SFR_P1DIR, SFR_P3, SFR_P3DIR: return SRC_PRDM;
      default: return SRC_RUPTREGS;
    endcase
  endfunction

  // ---------------- units ----------------
  logic [7:0]  rf_rd_data, rf_ri_val;
  logic [1:0]  rf_rd_mode, rf_wr_mode;
  logic [7:0]  rf_rd_addr, rf_wr_addr, rf_wr_data;
  logic        rf_we;

  regfile u_regfile (.clk, .rst_n, .rs(psw_r[4:3]), .rd_mode(rf_rd_mode), .rd_addr(rf_rd_addr),
                     .rd_data(rf_rd_data), .ri_val(rf_ri_val), .wr_en(rf_we), .wr_mode(rf_wr_mode),
                     .wr_addr(rf_wr_addr), .wr_data(rf_wr_data));

  logic            bus_ctrl_valid, bus_ctrl_ready;
  drby_ctrl_t      bus_ctrl;
  logic [NSRC-1:0] bus_in_valid, bus_in_ready;
  logic [7:0]      bus_in_data [NSRC];
  logic [NDST-1:0] bus_out_valid, bus_out_ready;
  logic [7:0]      bus_out_data [NDST];

  drby_bus u_drby (.clk, .rst_n, .ctrl_valid(bus_ctrl_valid), .ctrl(bus_ctrl),
                   .ctrl_ready(bus_ctrl_ready), .in_valid(bus_in_valid), .in_data(bus_in_data),
                   .in_ready(bus_in_ready), .out_valid(bus_out_valid), .out_data(bus_out_data),
                   .out_ready(bus_out_ready), .last_stages_minus1(bus_stages_m1));

  alu_op_e    alu_op;
  logic [7:0] alu_a, alu_b, alu_y;
  logic       alu_c, alu_ac, alu_ov, alu_wc, alu_wac, alu_wov;
  alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .cy_in(psw_r[7]), .y(alu_y), .cy(alu_c),
             .ac(alu_ac), .ov(alu_ov), .wr_c(alu_wc), .wr_ac(alu_wac), .wr_ov(alu_wov));

  logic [7:0] md_a, md_b;
  logic       md_ov;
  mult_div u_md (.is_div(x_op == 8'h84), .a(a_r), .b(b_r), .a_out(md_a), .b_out(md_b), .ov(md_ov));

  logic [7:0] bu_byte_addr, bu_out;
  logic       bu_bit;
  logic [1:0] bu_op;
  logic       bu_use_cin;
  bit_unit u_bit (.bit_addr(x_b1), .byte_addr(bu_byte_addr), .byte_in(x_v), .op(bu_op),
                  .use_cin(bu_use_cin), .cin(psw_r[7]), .bit_val(bu_bit), .byte_out(bu_out));

  logic [15:0] bru_target;
  logic        bru_taken;
  logic [7:0]  cmp_a, cmp_b;
  branch_unit u_bru (.op(x_op), .b1(x_b1), .b2(x_b2), .npc(x_npc), .acc(a_r), .cy(psw_r[7]),
                     .bit_val(bu_bit), .cmp_a(cmp_a), .cmp_b(cmp_b), .dec_val(x_v - 8'd1),
                     .dptr({dph_r, dpl_r}), .ret_pc({pch_q, x_v}), .target(bru_target),
                     .taken(bru_taken));

  // ---------------- the instruction being executed ----------------
  logic        x_irq;
  logic [1:0]  x_len;
  opnd_t       dec;
  logic        have_all, dispatch, exec_go;
  logic [1:0]  x_mode;
  logic [7:0]  x_addr;

  always_comb begin
    if (st == S_IDLE) begin
      x_op = op_q.op; x_b1 = i2_data; x_b2 = i3_data; x_pc = op_q.pc; x_irq = op_q.irq;
    end else begin
      x_op = xi_q.op; x_b1 = b1_q; x_b2 = b2_q; x_pc = xi_q.pc; x_irq = xi_q.irq;
    end
    x_len  = x_irq ? 2'd0 : op_len(x_op);
    x_npc  = x_pc + 16'(x_len);
    dec    = decode_opnd(x_op, x_b1);
    have_all = op_v && (op_q.irq || ((op_len(op_q.op) < 2'd2 || i2_valid) &&
                                     (op_len(op_q.op) < 2'd3 || i3_valid)));
    x_mode = (st == S_IDLE) ? dec.mode : sm_q;
    x_addr = (st == S_IDLE) ? dec.addr : sa_q;
    x_v    = bus_out_data[dst_q];
  end

  // ---------------- bus request ----------------
  logic        breq;
  logic [1:0]  breq_mode;
  logic [7:0]  breq_addr;
  drb_dst_e    breq_dst;
  drb_src_e    breq_src;
  logic [7:0]  breq_val;

  always_comb begin
    breq      = 1'b0;
    breq_mode = dec.mode;
    breq_addr = dec.addr;
    breq_dst  = dec.dst;
    if (st == S_IDLE && have_all && !op_q.irq && !br_valid && dec.use_bus) breq = 1'b1;
    if (st == S_RET2) begin
      breq = 1'b1; breq_mode = 2'd3; breq_dst = DST_PCL;
    end
    // stack reads address RAM at SP directly
    rf_rd_mode = breq_mode == 2'd3 ? 2'd0 : breq_mode;
    rf_rd_addr = breq_mode == 2'd3 ? sp_r : breq_addr;
    breq_src   = src_of(rf_rd_mode, rf_rd_addr);
    sfr_raddr  = rf_rd_addr;
    case (breq_src)
      SRC_A:        breq_val = a_r;
      SRC_B:        breq_val = b_r;
      SRC_PSW:      breq_val = {psw_r[7:1], par};
      SRC_DPL:      breq_val = dpl_r;
      SRC_DPH:      breq_val = dph_r;
      SRC_SP:       breq_val = sp_r;
      SRC_RUPTREGS: breq_val = rupt_rdata;
      SRC_PRDM:     breq_val = prdm_rdata;
      default:      breq_val = rf_rd_data;
    endcase
    bus_ctrl_valid = breq && bus_ctrl_ready;
    bus_ctrl       = drby_encode(breq_src, breq_dst);
    bus_in_valid   = '0;
    bus_in_valid[breq_src] = bus_ctrl_valid;
    for (int s = 0; s < NSRC; s++) bus_in_data[s] = breq_val;
  end

  assign dispatch = st == S_IDLE && have_all && !br_valid;
  // execute now: an instruction without bus operand, or the bus operand arrived
  logic bus_arrived;
  assign bus_arrived = st == S_RD && bus_out_valid[dst_q];
  assign exec_go     = (dispatch && (op_q.irq || !dec.use_bus)) || bus_arrived;

  // ---------------- execute ----------------
  // generic byte write to an operand location
  logic       w_en;
  logic [1:0] w_mode;
  logic [7:0] w_addr, w_val;
  logic       a_we, b_we, c_we, ac_we, ov_we, dptr_we, sp_we;
  logic [7:0] a_new, b_new, sp_new;
  logic [8:0] da1, da2;   // DA A: after the low and the high correction
  logic       c_new, ac_new, ov_new;
  logic [15:0] dptr_new;
  logic       br_send, code_send;
  logic [15:0] br_target;
  logic       to_push2, to_ret2, is_ret_first, push_now;
  logic [7:0] push_val;
  logic [3:0] hi;

  always_comb begin
    w_en = 1'b0; w_mode = x_mode; w_addr = x_addr; w_val = '0;
    da1 = '0; da2 = '0;
    a_we = 1'b0; b_we = 1'b0; c_we = 1'b0; ac_we = 1'b0; ov_we = 1'b0; dptr_we = 1'b0;
    sp_we = 1'b0;
    a_new = a_r; b_new = b_r; sp_new = sp_r; c_new = psw_r[7]; ac_new = psw_r[6];
    ov_new = psw_r[2]; dptr_new = {dph_r, dpl_r};
    br_send = 1'b0; br_target = x_npc; code_send = 1'b0;
    to_push2 = 1'b0; to_ret2 = 1'b0; is_ret_first = 1'b0; push_now = 1'b0; push_val = '0;
    alu_op = ALU_PASS; alu_a = a_r; alu_b = x_v;
    bu_op = 2'd0; bu_use_cin = 1'b0;
    cmp_a = a_r; cmp_b = x_b1;
    imem_we = 1'b0;
    irq_query = 1'b0; reti = 1'b0;
    hi = x_op[7:4];

    if (exec_go) begin
      if (x_irq) begin
        irq_query = 1'b1;
        if (irq_take) begin
          push_now = 1'b1;
          push_val = 8'(x_pc + 16'(irq_ret_adjust));
          to_push2 = 1'b1;
        end else begin
          br_send = 1'b1; br_target = x_pc;
        end
      end else if (st == S_RD && (x_op == 8'h22 || x_op == 8'h32)) begin
        if (!ret_step) begin
          is_ret_first = 1'b1; sp_we = 1'b1; sp_new = sp_r - 8'd1; to_ret2 = 1'b1;
        end else begin
          sp_we = 1'b1; sp_new = sp_r - 8'd1;
          br_send = 1'b1; br_target = bru_target;
          reti = x_op == 8'h32;
        end
      end else begin
        // ---- arithmetic / logic on A ----
        if (hi inside {4'h2, 4'h3, 4'h9, 4'h4, 4'h5, 4'h6} &&
            (x_op[3:0] == 4'h4 || x_op[3:0] == 4'h5 || x_op[3:0] >= 4'h6)) begin
          case (hi)
            4'h2: alu_op = ALU_ADD;
            4'h3: alu_op = ALU_ADDC;
            4'h9: alu_op = ALU_SUBB;
            4'h4: alu_op = ALU_ORL;
            4'h5: alu_op = ALU_ANL;
            default: alu_op = ALU_XRL;
          endcase
          alu_b = x_op[3:0] == 4'h4 ? x_b1 : x_v;
          a_we = 1'b1; a_new = alu_y;
          c_we = alu_wc; ac_we = alu_wac; ov_we = alu_wov;
          c_new = alu_c; ac_new = alu_ac; ov_new = alu_ov;
        end
        case (x_op)
          8'h42, 8'h52, 8'h62, 8'h43, 8'h53, 8'h63: begin
            alu_op = hi == 4'h4 ? ALU_ORL : (hi == 4'h5 ? ALU_ANL : ALU_XRL);
            alu_a = x_v; alu_b = x_op[0] ? x_b2 : a_r;
            w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = alu_y;
          end
          8'h74: begin a_we = 1'b1; a_new = x_b1; end
          8'h04: begin alu_op = ALU_INC; alu_b = a_r; a_we = 1'b1; a_new = alu_y; end
          8'h14: begin alu_op = ALU_DEC; alu_b = a_r; a_we = 1'b1; a_new = alu_y; end
          8'h23: begin alu_op = ALU_RL;   a_we = 1'b1; a_new = alu_y; end
          8'h03: begin alu_op = ALU_RR;   a_we = 1'b1; a_new = alu_y; end
          8'h33: begin alu_op = ALU_RLC;  a_we = 1'b1; a_new = alu_y; c_we = 1'b1; c_new = alu_c; end
          8'h13: begin alu_op = ALU_RRC;  a_we = 1'b1; a_new = alu_y; c_we = 1'b1; c_new = alu_c; end
          8'hC4: begin alu_op = ALU_SWAP; a_we = 1'b1; a_new = alu_y; end
          8'hF4: begin alu_op = ALU_CPL;  a_we = 1'b1; a_new = alu_y; end
          8'hE4: begin a_we = 1'b1; a_new = 8'h00; end
          8'hC3: begin c_we = 1'b1; c_new = 1'b0; end
          8'hD3: begin c_we = 1'b1; c_new = 1'b1; end
          8'hB3: begin c_we = 1'b1; c_new = !psw_r[7]; end
          8'h75: begin w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = x_b2; end
          8'h76, 8'h77: begin w_en = 1'b1; w_mode = 2'd2; w_addr = {7'd0, x_op[0]}; w_val = x_b1; end
          8'hF5: begin w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = a_r; end
          8'hF6, 8'hF7: begin w_en = 1'b1; w_mode = 2'd2; w_addr = {7'd0, x_op[0]}; w_val = a_r; end
          8'h85: begin w_en = 1'b1; w_mode = 2'd0; w_addr = x_b2; w_val = x_v; end
          8'h86, 8'h87: begin w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = x_v; end
          8'hA6, 8'hA7: begin w_en = 1'b1; w_mode = 2'd2; w_addr = {7'd0, x_op[0]}; w_val = x_v; end
          8'hE5, 8'hE6, 8'hE7: begin a_we = 1'b1; a_new = x_v; end
          8'hC5, 8'hC6, 8'hC7: begin a_we = 1'b1; a_new = x_v; w_en = 1'b1; w_val = a_r; end
          8'hD6, 8'hD7: begin a_we = 1'b1; a_new = {a_r[7:4], x_v[3:0]};
                              w_en = 1'b1; w_val = {x_v[7:4], a_r[3:0]}; end
          8'hD4: begin
            da1 = (a_r[3:0] > 4'd9 || psw_r[6]) ? {1'b0, a_r} + 9'h006 : {1'b0, a_r};
            da2 = (da1[8] || psw_r[7] || da1[7:4] > 4'd9) ? {1'b0, da1[7:0]} + 9'h060 : {1'b0, da1[7:0]};
            a_we = 1'b1; a_new = da2[7:0];
            c_we = 1'b1; c_new = psw_r[7] | da1[8] | da2[8];
          end
          8'h05, 8'h06, 8'h07: begin alu_op = ALU_INC; w_en = 1'b1; w_val = alu_y; end
          8'h15, 8'h16, 8'h17: begin alu_op = ALU_DEC; w_en = 1'b1; w_val = alu_y; end
          8'h90: begin dptr_we = 1'b1; dptr_new = {x_b1, x_b2}; end
          8'hA3: begin dptr_we = 1'b1; dptr_new = {dph_r, dpl_r} + 16'd1; end
          8'hA4, 8'h84: begin a_we = 1'b1; a_new = md_a; b_we = 1'b1; b_new = md_b;
                              c_we = 1'b1; c_new = 1'b0; ov_we = 1'b1; ov_new = md_ov; end
          8'hC0: begin sp_we = 1'b1; sp_new = sp_r + 8'd1;
                       w_en = 1'b1; w_mode = 2'd0; w_addr = sp_r + 8'd1; w_val = x_v; end
          8'hD0: begin sp_we = 1'b1; sp_new = sp_r - 8'd1;
                       w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = x_v; end
          8'hC2: begin bu_op = 2'd2; w_en = 1'b1; w_val = bu_out; end
          8'hD2: begin bu_op = 2'd1; w_en = 1'b1; w_val = bu_out; end
          8'hB2: begin bu_op = 2'd3; w_en = 1'b1; w_val = bu_out; end
          8'h92: begin bu_use_cin = 1'b1; w_en = 1'b1; w_val = bu_out; end
          8'hA2: begin c_we = 1'b1; c_new = bu_bit; end
          8'h82: begin c_we = 1'b1; c_new = psw_r[7] & bu_bit; end
          8'h72: begin c_we = 1'b1; c_new = psw_r[7] | bu_bit; end
          8'hB0: begin c_we = 1'b1; c_new = psw_r[7] & !bu_bit; end
          8'hA0: begin c_we = 1'b1; c_new = psw_r[7] | !bu_bit; end
          8'h10: begin bu_op = 2'd2; w_en = bu_bit; w_val = bu_out;
                       br_send = 1'b1; br_target = bru_target; end
          8'hA5: imem_we = 1'b1;
          8'h93: begin br_send = 1'b1; code_send = 1'b1; br_target = {dph_r, dpl_r} + 16'(a_r); end
          8'h83: begin br_send = 1'b1; code_send = 1'b1; br_target = x_npc + 16'(a_r); end
          default: ;
        endcase
        if (x_op[3] && hi == 4'hE) begin a_we = 1'b1; a_new = x_v; end            // MOV A,Rn
        if (x_op[3] && hi == 4'hF) begin w_en = 1'b1; w_val = a_r; end            // MOV Rn,A
        if (x_op[3] && hi == 4'h7) begin w_en = 1'b1; w_val = x_b1; end           // MOV Rn,#
        if (x_op[3] && hi == 4'h8) begin w_en = 1'b1; w_mode = 2'd0; w_addr = x_b1; w_val = x_v; end
        if (x_op[3] && hi == 4'hA) begin w_en = 1'b1; w_mode = 2'd1;
                                         w_addr = {5'd0, x_op[2:0]}; w_val = x_v; end // MOV Rn,dir
        if (x_op[3] && hi == 4'hC) begin a_we = 1'b1; a_new = x_v; w_en = 1'b1; w_val = a_r; end
        if (x_op[3] && hi == 4'h0) begin alu_op = ALU_INC; w_en = 1'b1; w_val = alu_y; end
        if (x_op[3] && hi == 4'h1) begin alu_op = ALU_DEC; w_en = 1'b1; w_val = alu_y; end

        // ---- branches ----
        if (op_is_branch(x_op) && x_op != 8'h10) begin
          br_send = 1'b1; br_target = bru_target;
          if (x_op == 8'hB4) begin cmp_a = a_r; cmp_b = x_b1; end
          else if (x_op == 8'hB5) begin cmp_a = a_r; cmp_b = x_v; end
          else if (hi == 4'hB) begin cmp_a = x_v; cmp_b = x_b1; end
          if (hi == 4'hB) begin c_we = 1'b1; c_new = cmp_a < cmp_b; end
          if (x_op == 8'hD5 || (x_op[3] && hi == 4'hD)) begin w_en = 1'b1; w_val = x_v - 8'd1; end
          if (x_op == 8'h12 || (x_op[3:0] == 4'h1 && x_op[4])) begin   // LCALL / ACALL
            br_send = 1'b0;
            push_now = 1'b1; push_val = x_npc[7:0]; to_push2 = 1'b1;
          end
        end
      end
    end
    // code read: the byte arrives on the accumulator channel
    if (st == S_CODE && acc_valid) begin a_we = 1'b1; a_new = acc_data; end
    // interrupt/call second step: push the high byte, then jump
    if (st == S_PUSH2) begin
      push_now = 1'b1; push_val = push_hi;
      br_send = 1'b1; br_target = push_hi_target;
    end
  end

  // ---------------- write-back routing ----------------
  logic       rf_we_w, wsfr;
  logic [7:0] sfr_target;
  always_comb begin
    rf_we = 1'b0; rf_wr_mode = 2'd0; rf_wr_addr = '0; rf_wr_data = '0;
    sfr_we = 1'b0; sfr_waddr = w_addr; sfr_wdata = w_val;
    rf_we_w = 1'b0; wsfr = 1'b0; sfr_target = w_addr;
    if (push_now) begin
      rf_we = 1'b1; rf_wr_mode = 2'd0; rf_wr_addr = sp_r + 8'd1; rf_wr_data = push_val;
    end else if (w_en) begin
      if (w_mode != 2'd0 || !w_addr[7]) begin
        rf_we_w = 1'b1;
        rf_we = 1'b1; rf_wr_mode = w_mode == 2'd3 ? 2'd0 : w_mode; rf_wr_addr = w_addr;
        rf_wr_data = w_val;
      end else begin
        wsfr = 1'b1;
        if (!(w_addr inside {SFR_ACC, SFR_B, SFR_PSW, SFR_SP, SFR_DPL, SFR_DPH})) sfr_we = 1'b1;
      end
    end
  end

  assign acc_ready  = st == S_CODE;
  assign imem_waddr = {dph_r[4:0], dpl_r};
  assign imem_wdata = a_r;

  // ---------------- channel handshakes ----------------
  logic finishing;   // the opcode stage is released this clock
  assign finishing = dispatch;
  assign i1_ready  = !op_v || finishing;
  assign i2_ready  = finishing && !op_q.irq && op_len(op_q.op) >= 2'd2;
  assign i3_ready  = finishing && !op_q.irq && op_len(op_q.op) == 2'd3;
  always_comb begin
    bus_out_ready = '0;
    if (bus_arrived) bus_out_ready[dst_q] = 1'b1;
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; op_v <= 1'b0; op_q <= '0; xi_q <= '0; b1_q <= '0; b2_q <= '0;
      sm_q <= '0; sa_q <= '0; dst_q <= DST_EXCHANGE; pch_q <= '0; ret_step <= 1'b0;
      push_hi <= '0; push_hi_target <= '0;
      a_r <= '0; b_r <= '0; psw_r <= '0; sp_r <= 8'h07; dpl_r <= '0; dph_r <= '0;
      br_valid <= 1'b0; br_pc <= '0; br_code <= 1'b0;
    end else begin
      if (br_valid && br_ready) br_valid <= 1'b0;
      if (i1_ready) begin op_v <= i1_valid; if (i1_valid) op_q <= i1_data; end

      // state machine
      case (st)
        S_IDLE: if (dispatch) begin
          xi_q <= op_q; b1_q <= i2_data; b2_q <= i3_data;
          sm_q <= dec.mode; sa_q <= dec.addr; dst_q <= dec.dst; ret_step <= 1'b0;
          if (!op_q.irq && dec.use_bus) st <= S_RD;
        end
        S_RD: if (bus_arrived) begin
          st <= S_IDLE;
          if (is_ret_first) begin pch_q <= x_v; ret_step <= 1'b1; st <= S_RET2; end
        end
        S_RET2: if (bus_ctrl_valid) begin st <= S_RD; dst_q <= DST_PCL; end
        S_PUSH2: st <= S_IDLE;
        S_CODE: if (acc_valid) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
      if (to_push2) begin
        st <= S_PUSH2;
        push_hi <= x_irq ? 8'((x_pc + 16'(irq_ret_adjust)) >> 8) : x_npc[15:8];
        push_hi_target <= x_irq ? irq_vector : bru_target;
      end

      // special registers
      if (a_we) a_r <= a_new;
      if (b_we) b_r <= b_new;
      if (c_we) psw_r[7] <= c_new;
      if (ac_we) psw_r[6] <= ac_new;
      if (ov_we) psw_r[2] <= ov_new;
      if (dptr_we) {dph_r, dpl_r} <= dptr_new;
      if (sp_we) sp_r <= sp_new;
      if (push_now) sp_r <= sp_r + 8'd1;
      if (wsfr) begin
        case (w_addr)
          SFR_ACC: a_r <= w_val;
          SFR_B:   b_r <= w_val;
          SFR_PSW: psw_r <= w_val;
          SFR_SP:  sp_r <= w_val;
          SFR_DPL: dpl_r <= w_val;
          SFR_DPH: dph_r <= w_val;
          default: ;
        endcase
      end
      if (br_send) begin br_valid <= 1'b1; br_pc <= br_target; br_code <= code_send; end
      if (code_send) st <= S_CODE;
    end
  end

  assign retired    = exec_go && !is_ret_first || st == S_PUSH2;
  assign retired_op = st == S_PUSH2 ? xi_q.op : x_op;
  assign bus_done   = bus_arrived;
  assign seq_step   = st == S_PUSH2 || st == S_RET2;

  a_src_taken: assert property (@(posedge clk) disable iff (!rst_n)
    bus_ctrl_valid |-> bus_in_ready[breq_src])
    else $error("lut_core: bus source not taken in the dispatch clock");
  a_br_slot: assert property (@(posedge clk) disable iff (!rst_n) !(br_send && br_valid))
    else $error("lut_core: next PC sent twice");
endmodule

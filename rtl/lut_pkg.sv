// lut_pkg: types and constants shared by the Lutonium-style 8051 blocks.
//
// The 8051 instruction length and "can change the PC" tables live here as
// functions because three blocks need them: the Fetch unit's own opcode
// decoder, the decode/execute core and the testbenches. Both tables are the
// standard 8051 ones; opcode A5h, unused on a stock 8051, is the extra
// one-byte instruction that writes program memory (ACC -> IMem[DPTR]), a
// choice of this design since only the existence of such an instruction is
// known. SFR addresses are the standard 8051 ones plus SLP (CFh, the sleep
// register) and two port direction registers, whose addresses (91h, B1h) are
// this design's choice.
package lut_pkg;

  // ---- special function register addresses ----
  localparam logic [7:0] SFR_P0   = 8'h80;
  localparam logic [7:0] SFR_SP   = 8'h81;
  localparam logic [7:0] SFR_DPL  = 8'h82;
  localparam logic [7:0] SFR_DPH  = 8'h83;
  localparam logic [7:0] SFR_TCON = 8'h88;
  localparam logic [7:0] SFR_TMOD = 8'h89;
  localparam logic [7:0] SFR_TL0  = 8'h8A;
  localparam logic [7:0] SFR_TH0  = 8'h8C;
  localparam logic [7:0] SFR_TL1  = 8'h8B;
  localparam logic [7:0] SFR_TH1  = 8'h8D;
  localparam logic [7:0] SFR_P1   = 8'h90;
  localparam logic [7:0] SFR_P1DIR= 8'h91;
  localparam logic [7:0] SFR_IE   = 8'hA8;
  localparam logic [7:0] SFR_P3   = 8'hB0;
  localparam logic [7:0] SFR_P3DIR= 8'hB1;
  localparam logic [7:0] SFR_IP   = 8'hB8;
  localparam logic [7:0] SFR_SLP  = 8'hCF;
  localparam logic [7:0] SFR_PSW  = 8'hD0;
  localparam logic [7:0] SFR_ACC  = 8'hE0;
  localparam logic [7:0] SFR_B    = 8'hF0;

  localparam logic [7:0] OP_IMEMWR = 8'hA5;  // 256th instruction

  // ---- sources and destinations of the DRBY direct-read bus ----
  typedef enum logic [3:0] {
    SRC_REGFILE = 4'd0, SRC_A = 4'd1, SRC_B = 4'd2, SRC_PSW = 4'd3,
    SRC_DPL = 4'd4, SRC_DPH = 4'd5, SRC_SP = 4'd6, SRC_RUPTREGS = 4'd7,
    SRC_PRDM = 4'd8
  } drb_src_e;
  localparam int NSRC = 9;

  typedef enum logic [2:0] {
    DST_EXCHANGE = 3'd0, DST_FBLOCK = 3'd1, DST_ALU = 3'd2, DST_BITUNIT = 3'd3,
    DST_PCL = 3'd4, DST_PCH = 3'd5, DST_DMEM = 3'd6
  } drb_dst_e;
  localparam int NDST = 7;

  // Segmented-bus control: each stage receives its field only when used.
  typedef enum logic [1:0] {RM_A = 2'd0, RM_B = 2'd1, RM_PSW = 2'd2, RM_DPL = 2'd3} rm_sel_e;
  typedef enum logic [1:0] {AM_RUPT = 2'd0, AM_PRDM = 2'd1, AM_SP = 2'd2, AM_DPH = 2'd3} am_sel_e;
  typedef enum logic [2:0] {ES_ALU = 3'd0, ES_FBLOCK = 3'd1, ES_PCL = 3'd2, ES_PCH = 3'd3,
                            ES_BITUNIT = 3'd4, ES_DMEM = 3'd5} es_sel_e;

  typedef struct packed {
    logic    main_src_other;  // Main: 0 = RegFile, 1 = from RegMerge
    logic    main_dst_other;  // Main: 0 = Exchange, 1 = to ExecSplit
    logic    rm_from_alt;     // RegMerge (used only if main_src_other): 1 = from AltMerge
    rm_sel_e rm_sel;          // RegMerge source (when not from AltMerge)
    am_sel_e am_sel;          // AltMerge source (used only if rm_from_alt)
    es_sel_e es_sel;          // ExecSplit destination (used only if main_dst_other)
  } drby_ctrl_t;

  // Segmented-bus control for a (source, destination) pair: the Huffman-like
  // code the decoder sends. Fields of stages the transfer does not use are
  // don't-care (zero).
  function automatic drby_ctrl_t drby_encode(input drb_src_e src, input drb_dst_e dst);
    drby_ctrl_t c;
    c = '0;
    c.main_src_other = src != SRC_REGFILE;
    c.main_dst_other = dst != DST_EXCHANGE;
    case (src)
      SRC_A:        c.rm_sel = RM_A;
      SRC_B:        c.rm_sel = RM_B;
      SRC_PSW:      c.rm_sel = RM_PSW;
      SRC_DPL:      c.rm_sel = RM_DPL;
      SRC_RUPTREGS: begin c.rm_from_alt = 1'b1; c.am_sel = AM_RUPT; end
      SRC_PRDM:     begin c.rm_from_alt = 1'b1; c.am_sel = AM_PRDM; end
      SRC_SP:       begin c.rm_from_alt = 1'b1; c.am_sel = AM_SP;   end
      SRC_DPH:      begin c.rm_from_alt = 1'b1; c.am_sel = AM_DPH;  end
      default: ;
    endcase
    case (dst)
      DST_ALU:     c.es_sel = ES_ALU;
      DST_FBLOCK:  c.es_sel = ES_FBLOCK;
      DST_PCL:     c.es_sel = ES_PCL;
      DST_PCH:     c.es_sel = ES_PCH;
      DST_BITUNIT: c.es_sel = ES_BITUNIT;
      DST_DMEM:    c.es_sel = ES_DMEM;
      default: ;
    endcase
    return c;
  endfunction

  // ---- ALU operations ----
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDC, ALU_SUBB, ALU_ANL, ALU_ORL, ALU_XRL, ALU_INC, ALU_DEC,
    ALU_RL, ALU_RLC, ALU_RR, ALU_RRC, ALU_CPL, ALU_SWAP, ALU_PASS
  } alu_op_e;

  // ---- SwitchBox routing orders, one per byte lane ----
  localparam logic [2:0] RT_KEEP = 3'd0, RT_DISCARD = 3'd1, RT_I1 = 3'd2,
                         RT_I2 = 3'd3, RT_I3 = 3'd4, RT_ACC = 3'd5;

  // ---- IRUPT channel message ----
  typedef enum logic {IRUPT_OTHER = 1'b0, IRUPT_SLEEP = 1'b1} irupt_msg_e;

  // Instruction byte 1 as delivered to Decode; irq marks an interrupt
  // pseudo-instruction inserted by Fetch, pc the address of the opcode (for
  // irq: the return address).
  typedef struct packed {
    logic        irq;
    logic [15:0] pc;
    logic [7:0]  op;
  } instr1_t;

  // Length in bytes of an 8051 instruction, from its opcode alone.
  function automatic logic [1:0] op_len(input logic [7:0] op);
    logic [3:0] hi, lo;
    hi = op[7:4];
    lo = op[3:0];
    if (lo[3]) begin                                     // Rn forms
      case (hi)
        4'h7, 4'h8, 4'hA, 4'hD: return 2'd2;
        4'hB:                    return 2'd3;
        default:                 return 2'd1;
      endcase
    end
    case (lo)
      4'h0: case (hi)
              4'h0, 4'hE, 4'hF: return 2'd1;
              4'h1, 4'h2, 4'h3, 4'h9: return 2'd3;
              default: return 2'd2;
            endcase
      4'h1: return 2'd2;
      4'h2: case (hi)
              4'h0, 4'h1: return 2'd3;
              4'h2, 4'h3, 4'hE, 4'hF: return 2'd1;
              default: return 2'd2;
            endcase
      4'h3: case (hi)
              4'h4, 4'h5, 4'h6: return 2'd3;
              default: return 2'd1;
            endcase
      4'h4: case (hi)
              4'h0, 4'h1, 4'h8, 4'hA, 4'hC, 4'hD, 4'hE, 4'hF: return 2'd1;
              4'hB: return 2'd3;
              default: return 2'd2;
            endcase
      4'h5: case (hi)
              4'h7, 4'h8, 4'hB, 4'hD: return 2'd3;
              4'hA: return 2'd1;
              default: return 2'd2;
            endcase
      default: case (hi)                                 // @Ri forms (6, 7)
              4'h7, 4'h8, 4'hA: return 2'd2;
              4'hB: return 2'd3;
              default: return 2'd1;
            endcase
    endcase
  endfunction

  // True if the instruction can change the program counter.
  // MOVC A,@A+PC / MOVC A,@A+DPTR: read a byte of program memory into A
  function automatic logic op_is_coderead(input logic [7:0] op);
    return op == 8'h83 || op == 8'h93;
  endfunction

  function automatic logic op_is_branch(input logic [7:0] op);
    logic [3:0] hi, lo;
    hi = op[7:4];
    lo = op[3:0];
    if (lo == 4'h1) return 1'b1;                          // AJMP / ACALL
    if (lo[3]) return (hi == 4'hB) || (hi == 4'hD);        // CJNE Rn / DJNZ Rn
    case (lo)
      4'h0: return (hi >= 4'h1) && (hi <= 4'h8);          // JBC..SJMP
      4'h2: return hi <= 4'h3;                             // LJMP LCALL RET RETI
      4'h3: return hi == 4'h7;                             // JMP @A+DPTR
      4'h4, 4'h6, 4'h7: return hi == 4'hB;                 // CJNE
      4'h5: return (hi == 4'hB) || (hi == 4'hD);           // CJNE dir / DJNZ dir
      default: return 1'b0;
    endcase
  endfunction

endpackage

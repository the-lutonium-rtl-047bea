// fetch: the Fetch unit, which drives the instruction fetch loop.
//
// Program memory is read two aligned bytes at a time; the pair index is
// advanced by one (the byte PC by two) on every read, speculatively, as long
// as the lanes of the SwitchBox have room. Fetch decodes the length of each
// instruction and whether it can change the PC from its opcode alone (the
// opcode is the only byte it needs), and tells the SwitchBox, per lane, where
// each byte goes. Per clock it consumes at most two consecutive bytes of
// program order, and an opcode only as the last byte of a clock, because the
// opcode is decoded before the rest of its instruction is routed. This gives
// 1 byte/clock for one-byte instructions, 2 for two-byte and 1.5 for
// three-byte ones. Bytes below the current PC (the even byte when a block
// starts on an odd address) are discarded.
//
// Before every opcode Fetch takes an interrupt guess from the interrupt
// arbiter. A true guess puts an interrupt pseudo-instruction carrying the
// return address on instr_1 instead of the opcode. After a branch-type
// instruction (or a pseudo-instruction) Fetch stops and waits for the branch
// unit to return the next PC, taken or not; it also stops reading program
// memory past the pair holding the branch's last byte, so at most the odd
// byte after it is fetched speculatively. There is no branch prediction. On
// the new PC it flushes the lanes and restarts.
//
// Code reads (MOVC) are handled like a branch: the core answers with the
// address of the byte to read instead of a next PC (br_code set). Fetch
// reads that one pair, routes the byte to the accumulator channel, then
// flushes again and resumes at the instruction after the MOVC.
//
// The decomposition (PC unit with +2, opcode decoder, interrupt check,
// control, router) and the consumption rule follow the original design; the
// clocked, valid/ready timing and the lane-credit scheme are this design's.
module fetch
  import lut_pkg::*;
#(
  parameter int LANE_DEPTH = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // program memory read port
  output logic        mem_req,
  output logic [11:0] mem_pair,
  // SwitchBox lane heads and control
  input  logic [1:0]  head_valid,
  input  logic [15:0] head_addr [2],
  input  logic [7:0]  head_byte [2],
  input  logic [$clog2(LANE_DEPTH+1)-1:0] lane_count [2],
  output logic [2:0]  route [2],
  output logic        irq_ins,
  output logic [15:0] irq_pc,
  output logic        flush,
  output logic [2:0]  pc_hi,
  input  logic        i1_free, i2_free, i3_free,
  // interrupt guess from the interrupt arbiter
  output logic        ig_req,
  input  logic        ig_valid,
  input  logic        ig,
  // next PC from the branch unit
  input  logic        br_valid,
  input  logic [15:0] br_pc,
  input  logic        br_code,     // br_pc is a code-read address (MOVC)
  output logic        br_ready,
  // accumulator channel of the SwitchBox (code reads)
  input  logic        acc_free,
  // status
  output logic        waiting_branch,
  output logic [15:0] pc
);
  logic [15:0] cur, n_cur;          // address of the next byte to consume
  logic [1:0]  rem, n_rem;          // bytes of the current instruction still to route
  logic [1:0]  len_q, n_len;
  logic        br_q, n_br;          // current instruction is branch-type
  logic        wait_q, n_wait;      // waiting for the branch unit
  logic [14:0] nxt, n_nxt, rd_pair; // next pair index to read
  logic        lim_on, n_lim_on;    // stop reading after pair lim_pair
  logic [14:0] lim_pair, n_lim_pair;
  logic        inflight;            // a read issued last clock
  logic        code_q, n_code;      // fetching one byte for a code read
  logic [15:0] ret_q, n_ret;        // where to resume after it
  logic [15:0] flush_pc;            // restart address on a flush

  function automatic logic avail(input logic [12:0] a, input logic [1:0] hv,
                                 input logic [15:0] ha [2]);
    return hv[a[0]] && ha[a[0]][12:0] == a[12:0];
  endfunction

  logic [15:0] a1;
  assign a1 = cur + 16'd1;

  // decode an opcode found at address a and route it to instr_1
  task automatic take_opcode(input logic [15:0] a);
    logic [7:0] op;
    logic [1:0] l;
    logic       b;
    op = head_byte[a[0]];
    l  = op_len(op);
    b  = op_is_branch(op) || op_is_coderead(op);
    route[a[0]] = RT_I1;
    n_cur = a + 16'd1;
    n_rem = l - 2'd1;
    n_len = l;
    n_br  = b;
    if (b) begin
      n_lim_on   = 1'b1;
      n_lim_pair = 15'((a + 16'(l) - 16'd1) >> 1);
      if (l == 2'd1) n_wait = 1'b1;
    end
  endtask

  always_comb begin
    route    = '{RT_KEEP, RT_KEEP};
    irq_ins  = 1'b0;
    irq_pc   = cur;
    flush    = 1'b0;
    flush_pc = br_pc;
    n_code   = code_q; n_ret = ret_q;
    ig_req   = 1'b0;
    br_ready = 1'b0;
    n_cur = cur; n_rem = rem; n_len = len_q; n_br = br_q; n_wait = wait_q;
    n_lim_on = lim_on; n_lim_pair = lim_pair;

    for (int l = 0; l < 2; l++)
      if (head_valid[l] && head_addr[l][12:0] < cur[12:0]) route[l] = RT_DISCARD;

    if (wait_q) begin
      br_ready = 1'b1;
      if (br_valid) begin
        flush    = 1'b1;
        n_cur    = br_pc;
        n_rem    = 2'd0;
        n_wait   = 1'b0;
        n_lim_on = 1'b0;
        route    = '{RT_KEEP, RT_KEEP};
        if (br_code) begin
          // code read: fetch only the pair holding the byte, then return
          n_code     = 1'b1;
          n_ret      = cur;
          n_lim_on   = 1'b1;
          n_lim_pair = br_pc[15:1];
        end
      end
    end else if (code_q) begin
      if (avail(cur[12:0], head_valid, head_addr) && acc_free) begin
        route[cur[0]] = RT_ACC;
        flush    = 1'b1;
        flush_pc = ret_q;
        n_cur    = ret_q;
        n_code   = 1'b0;
        n_lim_on = 1'b0;
      end
    end else if (rem == 2'd0) begin
      // instruction boundary: interrupt guess, then the opcode
      if (avail(cur[12:0], head_valid, head_addr) && i1_free) begin
        ig_req = 1'b1;
        if (ig_valid) begin
          if (ig) begin
            irq_ins = 1'b1;
            irq_pc  = cur;
            n_wait  = 1'b1;
          end else begin
            take_opcode(cur);
          end
        end
      end
    end else begin
      // operand bytes: byte 2 goes to instr_2, byte 3 to instr_3
      if (avail(cur[12:0], head_valid, head_addr) &&
          ((len_q - rem == 2'd1) ? i2_free : i3_free)) begin
        route[cur[0]] = (len_q - rem == 2'd1) ? RT_I2 : RT_I3;
        n_cur = a1;
        n_rem = rem - 2'd1;
        if (rem == 2'd2) begin
          if (avail(a1[12:0], head_valid, head_addr) && i3_free) begin
            route[a1[0]] = RT_I3;
            n_cur = cur + 16'd2;
            n_rem = 2'd0;
            if (br_q) n_wait = 1'b1;
          end
        end else if (br_q) begin
          n_wait = 1'b1;
        end else if (avail(a1[12:0], head_valid, head_addr) && i1_free) begin
          // the next opcode rides along with the last operand
          ig_req = 1'b1;
          if (ig_valid) begin
            if (ig) begin
              irq_ins = 1'b1;
              irq_pc  = a1;
              n_wait  = 1'b1;
            end else begin
              take_opcode(a1);
            end
          end
        end
      end
    end
  end

  // ---- PC unit: read the next pair while both lanes have room ----
  logic [1:0] popped;
  logic       room;
  always_comb begin
    for (int l = 0; l < 2; l++) popped[l] = head_valid[l] && route[l] != RT_KEEP;
    rd_pair = flush ? flush_pc[15:1] : nxt;
    room = 1'b1;
    for (int l = 0; l < 2; l++)
      if (!flush && int'(lane_count[l]) - int'(popped[l]) + int'(inflight) >= LANE_DEPTH)
        room = 1'b0;
    mem_req  = room && !(n_wait && !flush) && !(n_lim_on && rd_pair > n_lim_pair);
    mem_pair = rd_pair[11:0];
    n_nxt    = mem_req ? rd_pair + 15'd1 : rd_pair;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; rem <= '0; len_q <= 2'd1; br_q <= 1'b0; wait_q <= 1'b0;
      nxt <= '0; lim_on <= 1'b0; lim_pair <= '0; inflight <= 1'b0;
      code_q <= 1'b0; ret_q <= '0;
    end else begin
      cur <= n_cur; rem <= n_rem; len_q <= n_len; br_q <= n_br; wait_q <= n_wait;
      nxt <= n_nxt; lim_on <= n_lim_on; lim_pair <= n_lim_pair; inflight <= mem_req;
      code_q <= n_code; ret_q <= n_ret;
    end
  end

  assign pc_hi          = cur[15:13];
  assign waiting_branch = wait_q;
  assign pc             = cur;

  a_guess_used: assert property (@(posedge clk) disable iff (!rst_n)
    !(ig_req && ig_valid && ig && !irq_ins))
    else $error("fetch: true interrupt guess not acted on");
endmodule

// switchbox: filter and router for the two byte lanes of program memory.
//
// Each program-memory pair is split into its even byte (lane 0) and odd
// byte (lane 1). Every lane is a small FIFO (LANE_DEPTH entries) so that the
// two bytes of a pair are acknowledged independently: a byte that cannot be
// used this cycle simply waits, and the other lane may already move on to the
// next pair. The Fetch unit looks at the lane heads and, per lane, orders one
// of: keep, discard, or send to instr_1 (opcode, also seen by Fetch's own
// opcode decoder), instr_2 or instr_3 (second and third instruction bytes),
// or to the accumulator (code reads). Both lanes can be routed in the same
// clock as long as they go to different destinations. Fetch can also insert
// an interrupt pseudo-instruction on instr_1.
//
// The routing function follows the original design; the lane FIFOs and the
// one-entry registered output channels (valid/ready) are this clocked
// design's stand-in for the asynchronous channels. flush empties both lanes
// and drops a pair arriving in the same clock (used on a redirect).
module switchbox
  import lut_pkg::*;
#(
  parameter int LANE_DEPTH = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // pairs from program memory (no back-pressure: Fetch reserves room)
  input  logic        mem_valid,
  input  logic [11:0] mem_pair,
  input  logic [7:0]  mem_byte0,
  input  logic [7:0]  mem_byte1,
  // lane heads, seen by Fetch
  output logic [1:0]  head_valid,
  output logic [15:0] head_addr [2],
  output logic [7:0]  head_byte [2],
  output logic [$clog2(LANE_DEPTH+1)-1:0] lane_count [2],
  // routing orders from Fetch
  input  logic [2:0]  route [2],     // per lane: RT_* of lut_pkg
  input  logic        irq_ins,       // insert interrupt pseudo-instruction
  input  logic [15:0] irq_pc,        // its return address
  input  logic        flush,
  input  logic [2:0]  pc_hi,         // PC bits above the 8 kB memory
  // output channel status, seen by Fetch
  output logic        i1_free, i2_free, i3_free,
  // instruction channels to Decode
  output logic        i1_valid,
  input  logic        i1_ready,
  output instr1_t     i1_data,
  output logic        i2_valid,
  input  logic        i2_ready,
  output logic [7:0]  i2_data,
  output logic        i3_valid,
  input  logic        i3_ready,
  output logic [7:0]  i3_data,
  // code-read byte to the accumulator
  output logic        acc_valid,
  input  logic        acc_ready,
  output logic [7:0]  acc_data,
  output logic        acc_free
);
  localparam int CW = $clog2(LANE_DEPTH+1);
  localparam int PW = (LANE_DEPTH > 1) ? $clog2(LANE_DEPTH) : 1;

  // ---- lane FIFOs ----
  logic [7:0]  lb   [2][LANE_DEPTH];
  logic [15:0] la   [2][LANE_DEPTH];
  logic [PW-1:0] rp [2], wp [2];
  logic [CW-1:0] cnt [2];
  logic [1:0]  pop;

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      head_valid[l] = cnt[l] != '0;
      head_addr[l]  = la[l][rp[l]];
      head_byte[l]  = lb[l][rp[l]];
      lane_count[l] = cnt[l];
      pop[l]        = head_valid[l] && route[l] != RT_KEEP;
    end
  end

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (int'(p) == LANE_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 2; l++) begin
        rp[l] <= '0; wp[l] <= '0; cnt[l] <= '0;
      end
    end else if (flush) begin
      for (int l = 0; l < 2; l++) begin
        rp[l] <= '0; wp[l] <= '0; cnt[l] <= '0;
      end
    end else begin
      for (int l = 0; l < 2; l++) begin
        if (mem_valid) begin
          lb[l][wp[l]] <= l == 0 ? mem_byte0 : mem_byte1;
          la[l][wp[l]] <= {pc_hi, mem_pair, 1'(l)};
          wp[l] <= nxt(wp[l]);
        end
        if (pop[l]) rp[l] <= nxt(rp[l]);
        cnt[l] <= cnt[l] + CW'(mem_valid) - CW'(pop[l]);
      end
    end
  end

  // ---- output channels ----
  assign i1_free  = !i1_valid || i1_ready;
  assign i2_free  = !i2_valid || i2_ready;
  assign i3_free  = !i3_valid || i3_ready;
  assign acc_free = !acc_valid || acc_ready;

  logic       to1, to2, to3, toa;
  instr1_t    n1;
  logic [7:0] n2, n3, na;
  always_comb begin
    to1 = irq_ins; to2 = 1'b0; to3 = 1'b0; toa = 1'b0;
    n1  = '{irq: 1'b1, pc: irq_pc, op: 8'h00};
    n2  = '0; n3 = '0; na = '0;
    for (int l = 0; l < 2; l++) begin
      if (head_valid[l]) begin
        case (route[l])
          RT_I1:  begin to1 = 1'b1; n1 = '{irq: 1'b0, pc: head_addr[l], op: head_byte[l]}; end
          RT_I2:  begin to2 = 1'b1; n2 = head_byte[l]; end
          RT_I3:  begin to3 = 1'b1; n3 = head_byte[l]; end
          RT_ACC: begin toa = 1'b1; na = head_byte[l]; end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1_valid <= 1'b0; i2_valid <= 1'b0; i3_valid <= 1'b0; acc_valid <= 1'b0;
      i1_data <= '0; i2_data <= '0; i3_data <= '0; acc_data <= '0;
    end else begin
      if (to1) begin i1_valid <= 1'b1; i1_data <= n1; end
      else if (i1_ready) i1_valid <= 1'b0;
      if (to2) begin i2_valid <= 1'b1; i2_data <= n2; end
      else if (i2_ready) i2_valid <= 1'b0;
      if (to3) begin i3_valid <= 1'b1; i3_data <= n3; end
      else if (i3_ready) i3_valid <= 1'b0;
      if (toa) begin acc_valid <= 1'b1; acc_data <= na; end
      else if (acc_ready) acc_valid <= 1'b0;
    end
  end

  // Routing rules: never two bytes to one destination, never into a full
  // output register, never a pair into full lanes.
  a_one_dest: assert property (@(posedge clk) disable iff (!rst_n)
    !(head_valid[0] && head_valid[1] && route[0] == route[1] && route[0] >= RT_I1))
    else $error("switchbox: both lanes routed to one destination");
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(to1 && !i1_free) && !(to2 && !i2_free) && !(to3 && !i3_free) && !(toa && !acc_free))
    else $error("switchbox: byte routed into a full channel");
  a_irq_slot: assert property (@(posedge clk) disable iff (!rst_n)
    !(irq_ins && ((head_valid[0] && route[0] == RT_I1) || (head_valid[1] && route[1] == RT_I1))))
    else $error("switchbox: interrupt insert collides with an opcode");
  a_lane_room: assert property (@(posedge clk) disable iff (!rst_n)
    flush || !mem_valid || (int'(cnt[0]) - int'(pop[0]) < LANE_DEPTH && int'(cnt[1]) - int'(pop[1]) < LANE_DEPTH))
    else $error("switchbox: lane overflow");
endmodule

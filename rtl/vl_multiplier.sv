// Variable-latency shift-and-add multiplier, 8 x 8 -> 16 bits.
//
// The unit is a three-phase state machine (Empty, Busy, Full) with five
// registers: src1 and src2 (the operands), dst (the 16-bit accumulator), a
// 3-bit step counter and the phase. Each operation is a method with an
// enable input and a ready output; a method fires on a clock edge where its
// enable and its ready are both high.
//
//   enq  (ready in Empty): src1 <= a, src2 <= b, dst <= 0, count <= 0,
//                          phase <= Busy.
//   step (ready in Busy):  if src1 == 0 the phase becomes Full; otherwise
//                          dst <= dst + (src1[0] ? src2 << count : 0),
//                          src1 <= src1 >> 1, count <= count + 1.
//   deq  (ready in Full):  c shows dst; firing returns the phase to Empty.
//   empty_r / busy_r / full_r report the phase and need no handshake.
//
// Timing: the number of step firings from enq until Full is the bit length of
// a plus one (the last step only sees src1 == 0 and changes the phase), and
// it never depends on b. That is the unit's timing-security property: an
// observer who sees which methods fire and when, but not b or c, learns
// nothing about b or c. The product is on c combinationally while in Full.
//
// Follows the document: the register set, the phases, the guards and the
// shift-and-add step. This design's choices: the synchronous active-high
// reset to Empty with all registers cleared, and the phase encoding. The
// status enables empty_en, busy_en and full_en are kept because the port
// map has them, but the status outputs are pure functions of the phase, so
// the enables are intentionally unused.
module vl_multiplier
  import vl_mul_pkg::*;
#(
  parameter int unsigned OP_W = 8          // operand width; product is 2*OP_W
) (
  input  logic              clk,
  input  logic              rst,
  // enq
  input  logic              enq_en,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic              enq_rdy,
  // step
  input  logic              step_en,
  output logic              step_rdy,
  // deq
  input  logic              deq_en,
  output logic              deq_rdy,
  output logic [2*OP_W-1:0] c,
  // status
  input  logic              empty_en,
  input  logic              busy_en,
  input  logic              full_en,
  output logic              empty_r,
  output logic              busy_r,
  output logic              full_r
);

  localparam int unsigned CNT_W = $clog2(OP_W);

  phase_e              phase;
  logic [OP_W-1:0]     src1, src2;
  logic [2*OP_W-1:0]   dst;
  logic [CNT_W-1:0]    count;

  logic                enq_fire, step_fire, deq_fire;
  logic [2*OP_W-1:0]   addend;

  assign enq_rdy  = (phase == PH_EMPTY);
  assign step_rdy = (phase == PH_BUSY);
  assign deq_rdy  = (phase == PH_FULL);

  assign enq_fire  = enq_en  && enq_rdy;
  assign step_fire = step_en && step_rdy;
  assign deq_fire  = deq_en  && deq_rdy;

  assign empty_r = (phase == PH_EMPTY);
  assign busy_r  = (phase == PH_BUSY);
  assign full_r  = (phase == PH_FULL);

  assign c = dst;

  // Partial product of this step: src2 shifted left by the bit position.
  always_comb begin
    addend = '0;
    if (src1[0]) addend = {{OP_W{1'b0}}, src2} << count;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_EMPTY;
      src1  <= '0;
      src2  <= '0;
      dst   <= '0;
      count <= '0;
    end else begin
      if (enq_fire) begin
        src1  <= a;
        src2  <= b;
        dst   <= '0;
        count <= '0;
        phase <= PH_BUSY;
      end
      if (step_fire) begin
        if (src1 == '0) begin
          phase <= PH_FULL;
        end else begin
          dst   <= dst + addend;
          src1  <= src1 >> 1;
          count <= count + 1'b1;
        end
      end
      if (deq_fire) phase <= PH_EMPTY;
    end
  end

  // The three action guards are disjoint, so at most one method fires.
  a_one_action: assert property (@(posedge clk) disable iff (rst)
    $onehot0({enq_fire, step_fire, deq_fire}));

endmodule

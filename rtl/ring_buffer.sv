// Ring buffer with squash and in-place update, for use as a reorder buffer.
//
// 2^N slots of M bits live in a register array. Three control registers track
// the live region: head (oldest entry), tail (next free slot), both N bits and
// wrapping naturally, and a full flag that tells a full buffer from an empty
// one when head == tail. A slot index idx is valid (holds a live entry) when
// the buffer is full or when (idx - head) < (tail - head) in N-bit arithmetic.
//
// Value methods (combinational, from the registers):
//   empty   = !full && head == tail
//   full    = the full flag
//   first   = entries[head], first_rdy = !empty
//   tail    = the tail pointer
//   sub     = entries[sub_idx], sub_rdy = sub_idx is valid
// Action methods (enable + ready; they take effect at the clock edge):
//   enq     (ready when !full):  entries[tail] <= e, tail <= tail + 1,
//                                 full <= (tail + 1 == head)
//   deq     (ready when !empty): head <= head + 1, full <= 0
//   squash  (ready when squash_tail is valid): tail <= squash_tail, full <= 0;
//                                 every entry from squash_tail onwards is
//                                 discarded (squash_tail == head empties it)
//   upd     (ready when upd_idx is valid): entries[upd_idx] <= upd_e
// Reset empties the buffer: head = tail = 0, full = 0. Slot contents are
// not reset; slots outside the live region are never read as valid data.
//
// Follows the document: the methods, their guards, the register set, the
// pointer updates and the validity comparison. This design's choices: the
// validity test also accepts every index while full (the plain comparison
// gives 0 < 0 there, yet every slot is live), the synchronous active-high
// reset, and the rule that the caller enables at most one action method per
// cycle (checked by an assertion; if several are enabled anyway, squash wins
// over upd, upd over deq, deq over enq).
module ring_buffer #(
  parameter int unsigned N = 5,     // address width: 2^N slots
  parameter int unsigned M = 128    // entry width in bits
) (
  input  logic         clk,
  input  logic         rst,
  // value methods
  output logic         empty,
  output logic         full,
  output logic [M-1:0] first,
  output logic         first_rdy,
  output logic [N-1:0] tail,
  input  logic [N-1:0] sub_idx,
  output logic [M-1:0] sub,
  output logic         sub_rdy,
  // deq
  input  logic         deq_en,
  output logic         deq_rdy,
  // enq
  input  logic         enq_en,
  input  logic [M-1:0] enq_e,
  output logic         enq_rdy,
  // squash
  input  logic         squash_en,
  input  logic [N-1:0] squash_tail,
  output logic         squash_rdy,
  // upd
  input  logic         upd_en,
  input  logic [N-1:0] upd_idx,
  input  logic [M-1:0] upd_e,
  output logic         upd_rdy
);

  localparam int unsigned DEPTH = 1 << N;

  logic [M-1:0] entries [DEPTH];
  logic [N-1:0] head_q, tail_q;
  logic         full_q;

  logic deq_fire, enq_fire, squash_fire, upd_fire;

  // Is idx inside the live region [head, tail)?
  function automatic logic is_valid(input logic [N-1:0] idx,
                                    input logic [N-1:0] hd,
                                    input logic [N-1:0] tl,
                                    input logic         fl);
    logic [N-1:0] offs, live;
    offs = idx - hd;
    live = tl - hd;
    return fl || (offs < live);
  endfunction

  assign full      = full_q;
  assign empty     = !full_q && (head_q == tail_q);
  assign tail      = tail_q;
  assign first     = entries[head_q];
  assign first_rdy = !empty;
  assign sub       = entries[sub_idx];
  assign sub_rdy   = is_valid(sub_idx, head_q, tail_q, full_q);

  assign enq_rdy    = !full_q;
  assign deq_rdy    = !empty;
  assign squash_rdy = is_valid(squash_tail, head_q, tail_q, full_q);
  assign upd_rdy    = is_valid(upd_idx, head_q, tail_q, full_q);

  assign squash_fire = squash_en && squash_rdy;
  assign upd_fire    = upd_en && upd_rdy && !squash_en;
  assign deq_fire    = deq_en && deq_rdy && !squash_en && !upd_en;
  assign enq_fire    = enq_en && enq_rdy && !squash_en && !upd_en && !deq_en;

  // Control registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      head_q <= '0;
      tail_q <= '0;
      full_q <= 1'b0;
    end else if (squash_fire) begin
      tail_q <= squash_tail;
      full_q <= 1'b0;
    end else if (deq_fire) begin
      head_q <= head_q + 1'b1;
      full_q <= 1'b0;
    end else if (enq_fire) begin
      tail_q <= tail_q + 1'b1;
      full_q <= ((tail_q + 1'b1) == head_q);
    end
  end

  // Slot storage: one write port, shared by enq and upd.
  always_ff @(posedge clk) begin
    if (upd_fire)      entries[upd_idx] <= upd_e;
    else if (enq_fire) entries[tail_q]  <= enq_e;
  end

  // Caller obligation: at most one action method per cycle.
  a_one_action: assert property (@(posedge clk) disable iff (rst)
    $onehot0({deq_en, enq_en, squash_en, upd_en}));

endmodule

// Random-stimulus checker for one ring_buffer configuration.
//
// Keeps a reference model (a queue of live entries plus a tail index, the
// head being tail minus the size modulo 2^N) and each cycle compares every
// value method and every ready signal of the buffer with the model, then
// fires one random action method (in alternating filling and mixed phases) (enq, deq, squash, upd, or nothing) with
// arguments that are sometimes invalid, and applies the same operation to
// the model when its guard holds. It counts how often the interesting cases
// happened: full, wrap-around of the tail, squash to a partial and to an
// empty buffer, upd, and a refused call; a case that never happened counts
// as a failure. Reports through done/checks/failures.
module rb_checker #(
  parameter int unsigned N = 3,
  parameter int unsigned M = 32,
  parameter int unsigned OPS = 2000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned DEPTH = 1 << N;
  // stimulus alternates between filling and mixed phases of this many ops
  localparam int unsigned PHASE = (3 * DEPTH > 300) ? 3 * DEPTH : 300;

  logic         empty, full, first_rdy, sub_rdy;
  logic         deq_rdy, enq_rdy, squash_rdy, upd_rdy;
  logic [M-1:0] first, sub, enq_e, upd_e;
  logic [N-1:0] tail, sub_idx, squash_tail, upd_idx;
  logic         deq_en, enq_en, squash_en, upd_en;

  ring_buffer #(.N(N), .M(M)) dut (
    .clk, .rst, .empty, .full, .first, .first_rdy, .tail,
    .sub_idx, .sub, .sub_rdy, .deq_en, .deq_rdy, .enq_en, .enq_e, .enq_rdy,
    .squash_en, .squash_tail, .squash_rdy, .upd_en, .upd_idx, .upd_e, .upd_rdy
  );

  // reference model
  logic [M-1:0] q[$];
  int unsigned  m_tail;

  int n_full, n_wrap, n_squash_part, n_squash_empty, n_upd, n_refused, n_deq;

  function automatic logic [M-1:0] rand_word();
    logic [M-1:0] w;
    for (int i = 0; i < M; i += 32) w = {w, 32'($urandom)};
    return w;
  endfunction

  function automatic int unsigned m_head();
    return (m_tail + DEPTH - q.size()) % DEPTH;
  endfunction

  // position of slot idx in the queue, -1 if not live
  function automatic int m_pos(input int unsigned idx);
    int unsigned off = (idx + DEPTH - m_head()) % DEPTH;
    if (q.size() == DEPTH) return int'(off);
    return (off < q.size()) ? int'(off) : -1;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d M=%0d): %s", N, M, what);
    end
  endtask

  function automatic logic [N-1:0] pick_idx();
    // mostly live slots, sometimes any slot
    if (q.size() != 0 && $urandom_range(3) != 0)
      return N'((m_head() + $urandom_range(q.size() - 1)) % DEPTH);
    return N'($urandom);
  endfunction

  initial begin
    int op, p;
    done = 0; checks = 0; failures = 0;
    m_tail = 0;
    n_full = 0; n_wrap = 0; n_squash_part = 0; n_squash_empty = 0;
    n_upd = 0; n_refused = 0; n_deq = 0;
    deq_en = 0; enq_en = 0; squash_en = 0; upd_en = 0;
    enq_e = '0; upd_e = '0; sub_idx = '0; squash_tail = '0; upd_idx = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int k = 0; k < OPS; k++) begin
      // pick the action and its arguments; phases of filling and draining
      sub_idx = pick_idx();
      op = $urandom_range(99);
      if (((k / PHASE) % 2) == 0 && op < 80) op = 0;       // filling phase
      deq_en = 0; enq_en = 0; squash_en = 0; upd_en = 0;
      if (op < 35) begin
        enq_en = 1; enq_e = rand_word();
      end else if (op < 60) begin
        deq_en = 1;
      end else if (op < 68) begin
        squash_en = 1; squash_tail = pick_idx();
      end else if (op < 88) begin
        upd_en = 1; upd_idx = pick_idx(); upd_e = rand_word();
      end
      #1;
      // value methods and guards against the model
      check(full == (q.size() == DEPTH), "full");
      check(empty == (q.size() == 0), "empty");
      check(tail == N'(m_tail), "tail");
      check(first_rdy == (q.size() != 0), "first_rdy");
      if (q.size() != 0) check(first == q[0], "first");
      p = m_pos(sub_idx);
      check(sub_rdy == (p >= 0), $sformatf("sub_rdy idx=%0d", sub_idx));
      if (p >= 0) check(sub == q[p], $sformatf("sub idx=%0d", sub_idx));
      check(enq_rdy == (q.size() != DEPTH), "enq_rdy");
      check(deq_rdy == (q.size() != 0), "deq_rdy");
      check(squash_rdy == (m_pos(squash_tail) >= 0), "squash_rdy");
      check(upd_rdy == (m_pos(upd_idx) >= 0), "upd_rdy");
      // apply to the model what fires at the coming edge
      if (enq_en) begin
        if (q.size() != DEPTH) begin
          q.push_back(enq_e);
          if (m_tail == DEPTH - 1) n_wrap++;
          m_tail = (m_tail + 1) % DEPTH;
          if (q.size() == DEPTH) n_full++;
        end else n_refused++;
      end
      if (deq_en) begin
        if (q.size() != 0) begin void'(q.pop_front()); n_deq++; end
        else n_refused++;
      end
      if (squash_en) begin
        p = m_pos(squash_tail);
        if (p >= 0) begin
          while (q.size() > p) void'(q.pop_back());
          m_tail = squash_tail;
          if (p == 0) n_squash_empty++; else n_squash_part++;
        end else n_refused++;
      end
      if (upd_en) begin
        p = m_pos(upd_idx);
        if (p >= 0) begin q[p] = upd_e; n_upd++; end
        else n_refused++;
      end
      @(negedge clk);
    end
    deq_en = 0; enq_en = 0; squash_en = 0; upd_en = 0;
    check(n_full > 0, "full never reached");
    check(n_wrap > 0, "tail never wrapped");
    check(n_squash_part > 0, "no partial squash");
    check(n_squash_empty > 0, "no squash to empty");
    check(n_upd > 0, "no upd");
    check(n_deq > 0, "no deq");
    check(n_refused > 0, "no refused call");
    $display("rb_checker N=%0d M=%0d: full=%0d wrap=%0d squash_part=%0d squash_empty=%0d upd=%0d refused=%0d",
             N, M, n_full, n_wrap, n_squash_part, n_squash_empty, n_upd, n_refused);
    done = 1;
  end

endmodule

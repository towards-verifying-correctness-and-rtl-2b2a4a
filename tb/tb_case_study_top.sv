// End-to-end testbench for case_study_top at its default parameters.
//
// Every cycle it drives random method calls into all four blocks at once and
// checks every output against reference models kept here:
//   ring buffer  a queue of live entries and a tail index
//   multiplier   the phase, the remaining first operand and a*b
//   GCD          the two registers under the subtract-the-smaller rule, and
//                Euclid's gcd once finished
//   RAT          a future and a commit table
// It counts each mechanism the blocks have and fails if one never happened:
// ring buffer full, tail wrap, partial squash, squash to empty, upd, refused
// call; multiplier product, zero-operand run, refused call; GCD finish,
// refused step; RAT squash and squash with a same-cycle commit.
module tb_case_study_top;

  localparam int RB_N = 5, RB_M = 128, MUL_W = 8, GCD_W = 16;
  localparam int AR = 32, PR = 64, RP = 2;
  localparam int DEPTH = 1 << RB_N;
  localparam int AW = $clog2(AR), PW = $clog2(PR);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // ring buffer
  logic rb_empty, rb_full, rb_first_rdy, rb_sub_rdy, rb_deq_rdy, rb_enq_rdy, rb_squash_rdy, rb_upd_rdy;
  logic [RB_M-1:0] rb_first, rb_sub, rb_enq_e, rb_upd_e;
  logic [RB_N-1:0] rb_tail, rb_sub_idx, rb_squash_tail, rb_upd_idx;
  logic rb_deq_en, rb_enq_en, rb_squash_en, rb_upd_en;
  // multiplier
  logic mul_enq_en, mul_step_en, mul_deq_en;
  logic [MUL_W-1:0] mul_a, mul_b;
  logic mul_enq_rdy, mul_step_rdy, mul_deq_rdy, mul_empty_r, mul_busy_r, mul_full_r;
  logic [2*MUL_W-1:0] mul_c;
  // gcd
  logic gcd_load_en, gcd_step_en, gcd_step_rdy, gcd_finished;
  logic [GCD_W-1:0] gcd_load_a, gcd_load_b, gcd_result;
  // rat
  logic [AW-1:0] rat_rd_arch [RP];
  logic [PW-1:0] rat_rd_phys [RP];
  logic rat_ren_en, rat_com_en, rat_squash;
  logic [AW-1:0] rat_ren_arch, rat_com_arch;
  logic [PW-1:0] rat_ren_phys, rat_com_phys;

  case_study_top dut (
    .clk, .rst,
    .rb_empty, .rb_full, .rb_first, .rb_first_rdy, .rb_tail, .rb_sub_idx, .rb_sub, .rb_sub_rdy,
    .rb_deq_en, .rb_deq_rdy, .rb_enq_en, .rb_enq_e, .rb_enq_rdy,
    .rb_squash_en, .rb_squash_tail, .rb_squash_rdy, .rb_upd_en, .rb_upd_idx, .rb_upd_e, .rb_upd_rdy,
    .mul_enq_en, .mul_a, .mul_b, .mul_enq_rdy, .mul_step_en, .mul_step_rdy,
    .mul_deq_en, .mul_deq_rdy, .mul_c,
    .mul_empty_en(1'b1), .mul_busy_en(1'b1), .mul_full_en(1'b1),
    .mul_empty_r, .mul_busy_r, .mul_full_r,
    .gcd_load_en, .gcd_load_a, .gcd_load_b, .gcd_step_en, .gcd_step_rdy, .gcd_result, .gcd_finished,
    .rat_rd_arch, .rat_rd_phys, .rat_ren_en, .rat_ren_arch, .rat_ren_phys,
    .rat_com_en, .rat_com_arch, .rat_com_phys, .rat_squash
  );

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- reference models ----------------
  logic [RB_M-1:0] q[$];
  int unsigned     rb_t;
  int              m_phase;            // 0 empty, 1 busy, 2 full
  logic [MUL_W-1:0] m_src1;
  logic [2*MUL_W-1:0] m_prod;
  int              m_steps, m_len;
  logic [GCD_W-1:0] g_x, g_y, g_a, g_b;
  logic [PW-1:0]   fut [AR];
  logic [PW-1:0]   com [AR];

  // mechanism counters
  int n_rb_full, n_rb_wrap, n_rb_sq_part, n_rb_sq_empty, n_rb_upd, n_rb_ref;
  int n_mul_done, n_mul_zero, n_mul_ref, n_gcd_done, n_gcd_ref, n_rat_sq, n_rat_sq_com;

  function automatic logic [RB_M-1:0] rand_word();
    logic [RB_M-1:0] w;
    for (int i = 0; i < RB_M; i += 32) w = {w, 32'($urandom)};
    return w;
  endfunction

  function automatic int unsigned rb_head();
    return (rb_t + DEPTH - q.size()) % DEPTH;
  endfunction

  function automatic int rb_pos(input int unsigned idx);
    int unsigned off = (idx + DEPTH - rb_head()) % DEPTH;
    if (q.size() == DEPTH) return int'(off);
    return (off < q.size()) ? int'(off) : -1;
  endfunction

  function automatic logic [RB_N-1:0] rb_pick();
    if (q.size() != 0 && $urandom_range(3) != 0)
      return RB_N'((rb_head() + $urandom_range(q.size() - 1)) % DEPTH);
    return RB_N'($urandom);
  endfunction

  function automatic int bitlen(input logic [MUL_W-1:0] v);
    int n = 0;
    for (int i = 0; i < MUL_W; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  function automatic int unsigned euclid(input int unsigned x, input int unsigned y);
    while (y != 0) begin
      int unsigned t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int op, p;
    rb_deq_en = 0; rb_enq_en = 0; rb_squash_en = 0; rb_upd_en = 0;
    rb_enq_e = '0; rb_upd_e = '0; rb_sub_idx = '0; rb_squash_tail = '0; rb_upd_idx = '0;
    mul_enq_en = 0; mul_step_en = 0; mul_deq_en = 0; mul_a = '0; mul_b = '0;
    gcd_load_en = 0; gcd_step_en = 0; gcd_load_a = '0; gcd_load_b = '0;
    rat_ren_en = 0; rat_com_en = 0; rat_squash = 0;
    rat_ren_arch = '0; rat_com_arch = '0; rat_ren_phys = '0; rat_com_phys = '0;
    for (int i = 0; i < RP; i++) rat_rd_arch[i] = '0;
    rb_t = 0; m_phase = 0; m_src1 = '0; m_prod = '0; m_steps = 0; m_len = 0;
    g_x = '0; g_y = '0; g_a = '0; g_b = '0;
    for (int r = 0; r < AR; r++) begin fut[r] = PW'(r); com[r] = PW'(r); end
    {n_rb_full, n_rb_wrap, n_rb_sq_part, n_rb_sq_empty, n_rb_upd, n_rb_ref} = '0;
    {n_mul_done, n_mul_zero, n_mul_ref, n_gcd_done, n_gcd_ref, n_rat_sq, n_rat_sq_com} = '0;

    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    for (int k = 0; k < 20000; k++) begin
      // ---- choose this cycle's calls ----
      rb_sub_idx = rb_pick();
      op = $urandom_range(99);
      if (((k / 400) % 2) == 0) op = (op < 55) ? 0 : op;
      rb_deq_en = 0; rb_enq_en = 0; rb_squash_en = 0; rb_upd_en = 0;
      if (op < 35)      begin rb_enq_en = 1; rb_enq_e = rand_word(); end
      else if (op < 60) rb_deq_en = 1;
      else if (op < 68) begin rb_squash_en = 1; rb_squash_tail = rb_pick(); end
      else if (op < 88) begin rb_upd_en = 1; rb_upd_idx = rb_pick(); rb_upd_e = rand_word(); end

      mul_enq_en  = ($urandom_range(3) == 0);
      mul_a       = ($urandom_range(9) == 0) ? '0 : MUL_W'($urandom);
      mul_b       = MUL_W'($urandom);
      mul_step_en = ($urandom_range(4) != 0);
      mul_deq_en  = ($urandom_range(2) == 0);

      gcd_load_en = (g_y == 0) ? ($urandom_range(3) == 0) : ($urandom_range(400) == 0);
      gcd_load_a  = GCD_W'($urandom_range(2000, 1));
      gcd_load_b  = ($urandom_range(7) == 0) ? '0 : GCD_W'($urandom_range(2000, 1));
      gcd_step_en = ($urandom_range(5) != 0);

      rat_ren_en   = ($urandom_range(2) != 0);
      rat_ren_arch = AW'($urandom); rat_ren_phys = PW'($urandom);
      rat_com_en   = ($urandom_range(2) == 0);
      rat_com_arch = AW'($urandom); rat_com_phys = PW'($urandom);
      rat_squash   = ($urandom_range(60) == 0);
      for (int i = 0; i < RP; i++) rat_rd_arch[i] = AW'($urandom);
      #1;

      // ---- compare outputs with the models ----
      check(rb_full == (q.size() == DEPTH) && rb_empty == (q.size() == 0), "rb full/empty");
      check(rb_tail == RB_N'(rb_t), "rb tail");
      if (q.size() != 0) check(rb_first_rdy && rb_first == q[0], "rb first");
      p = rb_pos(rb_sub_idx);
      check(rb_sub_rdy == (p >= 0), "rb sub_rdy");
      if (p >= 0) check(rb_sub == q[p], "rb sub");
      check(rb_enq_rdy == (q.size() != DEPTH) && rb_deq_rdy == (q.size() != 0), "rb enq/deq rdy");
      check(rb_squash_rdy == (rb_pos(rb_squash_tail) >= 0), "rb squash_rdy");
      check(rb_upd_rdy == (rb_pos(rb_upd_idx) >= 0), "rb upd_rdy");

      check(mul_empty_r == (m_phase == 0) && mul_busy_r == (m_phase == 1) &&
            mul_full_r == (m_phase == 2), "mul phase");
      check(mul_enq_rdy == (m_phase == 0) && mul_step_rdy == (m_phase == 1) &&
            mul_deq_rdy == (m_phase == 2), "mul ready");
      if (m_phase == 2) check(mul_c == m_prod, $sformatf("mul product %0d got %0d", m_prod, mul_c));

      check(gcd_result == g_x && gcd_finished == (g_y == 0) && gcd_step_rdy == (g_y != 0), "gcd state");

      for (int i = 0; i < RP; i++) check(rat_rd_phys[i] == fut[rat_rd_arch[i]], "rat read");

      // ---- advance the models as the edge will ----
      if (rb_enq_en) begin
        if (q.size() != DEPTH) begin
          q.push_back(rb_enq_e);
          if (rb_t == DEPTH - 1) n_rb_wrap++;
          rb_t = (rb_t + 1) % DEPTH;
          if (q.size() == DEPTH) n_rb_full++;
        end else n_rb_ref++;
      end
      if (rb_deq_en) begin
        if (q.size() != 0) void'(q.pop_front()); else n_rb_ref++;
      end
      if (rb_squash_en) begin
        p = rb_pos(rb_squash_tail);
        if (p >= 0) begin
          while (q.size() > p) void'(q.pop_back());
          rb_t = rb_squash_tail;
          if (p == 0) n_rb_sq_empty++; else n_rb_sq_part++;
        end else n_rb_ref++;
      end
      if (rb_upd_en) begin
        p = rb_pos(rb_upd_idx);
        if (p >= 0) begin q[p] = rb_upd_e; n_rb_upd++; end else n_rb_ref++;
      end

      case (m_phase)
        0: begin
          if (mul_step_en || mul_deq_en) n_mul_ref++;
          if (mul_enq_en) begin
            m_phase = 1; m_src1 = mul_a; m_prod = 16'(mul_a) * 16'(mul_b);
            m_steps = 0; m_len = bitlen(mul_a);
            if (mul_a == 0) n_mul_zero++;
          end
        end
        1: begin
          if (mul_enq_en || mul_deq_en) n_mul_ref++;
          if (mul_step_en) begin
            m_steps++;
            if (m_src1 == 0) begin
              m_phase = 2;
              check(m_steps == m_len + 1, "mul latency");
            end else m_src1 = m_src1 >> 1;
          end
        end
        default: begin
          if (mul_enq_en || mul_step_en) n_mul_ref++;
          if (mul_deq_en) begin m_phase = 0; n_mul_done++; end
        end
      endcase

      if (gcd_load_en) begin
        g_x = gcd_load_a; g_y = gcd_load_b; g_a = gcd_load_a; g_b = gcd_load_b;
      end else if (gcd_step_en) begin
        if (g_y != 0) begin
          if (g_x > g_y) g_x = g_x - g_y; else g_y = g_y - g_x;
          if (g_y == 0) begin
            n_gcd_done++;
            check(g_x == GCD_W'(euclid(g_a, g_b)), "gcd value");
          end
        end else n_gcd_ref++;
      end

      if (rat_com_en) com[rat_com_arch] = rat_com_phys;
      if (rat_squash) begin
        n_rat_sq++;
        if (rat_com_en) n_rat_sq_com++;
        for (int r = 0; r < AR; r++) fut[r] = com[r];
      end else if (rat_ren_en) fut[rat_ren_arch] = rat_ren_phys;

      @(negedge clk);
    end

    $display("rb: full=%0d wrap=%0d squash_part=%0d squash_empty=%0d upd=%0d refused=%0d",
             n_rb_full, n_rb_wrap, n_rb_sq_part, n_rb_sq_empty, n_rb_upd, n_rb_ref);
    $display("mul: products=%0d zero_a=%0d refused=%0d  gcd: finished=%0d refused=%0d  rat: squash=%0d squash_with_commit=%0d",
             n_mul_done, n_mul_zero, n_mul_ref, n_gcd_done, n_gcd_ref, n_rat_sq, n_rat_sq_com);
    check(n_rb_full > 0, "rb never full");
    check(n_rb_wrap > 0, "rb never wrapped");
    check(n_rb_sq_part > 0, "rb no partial squash");
    check(n_rb_sq_empty > 0, "rb no squash to empty");
    check(n_rb_upd > 0, "rb no upd");
    check(n_rb_ref > 0, "rb no refused call");
    check(n_mul_done > 0, "mul no product");
    check(n_mul_zero > 0, "mul no zero operand");
    check(n_mul_ref > 0, "mul no refused call");
    check(n_gcd_done > 0, "gcd never finished");
    check(n_gcd_ref > 0, "gcd no refused step");
    check(n_rat_sq > 0, "rat no squash");
    check(n_rat_sq_com > 0, "rat no squash with commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

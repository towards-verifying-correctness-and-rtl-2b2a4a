// Top level: the verified building blocks of an out-of-order core, side by side.
//
// The out-of-order machine this work targets is proved correct one submodule
// at a time. The circuits given in enough detail to build are instantiated
// here next to each other, each with its own method ports brought out under a
// prefix, and share only the clock and the synchronous active-high reset:
//   rb_*   ring_buffer    reorder-buffer storage with squash and update
//   mul_*  vl_multiplier  variable-latency, timing-safe 8 x 8 multiplier
//   gcd_*  gcd            16-bit subtractive GCD unit
//   rat_*  dual_rat       future / commit register-alias tables
// They are not wired to each other: the pipeline stages that would connect
// them (fetch, decode, rename, issue, writeback, retire) are outside this
// design, so a user of the top plays the role of those stages. Timing of
// each group is that of the instantiated block.
module case_study_top #(
  parameter int unsigned RB_N      = 5,
  parameter int unsigned RB_M      = 128,
  parameter int unsigned MUL_W     = 8,
  parameter int unsigned GCD_W     = 16,
  parameter int unsigned ARCH_REGS = 32,
  parameter int unsigned PHYS_REGS = 64,
  parameter int unsigned RAT_RD    = 2
) (
  input  logic                         clk,
  input  logic                         rst,
  // ring buffer
  output logic                         rb_empty,
  output logic                         rb_full,
  output logic [RB_M-1:0]              rb_first,
  output logic                         rb_first_rdy,
  output logic [RB_N-1:0]              rb_tail,
  input  logic [RB_N-1:0]              rb_sub_idx,
  output logic [RB_M-1:0]              rb_sub,
  output logic                         rb_sub_rdy,
  input  logic                         rb_deq_en,
  output logic                         rb_deq_rdy,
  input  logic                         rb_enq_en,
  input  logic [RB_M-1:0]              rb_enq_e,
  output logic                         rb_enq_rdy,
  input  logic                         rb_squash_en,
  input  logic [RB_N-1:0]              rb_squash_tail,
  output logic                         rb_squash_rdy,
  input  logic                         rb_upd_en,
  input  logic [RB_N-1:0]              rb_upd_idx,
  input  logic [RB_M-1:0]              rb_upd_e,
  output logic                         rb_upd_rdy,
  // multiplier
  input  logic                         mul_enq_en,
  input  logic [MUL_W-1:0]             mul_a,
  input  logic [MUL_W-1:0]             mul_b,
  output logic                         mul_enq_rdy,
  input  logic                         mul_step_en,
  output logic                         mul_step_rdy,
  input  logic                         mul_deq_en,
  output logic                         mul_deq_rdy,
  output logic [2*MUL_W-1:0]           mul_c,
  input  logic                         mul_empty_en,
  input  logic                         mul_busy_en,
  input  logic                         mul_full_en,
  output logic                         mul_empty_r,
  output logic                         mul_busy_r,
  output logic                         mul_full_r,
  // GCD
  input  logic                         gcd_load_en,
  input  logic [GCD_W-1:0]             gcd_load_a,
  input  logic [GCD_W-1:0]             gcd_load_b,
  input  logic                         gcd_step_en,
  output logic                         gcd_step_rdy,
  output logic [GCD_W-1:0]             gcd_result,
  output logic                         gcd_finished,
  // register-alias tables
  input  logic [$clog2(ARCH_REGS)-1:0] rat_rd_arch [RAT_RD],
  output logic [$clog2(PHYS_REGS)-1:0] rat_rd_phys [RAT_RD],
  input  logic                         rat_ren_en,
  input  logic [$clog2(ARCH_REGS)-1:0] rat_ren_arch,
  input  logic [$clog2(PHYS_REGS)-1:0] rat_ren_phys,
  input  logic                         rat_com_en,
  input  logic [$clog2(ARCH_REGS)-1:0] rat_com_arch,
  input  logic [$clog2(PHYS_REGS)-1:0] rat_com_phys,
  input  logic                         rat_squash
);

  ring_buffer #(.N(RB_N), .M(RB_M)) u_rob (
    .clk, .rst,
    .empty(rb_empty), .full(rb_full),
    .first(rb_first), .first_rdy(rb_first_rdy),
    .tail(rb_tail),
    .sub_idx(rb_sub_idx), .sub(rb_sub), .sub_rdy(rb_sub_rdy),
    .deq_en(rb_deq_en), .deq_rdy(rb_deq_rdy),
    .enq_en(rb_enq_en), .enq_e(rb_enq_e), .enq_rdy(rb_enq_rdy),
    .squash_en(rb_squash_en), .squash_tail(rb_squash_tail),
    .squash_rdy(rb_squash_rdy),
    .upd_en(rb_upd_en), .upd_idx(rb_upd_idx), .upd_e(rb_upd_e),
    .upd_rdy(rb_upd_rdy)
  );

  vl_multiplier #(.OP_W(MUL_W)) u_mul (
    .clk, .rst,
    .enq_en(mul_enq_en), .a(mul_a), .b(mul_b), .enq_rdy(mul_enq_rdy),
    .step_en(mul_step_en), .step_rdy(mul_step_rdy),
    .deq_en(mul_deq_en), .deq_rdy(mul_deq_rdy), .c(mul_c),
    .empty_en(mul_empty_en), .busy_en(mul_busy_en), .full_en(mul_full_en),
    .empty_r(mul_empty_r), .busy_r(mul_busy_r), .full_r(mul_full_r)
  );

  gcd #(.W(GCD_W)) u_gcd (
    .clk, .rst,
    .load_en(gcd_load_en), .load_a(gcd_load_a), .load_b(gcd_load_b),
    .step_en(gcd_step_en), .step_rdy(gcd_step_rdy),
    .result(gcd_result), .finished(gcd_finished)
  );

  dual_rat #(.ARCH_REGS(ARCH_REGS), .PHYS_REGS(PHYS_REGS), .RD_PORTS(RAT_RD)) u_rat (
    .clk, .rst,
    .rd_arch(rat_rd_arch), .rd_phys(rat_rd_phys),
    .ren_en(rat_ren_en), .ren_arch(rat_ren_arch), .ren_phys(rat_ren_phys),
    .com_en(rat_com_en), .com_arch(rat_com_arch), .com_phys(rat_com_phys),
    .squash(rat_squash)
  );

endmodule

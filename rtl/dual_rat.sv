// Dual register-alias table: speculative (future) and retired (commit) maps.
//
// Renaming keeps two tables from architectural to physical register number.
// The future table holds the newest, speculative mapping: the rename stage
// reads source mappings from it and writes each new destination mapping into
// it. The commit table holds the mapping as of the last retired instruction:
// the retire stage writes each retiring destination mapping into it. A squash
// throws away all speculative renaming by copying the commit table into the
// future table in one cycle, so no per-instruction previous mapping has to be
// kept in the reorder buffer.
//
// Interface and timing:
//   rd_arch[i] -> rd_phys[i]   combinational reads of the future table
//   ren_en/ren_arch/ren_phys    future[ren_arch] <= ren_phys at the edge
//   com_en/com_arch/com_phys    commit[com_arch] <= com_phys at the edge
//   squash                      future <= commit at the edge, where commit
//                               already includes a com_en write of the same
//                               cycle; a squash overrides a rename write
// Reads do not see a write of the same cycle. Reset maps architectural
// register i to physical register i in both tables.
//
// Follows the document: the two tables, what each holds and the squash that
// reverts the future table to the commit table. This design's choices: the
// table sizes (32 architectural, 64 physical registers), the number of read
// ports, the same-cycle rules and the reset mapping.
module dual_rat #(
  parameter int unsigned ARCH_REGS = 32,
  parameter int unsigned PHYS_REGS = 64,
  parameter int unsigned RD_PORTS  = 2
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [$clog2(ARCH_REGS)-1:0] rd_arch [RD_PORTS],
  output logic [$clog2(PHYS_REGS)-1:0] rd_phys [RD_PORTS],
  input  logic                         ren_en,
  input  logic [$clog2(ARCH_REGS)-1:0] ren_arch,
  input  logic [$clog2(PHYS_REGS)-1:0] ren_phys,
  input  logic                         com_en,
  input  logic [$clog2(ARCH_REGS)-1:0] com_arch,
  input  logic [$clog2(PHYS_REGS)-1:0] com_phys,
  input  logic                         squash
);

  localparam int unsigned PW = $clog2(PHYS_REGS);

  logic [PW-1:0] future_q [ARCH_REGS];
  logic [PW-1:0] commit_q [ARCH_REGS];
  logic [PW-1:0] commit_d [ARCH_REGS];

  // Commit table including this cycle's retirement write.
  always_comb begin
    commit_d = commit_q;
    if (com_en) commit_d[com_arch] = com_phys;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned r = 0; r < ARCH_REGS; r++) begin
        future_q[r] <= PW'(r);
        commit_q[r] <= PW'(r);
      end
    end else begin
      commit_q <= commit_d;
      if (squash)      future_q <= commit_d;
      else if (ren_en) future_q[ren_arch] <= ren_phys;
    end
  end

  for (genvar p = 0; p < RD_PORTS; p++) begin : g_rd
    assign rd_phys[p] = future_q[rd_arch[p]];
  end

  initial begin
    assert (ARCH_REGS <= PHYS_REGS)
      else $error("dual_rat: fewer physical than architectural registers");
  end

endmodule

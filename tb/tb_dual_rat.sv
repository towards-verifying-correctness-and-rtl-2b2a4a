// Self-checking testbench for dual_rat.
//
// Drives random renames, commits and occasional squashes and keeps two
// reference tables here. Every cycle it reads all architectural registers
// through the read ports and compares them with the reference future table;
// after each squash the future table must equal the commit table (including
// a commit of the same cycle). Counts squashes with and without a same-cycle
// commit and rename so that each rule is exercised.
module tb_dual_rat;

  localparam int AR = 32, PR = 64, RP = 2;
  localparam int AW = $clog2(AR), PW = $clog2(PR);

  logic clk = 0, rst = 1;
  logic [AW-1:0] rd_arch [RP];
  logic [PW-1:0] rd_phys [RP];
  logic ren_en = 0, com_en = 0, squash = 0;
  logic [AW-1:0] ren_arch = '0, com_arch = '0;
  logic [PW-1:0] ren_phys = '0, com_phys = '0;

  int checks = 0, failures = 0;
  int n_squash = 0, n_squash_com = 0, n_squash_ren = 0;

  dual_rat dut (
    .clk, .rst, .rd_arch, .rd_phys, .ren_en, .ren_arch, .ren_phys,
    .com_en, .com_arch, .com_phys, .squash
  );

  always #5 clk = ~clk;

  logic [PW-1:0] fut [AR];
  logic [PW-1:0] com [AR];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_all();
    for (int r = 0; r < AR; r += RP) begin
      for (int p = 0; p < RP; p++) rd_arch[p] = AW'(r + p);
      #1;
      for (int p = 0; p < RP; p++)
        check(rd_phys[p] == fut[r + p],
              $sformatf("future[%0d] = %0d, expected %0d", r + p, rd_phys[p], fut[r + p]));
    end
    // the reads took several cycles; line up with a falling edge again
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < RP; p++) rd_arch[p] = '0;
    for (int r = 0; r < AR; r++) begin fut[r] = PW'(r); com[r] = PW'(r); end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check_all();
    for (int k = 0; k < 3000; k++) begin
      ren_en   = ($urandom_range(3) != 0);
      ren_arch = AW'($urandom); ren_phys = PW'($urandom);
      com_en   = ($urandom_range(2) == 0);
      com_arch = AW'($urandom); com_phys = PW'($urandom);
      squash   = ($urandom_range(40) == 0);
      @(negedge clk);
      if (com_en) com[com_arch] = com_phys;
      if (squash) begin
        n_squash++;
        if (com_en) n_squash_com++;
        if (ren_en) n_squash_ren++;
        for (int r = 0; r < AR; r++) fut[r] = com[r];
      end else if (ren_en) fut[ren_arch] = ren_phys;
      ren_en = 0; com_en = 0; squash = 0;
      check_all();
    end
    check(n_squash > 0 && n_squash_com > 0 && n_squash_ren > 0, "squash cases not all seen");
    $display("squashes=%0d with_commit=%0d with_rename=%0d", n_squash, n_squash_com, n_squash_ren);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

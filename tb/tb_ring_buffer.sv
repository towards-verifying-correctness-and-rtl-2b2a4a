// Self-checking testbench for ring_buffer at its default size (32 x 128 bits)
// and at a small size (8 x 32 bits) that reaches full and wraps often. Each
// configuration is driven by an rb_checker, which compares every method with
// a reference queue model cycle by cycle.
module tb_ring_buffer;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic d0, d1;
  int c0, c1, f0, f1;

  rb_checker #(.N(5), .M(128), .OPS(4000)) u_def   (.clk, .rst, .done(d0), .checks(c0), .failures(f0));
  rb_checker #(.N(3), .M(32),  .OPS(3000)) u_small (.clk, .rst, .done(d1), .checks(c1), .failures(f1));

  int checks, failures;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    checks = c0 + c1;
    failures = f0 + f1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for gcd.
//
// Loads directed and random operand pairs, steps until finished, and checks
// the result against Euclid's algorithm computed here, the step count
// against the count of subtractions the step rule implies, that step is
// refused (no state change) once finished, and that a load restarts a run.
module tb_gcd;

  localparam int W = 16;

  logic clk = 0, rst = 1;
  logic load_en = 0, step_en = 0;
  logic [W-1:0] load_a = '0, load_b = '0;
  logic step_rdy, finished;
  logic [W-1:0] result;

  int checks = 0, failures = 0;

  gcd dut (.clk, .rst, .load_en, .load_a, .load_b, .step_en,
                    .step_rdy, .result, .finished);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned ref_gcd(input int unsigned x, input int unsigned y);
    while (y != 0) begin
      int unsigned t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // subtractions taken by the strict-compare rule, up to finishing
  function automatic int unsigned ref_steps(input int unsigned x, input int unsigned y);
    int unsigned n = 0;
    while (y != 0) begin
      if (x > y) x -= y; else y -= x;
      n++;
    end
    return n;
  endfunction

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int unsigned n = 0;
    int unsigned exp_n = ref_steps(x, y);
    @(negedge clk);
    load_a = x; load_b = y; load_en = 1;
    @(negedge clk);
    load_en = 0;
    check(finished == (y == 0) && step_rdy == (y != 0), "finished after load");
    step_en = 1;
    while (!finished && n < 70000) begin
      @(negedge clk);
      n++;
    end
    step_en = 0;
    check(finished && !step_rdy, $sformatf("gcd(%0d,%0d) finished", x, y));
    check(result == W'(ref_gcd(x, y)),
          $sformatf("gcd(%0d,%0d) = %0d, got %0d", x, y, ref_gcd(x, y), result));
    check(n == exp_n, $sformatf("gcd(%0d,%0d) steps %0d, expected %0d", x, y, n, exp_n));
    // a step while finished is refused
    step_en = 1;
    @(negedge clk);
    step_en = 0;
    check(finished && result == W'(ref_gcd(x, y)), "step refused when finished");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x, y;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(finished && result == 0, "reset state");
    run(16'd48, 16'd18);
    run(16'd18, 16'd48);
    run(16'd17, 16'd5);
    run(16'd7, 16'd7);
    run(16'd1, 16'd1);
    run(16'd65535, 16'd1);
    run(16'd1, 16'd65535);
    run(16'd123, 16'd0);
    run(16'd40000, 16'd30000);
    for (int i = 0; i < 200; i++) begin
      x = W'($urandom_range(65535, 1));
      y = (i % 2) ? W'($urandom_range(255, 1)) : W'($urandom);
      run(x, y);
    end
    // a load in the middle of a run restarts it
    @(negedge clk);
    load_a = 16'd1000; load_b = 16'd3; load_en = 1;
    @(negedge clk);
    load_en = 0; step_en = 1;
    repeat (5) @(negedge clk);
    step_en = 0;
    check(!finished, "mid-run");
    run(16'd12, 16'd8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

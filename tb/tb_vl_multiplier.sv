// Self-checking testbench for vl_multiplier.
//
// Runs directed corner cases and random operand pairs. For each pair it
// checks the handshake (enq only while empty, step only while busy, deq only
// while full), the product against a*b computed here, and the latency: the
// number of step firings from enq to Full must equal bit_length(a) + 1.
// It also runs each first operand with two different second operands and
// checks that the cycle-by-cycle trace of ready/status outputs is the same,
// which is the timing-security property of the unit.
module tb_vl_multiplier;

  localparam int W = 8;

  logic clk = 0, rst = 1;
  logic enq_en = 0, step_en = 0, deq_en = 0;
  logic [W-1:0] a = '0, b = '0;
  logic enq_rdy, step_rdy, deq_rdy, empty_r, busy_r, full_r;
  logic [2*W-1:0] c;

  int checks = 0, failures = 0;

  vl_multiplier dut (
    .clk, .rst, .enq_en, .a, .b, .enq_rdy, .step_en, .step_rdy,
    .deq_en, .deq_rdy, .c, .empty_en(1'b1), .busy_en(1'b1), .full_en(1'b1),
    .empty_r, .busy_r, .full_r
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int bitlen(input logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  // Runs one multiplication, stepping every cycle; returns the observed
  // status trace packed as a hash and the number of step firings.
  task automatic run_one(input logic [W-1:0] x, input logic [W-1:0] y,
                         output longint unsigned trace, output int steps);
    trace = 64'hcbf29ce484222325;
    steps = 0;
    check(enq_rdy && empty_r && !busy_r && !full_r, "idle before enq");
    check(!step_rdy && !deq_rdy, "step/deq not ready while empty");
    @(negedge clk);
    a = x; b = y; enq_en = 1;
    @(negedge clk);
    enq_en = 0;
    check(busy_r && !enq_rdy && step_rdy, "busy after enq");
    // a deq attempt while busy must not fire
    deq_en = 1;
    @(negedge clk);
    deq_en = 0;
    check(busy_r, "deq while busy ignored");
    while (!full_r && steps < 40) begin
      step_en = 1;
      trace = (trace ^ {61'd0, empty_r, busy_r, full_r}) * 64'h100000001b3;
      @(negedge clk);
      steps++;
    end
    step_en = 0;
    check(full_r && deq_rdy && !step_rdy && !enq_rdy, "full after steps");
    check(steps == bitlen(x) + 1,
          $sformatf("latency a=%0d: %0d steps, expected %0d", x, steps, bitlen(x) + 1));
    check(c == 16'(x) * 16'(y),
          $sformatf("product %0d*%0d = %0d, got %0d", x, y, 16'(x) * 16'(y), c));
    // enq while full must not fire
    enq_en = 1; a = ~x;
    @(negedge clk);
    enq_en = 0;
    check(full_r && c == 16'(x) * 16'(y), "enq while full ignored");
    deq_en = 1;
    @(negedge clk);
    deq_en = 0;
    check(empty_r && enq_rdy, "empty after deq");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t1, t2;
    int s1, s2;
    logic [W-1:0] x, y;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // directed corners
    run_one(8'd0, 8'd77, t1, s1);
    run_one(8'd1, 8'd255, t1, s1);
    run_one(8'd255, 8'd255, t1, s1);
    run_one(8'd128, 8'd3, t1, s1);
    run_one(8'd13, 8'd0, t1, s1);
    // random pairs with the secret-operand timing comparison
    for (int i = 0; i < 100; i++) begin
      x = W'($urandom);
      y = W'($urandom);
      run_one(x, y, t1, s1);
      run_one(x, ~y, t2, s2);
      check(t1 == t2 && s1 == s2,
            $sformatf("timing depends on b for a=%0d", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Ring buffer across the depth/width sweep used to evaluate its synthesis:
// depths 2^3, 2^5, 2^7 and 2^9 slots, widths 32, 128 and 512 bits. Every
// combination with N <= 7 except N = 7, M = 512 was synthesized; this bench
// simulates all of them plus N = 7, M = 512 and N = 9, M = 32, each driven by
// an rb_checker against a reference queue model, all in parallel.
module tb_ring_buffer_sweep;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 10;
  logic done [NC];
  int   chk  [NC];
  int   fail [NC];

  rb_checker #(.N(3), .M(32),  .OPS(3000)) u0 (.clk, .rst, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  rb_checker #(.N(3), .M(128), .OPS(3000)) u1 (.clk, .rst, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  rb_checker #(.N(3), .M(512), .OPS(3000)) u2 (.clk, .rst, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  rb_checker #(.N(5), .M(32),  .OPS(3000)) u3 (.clk, .rst, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  rb_checker #(.N(5), .M(128), .OPS(3000)) u4 (.clk, .rst, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  rb_checker #(.N(5), .M(512), .OPS(3000)) u5 (.clk, .rst, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  rb_checker #(.N(7), .M(32),  .OPS(4000)) u6 (.clk, .rst, .done(done[6]), .checks(chk[6]), .failures(fail[6]));
  rb_checker #(.N(7), .M(128), .OPS(4000)) u7 (.clk, .rst, .done(done[7]), .checks(chk[7]), .failures(fail[7]));
  rb_checker #(.N(7), .M(512), .OPS(4000)) u8 (.clk, .rst, .done(done[8]), .checks(chk[8]), .failures(fail[8]));
  rb_checker #(.N(9), .M(32),  .OPS(8000)) u9 (.clk, .rst, .done(done[9]), .checks(chk[9]), .failures(fail[9]));

  function automatic logic all_done();
    for (int i = 0; i < NC; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int sum(input int v [NC]);
    int s = 0;
    for (int i = 0; i < NC; i++) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fail) + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    while (!all_done()) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fail));
    $finish;
  end

endmodule

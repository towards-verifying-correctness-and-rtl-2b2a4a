// Greatest common divisor of two 16-bit numbers by repeated subtraction.
//
// Two registers x and y hold the current operands. Methods, each an enable
// input with a ready output where the method has a guard:
//   load (always ready): x <= a, y <= b.
//   step (ready while y != 0): subtract the smaller register from the larger;
//        when x > y, x <= x - y, else y <= y - x.
//   result: x.   finished: y == 0.
// When finished is high, result holds gcd(a, b). From a load with a > 0 the
// pair walks down to (g, g); the next step clears y and leaves x = g, so the
// run takes at most a + b steps. A load with b = 0 is finished at once
// (result a). A load with a = 0 and b != 0 never finishes: y - x leaves y
// unchanged. One step firing per clock; a load and a step enabled in the
// same cycle resolve with the load winning.
//
// The registers, the methods, the guard and the subtract-the-smaller step
// follow the document. The comparison is strict (x > y): with x >= y a pair
// (g, g) would become (0, g) and y could never reach zero, so finished would
// never rise. The synchronous active-high reset of both registers to zero
// and the load-over-step priority are this design's choices.
module gcd #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load_en,
  input  logic [W-1:0] load_a,
  input  logic [W-1:0] load_b,
  input  logic         step_en,
  output logic         step_rdy,
  output logic [W-1:0] result,
  output logic         finished
);

  logic [W-1:0] x, y;

  assign step_rdy = (y != '0);
  assign result   = x;
  assign finished = (y == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
    end else if (load_en) begin
      x <= load_a;
      y <= load_b;
    end else if (step_en && step_rdy) begin
      if (x > y) x <= x - y;
      else        y <= y - x;
    end
  end

endmodule

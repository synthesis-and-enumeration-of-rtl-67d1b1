// gf2sr_r6: 3-stage strongly secure SR-equivalent GF2SR R6.
//
// R6 is R3 made SR-equivalent by adding feed-forward logic at the output only:
//   y1 <= x
//   y2 <= ~y1
//   y3 <= y2 ^ (x & y1)
//   z  =  ~y3 ^ (y1 & ~y2)
// R3 alone gives z(t+3) = x(t) ^ x(t+2)&x(t+1). At time t+3 the stages hold
// y1 = x(t+2) and ~y2 = x(t+1), so the added term y1&~y2 is exactly the
// unwanted product and cancels it: z(t+3) = x(t). Logic added at the output
// of a feed-forward register cannot change how its state is loaded. R6
// therefore stays scan-in secure, and being SR-equivalent it is also
// scan-out secure.
//
// Interface: clk, asynchronous active-low rst_n (all stages 0), serial x
// in, serial z out. Latency three cycles. The gates follow the R6
// example, with the inverted AND input on y2. The reset is this design's
// choice.
module gf2sr_r6 (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic y1, y2, y3;
  logic ff_fix;  // the added feed-forward term

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= 1'b0;
      y2 <= 1'b0;
      y3 <= 1'b0;
    end else begin
      y1 <= x;
      y2 <= ~y1;
      y3 <= y2 ^ (x & y1);
    end
  end

  assign ff_fix = y1 & ~y2;
  assign z      = ~y3 ^ ff_fix;

endmodule

// gfsr_r4: 3-stage generalized feedback shift register R4.
//
// One AND of the last two stages is fed back into the second stage:
//   y1 <= x
//   y2 <= y1 ^ (y2 & y3)
//   y3 <= y2
//   z  =  y3
// At its pins this gives z(t+3) = x(t) ^ z(t+2)&z(t+1), so R4 is not
// SR-equivalent.
//
// Interface: clk, asynchronous active-low rst_n (all stages 0), serial x
// in, serial z out (= y3). The gates follow the R4 example. The reset is
// this design's choice.
module gfsr_r4 (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic y1, y2, y3;
  logic fb;  // feedback term

  assign fb = y2 & y3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= 1'b0;
      y2 <= 1'b0;
      y3 <= 1'b0;
    end else begin
      y1 <= x;
      y2 <= y1 ^ fb;
      y3 <= y2;
    end
  end

  assign z = y3;

endmodule

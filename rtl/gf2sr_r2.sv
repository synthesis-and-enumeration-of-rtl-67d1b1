// gf2sr_r2: 3-stage generalized feed-forward shift register R2.
//
// R2 is the starting point of the synthesis example. One AND of the input
// and the first stage is fed forward into the third stage:
//   y1 <= x
//   y2 <= y1
//   y3 <= y2 ^ (x & y1)
//   z  =  y3
// so z(t+3) = x(t) ^ x(t+1)&x(t+2). R2 is not SR-equivalent and, having no
// inversion anywhere, not strongly secure: its state can be scanned in and out
// as in a plain shift register.
//
// Interface: clk, asynchronous active-low rst_n (all stages 0), serial x
// in, serial z out (= y3). The gates follow the R2 example. The reset is this
// design's choice.
module gf2sr_r2 (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic y1, y2, y3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= 1'b0;
      y2 <= 1'b0;
      y3 <= 1'b0;
    end else begin
      y1 <= x;
      y2 <= y1;
      y3 <= y2 ^ (x & y1);
    end
  end

  assign z = y3;

endmodule

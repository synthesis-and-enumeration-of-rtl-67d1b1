// gf2sr_r3: 3-stage strongly secure generalized feed-forward shift register R3.
//
// R3 is R2 with two NOT gates added, in front of y2 and at the output:
//   y1 <= x
//   y2 <= ~y1
//   y3 <= y2 ^ (x & y1)
//   z  =  ~y3
// The inversions mean that neither shifting a value in nor reading it out
// leaves a stage holding the plain shifted bit, which makes R3 strongly
// secure. It is still not SR-equivalent: z(t+3) = x(t) ^ x(t+2)&x(t+1).
// The AND reads y1 before the inversion.
//
// Interface: clk, asynchronous active-low rst_n (all stages 0, so z = 1
// after reset), serial x in, serial z out. The gates follow the R3
// example. The reset is this design's choice.
module gf2sr_r3 (
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
      y2 <= ~y1;
      y3 <= y2 ^ (x & y1);
    end
  end

  assign z = ~y3;

endmodule

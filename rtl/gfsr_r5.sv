// gfsr_r5: 3-stage generalized feedback shift register R5.
//
// R5 is R4 with NOT gates at the input and at the output:
//   y1 <= ~x
//   y2 <= y1 ^ (y2 & ~y3)
//   y3 <= y2
//   z  =  ~y3
// The feedback AND is taken after the output inversion, so it sees z = ~y3.
// Nothing pins down where that tap sits, so this reading is this design's
// choice. At the pins: z(t+3) = x(t) ^ ~z(t+2)&z(t+1).
//
// Interface: clk, asynchronous active-low rst_n (all stages 0, so z = 1
// after reset), serial x in, serial z out. The gates follow the R5
// example. The reset is this design's choice.
module gfsr_r5 (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic y1, y2, y3;
  logic fb;  // feedback term

  assign z  = ~y3;
  assign fb = y2 & z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= 1'b0;
      y2 <= 1'b0;
      y3 <= 1'b0;
    end else begin
      y1 <= ~x;
      y2 <= y1 ^ fb;
      y3 <= y2;
    end
  end

endmodule

// sreq_r1: 3-stage SR-equivalent circuit R1.
//
// R1 behaves at its pins exactly like a 3-stage shift register,
// z(t+3) = x(t), but its stages do not hold the shifted bits. Two AND terms
// are mixed into the chain: one in front of y3 and one at the output. They
// cancel after three cycles:
//   y1 <= x
//   y2 <= y1
//   y3 <= y2 ^ (x & y1)
//   z  =  y3 ^ (y1 & y2)
// Someone who scans the register without knowing these gates sees correct
// shifting but cannot read or set its state directly.
//
// Interface: clk, asynchronous active-low rst_n (all stages 0), serial x
// in, serial z out (combinational from the stages). Latency three cycles.
// The gates follow the R1 example. The reset is this design's choice.
module sreq_r1 (
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

  assign z = y3 ^ (y1 & y2);

endmodule

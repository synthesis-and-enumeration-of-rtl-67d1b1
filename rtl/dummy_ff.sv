// dummy_ff: dummy flip-flop between two NOT gates.
//
// The flip-flop stores the complement of the bit shifted in, and the output
// NOT restores it. At the pins it is a one-cycle delay, z(t+1) = x(t). Its
// stored value never equals the scanned bit, though. Put in front of or
// behind an SR-equivalent register, it makes the combination strongly
// secure while keeping it SR-equivalent (one stage longer).
//
// Interface: clk, asynchronous active-low rst_n (flip-flop 0, so z = 1 after
// reset), serial x in, serial z out. The NOT-FF-NOT structure is the
// design's. The reset is this design's choice.
module dummy_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic q;  // holds ~x of the previous cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~x;
  end

  assign z = ~q;

endmodule

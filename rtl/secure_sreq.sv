// secure_sreq: strongly secure SR-equivalent register made by adding a dummy
// flip-flop.
//
// A K-stage SR-equivalent GF2SR (configured by the truth tables F) gets a
// dummy_ff, a flip-flop between two NOT gates, at its input or at its
// output. The result is a (K+1)-stage SR-equivalent, z(t+K+1) = x(t). The
// dummy stage always holds an inverted bit, so a state scanned in or out as
// for a plain shift register never matches. This adds strong security
// without a second SR-equivalence repair, which is why the second and third
// steps of the "SR-equivalent first" flow merge into one.
//
// Interface: clk, asynchronous active-low rst_n, serial x in, serial z out.
// DUMMY_AT_INPUT selects the placement (1: dummy stage first). F must
// describe an SR-equivalent GF2SR; that is not checked. The default wraps the
// R1 circuit, a choice of this design.
module secure_sreq
  import gsr_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter logic [(1 << (K + 1)) - 2:0] F = GF2SR_R1,
  parameter bit DUMMY_AT_INPUT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic mid;  // link between the dummy stage and the GF2SR

  if (DUMMY_AT_INPUT) begin : g_in
    dummy_ff u_dummy (.clk, .rst_n, .x(x),   .z(mid));
    gf2sr #(.K(K), .F(F)) u_core (.clk, .rst_n, .x(mid), .z(z));
  end else begin : g_out
    gf2sr #(.K(K), .F(F)) u_core (.clk, .rst_n, .x(x),   .z(mid));
    dummy_ff u_dummy (.clk, .rst_n, .x(mid), .z(z));
  end

endmodule

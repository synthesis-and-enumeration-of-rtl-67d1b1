// gsr_top: all generalized shift register circuits side by side.
//
// Each circuit is an independent scan segment with its own serial input and
// output. They share only the clock and reset. The lanes are:
//   r1       3-stage SR-equivalent circuit R1                  (sreq_r1)
//   r2,r3,r6 the synthesis example: R2, R3 after adding NOT gates, and R6
//            after adding the output feed-forward term            (gf2sr_r*)
//   r4,r5    3-stage GFSR examples                              (gfsr_r*)
//   gf2sr    generic GF2SR, default tables = R6                 (gf2sr)
//   gfsr     generic GFSR, default tables = R5                  (gfsr)
//   sec_in   R1 with a dummy NOT-FF-NOT stage at its input       (secure_sreq)
//   sec_out  R1 with the dummy stage at its output               (secure_sreq)
// The SR-equivalent lanes (r1, r6, gf2sr, sec_in, sec_out) return their input
// after 3, 3, 3, 4 and 4 cycles. The others show the relations given in their
// modules.
// Nothing fixes how these segments would be chained on a chip, so keeping
// them apart is this design's choice. Reset is asynchronous and active low.
module gsr_top
  import gsr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic x_r1,   output logic z_r1,
  input  logic x_r2,   output logic z_r2,
  input  logic x_r3,   output logic z_r3,
  input  logic x_r6,   output logic z_r6,
  input  logic x_r4,   output logic z_r4,
  input  logic x_r5,   output logic z_r5,
  input  logic x_gf2sr, output logic z_gf2sr,
  input  logic x_gfsr,  output logic z_gfsr,
  input  logic x_sec_in,  output logic z_sec_in,
  input  logic x_sec_out, output logic z_sec_out
);

  sreq_r1  u_r1 (.clk, .rst_n, .x(x_r1), .z(z_r1));
  gf2sr_r2 u_r2 (.clk, .rst_n, .x(x_r2), .z(z_r2));
  gf2sr_r3 u_r3 (.clk, .rst_n, .x(x_r3), .z(z_r3));
  gf2sr_r6 u_r6 (.clk, .rst_n, .x(x_r6), .z(z_r6));
  gfsr_r4  u_r4 (.clk, .rst_n, .x(x_r4), .z(z_r4));
  gfsr_r5  u_r5 (.clk, .rst_n, .x(x_r5), .z(z_r5));

  gf2sr u_gf2sr (.clk, .rst_n, .x(x_gf2sr), .z(z_gf2sr));
  gfsr  u_gfsr  (.clk, .rst_n, .x(x_gfsr),  .z(z_gfsr));

  secure_sreq #(.DUMMY_AT_INPUT(1'b1)) u_sec_in
    (.clk, .rst_n, .x(x_sec_in),  .z(z_sec_in));
  secure_sreq #(.DUMMY_AT_INPUT(1'b0)) u_sec_out
    (.clk, .rst_n, .x(x_sec_out), .z(z_sec_out));

endmodule

// gfsr: generic k-stage generalized feedback shift register (GFSR).
//
// The register is a chain of K flip-flops. Every stage input is the previous
// stage's value XORed with a feedback function of the stages after it:
//   y1 <= x ^ f0(y1..yK)
//   y(i+1) <= y(i) ^ f_i(y(i+1)..yK)        1 <= i < K
//   z = yK ^ fK                             (fK has no input: a constant)
// All K+1 functions are taken as truth tables from F, packed as gsr_pkg
// describes. The register is SR-equivalent when z(t+K) = x(t) for every input
// sequence.
//
// Interface: clk, asynchronous active-low rst_n (clears every stage to 0),
// serial x in, serial z out. One bit is shifted per rising clock edge. z
// depends on the stages only.
// The structure follows the GFSR definition. The table packing, the reset
// and the default configuration (the R5 example) are this design's choices.
module gfsr
  import gsr_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter logic [(1 << (K + 1)) - 2:0] F = GFSR_R5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic [K:1] y;  // stages y1..yK
  logic [K:0] f;  // current value of f0..fK

  // f_i reads y(i+1)..yK; address bit j is y(i+1+j).
  always_comb begin
    for (int unsigned i = 0; i <= K; i++) begin
      int unsigned a;
      a = 0;
      for (int unsigned j = 0; j < K - i; j++)
        a = a | (int'(y[i+1+j]) << j);
      f[i] = F[gfsr_off(K, i) + a];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else begin
      y[1] <= x ^ f[0];
      for (int unsigned i = 1; i < K; i++)
        y[i+1] <= y[i] ^ f[i];
    end
  end

  assign z = y[K] ^ f[K];

endmodule

// gf2sr: generic k-stage generalized feed-forward shift register (GF2SR).
//
// The register is a chain of K flip-flops. Every stage input is the previous
// stage's value XORed with a feed-forward function of the serial input and
// the stages before it:
//   y1 <= x ^ f0
//   y(i+1) <= y(i) ^ f_i(x, y1..y(i-1))     1 <= i < K
//   z = yK ^ fK(x, y1..y(K-1))              (combinational output)
// f0 has no input, so it is a constant (a NOT gate when 1). All K+1
// functions are taken as truth tables from F, packed as gsr_pkg describes.
// For any table the output obeys z(t+K) = x(t) ^ g(x(t+1)..x(t+K)) for some
// g. The register is SR-equivalent (z(t+K) = x(t)) when g is zero.
//
// Interface: clk, asynchronous active-low rst_n (clears every stage to 0),
// serial x in, serial z out. One bit is shifted per rising clock edge. z is
// combinational in x and the stages.
// The structure follows the GF2SR definition. The table packing, the reset
// and the default configuration (the R6 example) are this design's choices.
module gf2sr
  import gsr_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter logic [(1 << (K + 1)) - 2:0] F = GF2SR_R6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  logic [K:1] y;        // stages y1..yK
  logic [K:0] f;        // current value of f0..fK
  logic [K:0] addr_vec; // {y(K)..y1, x}

  assign addr_vec = {y, x};

  // f_i reads the low i bits of addr_vec: x, y1..y(i-1).
  always_comb begin
    for (int unsigned i = 0; i <= K; i++) begin
      int unsigned a;
      a = 0;
      for (int unsigned b = 0; b < i; b++)
        a = a | (int'(addr_vec[b]) << b);
      f[i] = F[gf2sr_off(i) + a];
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

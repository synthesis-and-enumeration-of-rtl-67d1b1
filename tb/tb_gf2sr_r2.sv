// tb_gf2sr_r2: self-checking testbench for gf2sr_r2.
//
// R2 gives z(t+3) = x(t) ^ x(t+1)&x(t+2).
// Random serial input, one bit per clock cycle starting from the reset state.
// z is sampled just before every rising edge and compared with the expected
// value, worked out from the input and output history (x[n], z[n]):
//   z[0] = z[1] = 0, z[2] = x[0]&x[1], z[n] = x[n-3] ^ (x[n-2] & x[n-1]) for n >= 3
// A watchdog ends the run with a failure if the loop does not finish.
module tb_gf2sr_r2;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic z;
  logic xs [N];
  logic zs [N];
  int checks = 0;
  int failures = 0;

  gf2sr_r2 dut (.clk, .rst_n, .x, .z);

  always #5 clk = ~clk;

  function automatic logic expected(input int n);
    if (n < 2) return 1'b0;
    if (n == 2) return xs[0] & xs[1];
    return xs[n-3] ^ (xs[n-2] & xs[n-1]);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      x = 1'($urandom);
      xs[n] = x;
      #1;
      zs[n] = z;
      checks++;
      if (z !== expected(n)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: z=%0b expected %0b", n, z, expected(n));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

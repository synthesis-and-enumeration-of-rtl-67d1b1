// tb_gfsr_r4: self-checking testbench for gfsr_r4.
//
// R4 gives z(t+3) = x(t) ^ z(t+2)&z(t+1).
// Random serial input, one bit per clock cycle starting from the reset state.
// z is sampled just before every rising edge and compared with the expected
// value, worked out from the input and output history (x[n], z[n]):
//   z[n] = 0 for n < 3, z[n] = x[n-3] ^ (z[n-1] & z[n-2]) for n >= 3
// A watchdog ends the run with a failure if the loop does not finish.
module tb_gfsr_r4;

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

  gfsr_r4 dut (.clk, .rst_n, .x, .z);

  always #5 clk = ~clk;

  function automatic logic expected(input int n);
    if (n < 3) return 1'b0;
    return xs[n-3] ^ (zs[n-1] & zs[n-2]);
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

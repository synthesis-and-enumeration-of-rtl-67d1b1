// tb_secure_sreq: self-checking testbench for the dummy-stage hardened
// SR-equivalent.
//
// Two instances wrap the R1 circuit, one with the dummy stage at the input
// (the default) and one with it at the output. Both must act as 4-stage shift
// registers: z[n] = x[n-4] from cycle 4 on. Before that, the input-side
// version shows R1's reset output 0 and, in cycle 3, the 1 that the reset
// dummy stage fed into R1. The output-side version shows the dummy stage's 1
// in cycle 0 and then R1's 0. The dummy flip-flop itself must
// always hold the complement of the bit it took in one cycle earlier.
module tb_secure_sreq;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] x = '0;
  logic [1:0] z;
  logic [1:0] xs [N];
  logic [1:0] ds [N];  // input of each dummy stage per cycle
  int checks = 0;
  int failures = 0;

  secure_sreq                            d_in  (.clk, .rst_n, .x(x[0]), .z(z[0]));
  secure_sreq #(.DUMMY_AT_INPUT(1'b0))   d_out (.clk, .rst_n, .x(x[1]), .z(z[1]));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      x = 2'($urandom);
      xs[n] = x;
      #1;
      ds[n] = {d_out.g_out.u_dummy.x, d_in.g_in.u_dummy.x};
      check("input side z",  z[0], (n >= 4) ? xs[n-4][0] : (n == 3));
      check("output side z", z[1], (n >= 4) ? xs[n-4][1] : (n == 0));
      if (n >= 1) begin
        check("input side dummy FF",  d_in.g_in.u_dummy.q,   ~ds[n-1][0]);
        check("output side dummy FF", d_out.g_out.u_dummy.q, ~ds[n-1][1]);
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

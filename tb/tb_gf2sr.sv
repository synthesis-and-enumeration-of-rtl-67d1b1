// tb_gf2sr: self-checking testbench for the generic GF2SR.
//
// Six configurations run side by side on independent random inputs:
//   c0  defaults (K=3, R6 tables)          z[n] = x[n-3]
//   c1  K=3, R1 tables                     z[n] = x[n-3]
//   c2  K=3, R2 tables                     z[n] = x[n-3] ^ x[n-2]&x[n-1]
//   c3  K=3, R3 tables                     z[n] = x[n-3] ^ x[n-2]&x[n-1]
//   c4  K=4, all tables zero (plain SR)    z[n] = x[n-4]
//   c5  K=5, f0 = 1 and f5 = 1 (NOT at both ends, all else zero)
//                                          z[n] = x[n-5]
// The relations are checked from cycle K on; the reset values of z are
// checked too (R6 and R3 give 1, the plain chains 0, c5 gives 1).
module tb_gf2sr;

  timeunit 1ns;
  timeprecision 1ps;

  import gsr_pkg::*;

  localparam int N  = 400;
  localparam int NC = 6;
  localparam logic [62:0] F_C5 = {32'hFFFF_FFFF, 30'd0, 1'b1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NC-1:0] x = '0;
  logic [NC-1:0] z;
  logic [NC-1:0] xs [N];
  int checks = 0;
  int failures = 0;

  gf2sr                                   c0 (.clk, .rst_n, .x(x[0]), .z(z[0]));
  gf2sr #(.K(3), .F(GF2SR_R1))            c1 (.clk, .rst_n, .x(x[1]), .z(z[1]));
  gf2sr #(.K(3), .F(GF2SR_R2))            c2 (.clk, .rst_n, .x(x[2]), .z(z[2]));
  gf2sr #(.K(3), .F(GF2SR_R3))            c3 (.clk, .rst_n, .x(x[3]), .z(z[3]));
  gf2sr #(.K(4), .F('0))                  c4 (.clk, .rst_n, .x(x[4]), .z(z[4]));
  gf2sr #(.K(5), .F(F_C5))                c5 (.clk, .rst_n, .x(x[5]), .z(z[5]));

  always #5 clk = ~clk;

  function automatic logic [NC-1:0] expected(input int n);
    logic [NC-1:0] e;
    e[0] = (n >= 3) ? xs[n-3][0] : (n != 2);
    e[1] = (n >= 3) ? xs[n-3][1] : 1'b0;
    e[2] = (n >= 3) ? xs[n-3][2] ^ (xs[n-2][2] & xs[n-1][2]) :
           (n == 2) ? xs[0][2] & xs[1][2] : 1'b0;
    e[3] = (n >= 3) ? xs[n-3][3] ^ (xs[n-2][3] & xs[n-1][3]) :
           (n == 2) ? xs[0][3] & xs[1][3] : 1'b1;
    e[4] = (n >= 4) ? xs[n-4][4] : 1'b0;
    e[5] = (n >= 5) ? xs[n-5][5] : 1'b1;
    return e;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      x = NC'($urandom);
      xs[n] = x;
      #1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (z[c] !== expected(n)[c]) begin
          failures++;
          if (failures < 10) $display("cycle %0d config c%0d: z=%0b expected %0b", n, c, z[c], expected(n)[c]);
        end
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

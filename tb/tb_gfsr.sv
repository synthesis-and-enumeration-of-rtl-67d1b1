// tb_gfsr: self-checking testbench for the generic GFSR.
//
// Four configurations run side by side on independent random inputs:
//   c0  defaults (K=3, R5 tables)   z[n] = x[n-3] ^ ~z[n-1]&z[n-2], z = 1 at first
//   c1  K=3, R4 tables              z[n] = x[n-3] ^ z[n-1]&z[n-2], z = 0 at first
//   c2  K=3, all tables zero        z[n] = x[n-3]
//   c3  K=4, f0 = 1 (every entry) and f4 = 1, all else zero
//                                   z[n] = x[n-4], z = 1 at first
//   c4  K=3, R5 with the input feedback repair (GFSR_R5_SREQ)
//                                   z[n] = x[n-3], z = 1 at first
// Each relation is checked from cycle K on, the reset values before that.
module tb_gfsr;

  timeunit 1ns;
  timeprecision 1ps;

  import gsr_pkg::*;

  localparam int N  = 400;
  localparam int NC = 5;
  localparam logic [30:0] F_C3 = {1'b1, 14'd0, 16'hFFFF};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NC-1:0] x = '0;
  logic [NC-1:0] z;
  logic [NC-1:0] xs [N];
  logic [NC-1:0] zs [N];
  int checks = 0;
  int failures = 0;

  gfsr                          c0 (.clk, .rst_n, .x(x[0]), .z(z[0]));
  gfsr #(.K(3), .F(GFSR_R4))    c1 (.clk, .rst_n, .x(x[1]), .z(z[1]));
  gfsr #(.K(3), .F('0))         c2 (.clk, .rst_n, .x(x[2]), .z(z[2]));
  gfsr #(.K(4), .F(F_C3))       c3 (.clk, .rst_n, .x(x[3]), .z(z[3]));
  gfsr #(.K(3), .F(GFSR_R5_SREQ)) c4 (.clk, .rst_n, .x(x[4]), .z(z[4]));

  always #5 clk = ~clk;

  function automatic logic [NC-1:0] expected(input int n);
    logic [NC-1:0] e;
    e[0] = (n >= 3) ? xs[n-3][0] ^ (~zs[n-1][0] & zs[n-2][0]) : 1'b1;
    e[1] = (n >= 3) ? xs[n-3][1] ^ (zs[n-1][1] & zs[n-2][1]) : 1'b0;
    e[2] = (n >= 3) ? xs[n-3][2] : 1'b0;
    e[3] = (n >= 4) ? xs[n-4][3] : 1'b1;
    e[4] = (n >= 3) ? xs[n-3][4] : 1'b1;
    return e;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      x = NC'($urandom);
      xs[n] = x;
      #1;
      zs[n] = z;
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

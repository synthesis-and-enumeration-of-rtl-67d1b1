// tb_gsr_top: end-to-end testbench for gsr_top at its default parameters.
//
// Every lane gets its own random serial stream for N cycles after reset.
// Each output is checked against the relation its circuit must satisfy,
// worked out from the input and output histories:
//   r1, r6, gf2sr (R6)     z[n] = x[n-3]
//   sec_in, sec_out        z[n] = x[n-4]
//   r2, r3                 z[n] = x[n-3] ^ x[n-2]&x[n-1]
//   r4, gfsr-R4 relation   z[n] = x[n-3] ^ z[n-1]&z[n-2]
//   r5, gfsr (R5)          z[n] = x[n-3] ^ ~z[n-1]&z[n-2]
// The relations are checked from cycle 4 on, once every pipeline has filled.
// The run also counts how often each mechanism of the design acts, and
// each count must be non-zero:
//   - R6's added feed-forward term is 1 and cancels R3's error,
//   - R3 (not SR-equivalent) returns a bit different from x[n-3],
//   - R4's and R5's feedback AND is 1,
//   - R1's last stage holds a bit different from what a shift register would,
//   - a dummy stage holds the complement of the bit it passes on.
module tb_gsr_top;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 2000;
  localparam int NL = 10;
  typedef enum int {L_R1, L_R2, L_R3, L_R6, L_R4, L_R5, L_GF2SR, L_GFSR, L_SEC_IN, L_SEC_OUT} lane_e;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NL-1:0] x = '0;
  logic [NL-1:0] z;
  logic [NL-1:0] xs [N];
  logic [NL-1:0] zs [N];
  int checks = 0;
  int failures = 0;
  int n_fix = 0, n_r3_err = 0, n_fb4 = 0, n_fb5 = 0, n_hidden = 0, n_dummy = 0;

  gsr_top dut (
    .clk, .rst_n,
    .x_r1(x[L_R1]),         .z_r1(z[L_R1]),
    .x_r2(x[L_R2]),         .z_r2(z[L_R2]),
    .x_r3(x[L_R3]),         .z_r3(z[L_R3]),
    .x_r6(x[L_R6]),         .z_r6(z[L_R6]),
    .x_r4(x[L_R4]),         .z_r4(z[L_R4]),
    .x_r5(x[L_R5]),         .z_r5(z[L_R5]),
    .x_gf2sr(x[L_GF2SR]),   .z_gf2sr(z[L_GF2SR]),
    .x_gfsr(x[L_GFSR]),     .z_gfsr(z[L_GFSR]),
    .x_sec_in(x[L_SEC_IN]), .z_sec_in(z[L_SEC_IN]),
    .x_sec_out(x[L_SEC_OUT]), .z_sec_out(z[L_SEC_OUT])
  );

  always #5 clk = ~clk;

  task automatic check(input lane_e l, input logic exp, input int n);
    checks++;
    if (z[l] !== exp) begin
      failures++;
      if (failures < 10) $display("cycle %0d lane %s: z=%0b expected %0b", n, l.name(), z[l], exp);
    end
  endtask

  function automatic logic ff3(input int l, input int n);  // x[n-3] ^ x[n-2]&x[n-1]
    return xs[n-3][l] ^ (xs[n-2][l] & xs[n-1][l]);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      x = NL'($urandom);
      xs[n] = x;
      #1;
      zs[n] = z;
      if (n >= 4) begin
        check(L_R1,      xs[n-3][L_R1], n);
        check(L_R6,      xs[n-3][L_R6], n);
        check(L_GF2SR,   xs[n-3][L_GF2SR], n);
        check(L_SEC_IN,  xs[n-4][L_SEC_IN], n);
        check(L_SEC_OUT, xs[n-4][L_SEC_OUT], n);
        check(L_R2,      ff3(L_R2, n), n);
        check(L_R3,      ff3(L_R3, n), n);
        check(L_R4,      xs[n-3][L_R4] ^ (zs[n-1][L_R4] & zs[n-2][L_R4]), n);
        check(L_R5,      xs[n-3][L_R5] ^ (~zs[n-1][L_R5] & zs[n-2][L_R5]), n);
        check(L_GFSR,    xs[n-3][L_GFSR] ^ (~zs[n-1][L_GFSR] & zs[n-2][L_GFSR]), n);
        if (z[L_R3] != xs[n-3][L_R3]) n_r3_err++;
        if (dut.u_r1.y3 != xs[n-3][L_R1]) n_hidden++;
      end
      if (dut.u_r6.ff_fix) n_fix++;
      if (dut.u_r4.fb) n_fb4++;
      if (dut.u_r5.fb) n_fb5++;
      if (dut.u_sec_in.g_in.u_dummy.q != dut.u_sec_in.g_in.u_dummy.z) n_dummy++;
      @(negedge clk);
    end
    $display("mechanisms: R6 feed-forward fix %0d, R3 error %0d, R4 feedback %0d, R5 feedback %0d, R1 hidden state %0d, dummy inverted %0d",
             n_fix, n_r3_err, n_fb4, n_fb5, n_hidden, n_dummy);
    if (n_fix == 0)    begin failures++; $display("R6 feed-forward term never acted"); end
    if (n_r3_err == 0) begin failures++; $display("R3 never departed from a shift register"); end
    if (n_fb4 == 0)    begin failures++; $display("R4 feedback never acted"); end
    if (n_fb5 == 0)    begin failures++; $display("R5 feedback never acted"); end
    if (n_hidden == 0) begin failures++; $display("R1 state never departed from a shift register's"); end
    if (n_dummy == 0)  begin failures++; $display("dummy stage never held an inverted bit"); end
    checks += 6;
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

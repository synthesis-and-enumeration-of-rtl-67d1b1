// tb_enum_sreq: counts the SR-equivalent members of the small GSR classes by
// simulation.
//
// Every truth-table setting of the generic gf2sr and gfsr is instantiated for
// K = 1 and K = 2 (8 and 128 settings per family). All instances see the same
// random input stream, with a few resets in between, and an instance is
// flagged as soon as z[n] != x[n-K] for a cycle n at least K cycles after a
// reset. Unflagged instances other than the all-zero table (the plain shift
// register) are the SR-equivalent members of the class. Their number must be
// 2^(2^K-1) - 1 for both families: 1 for K = 1 and 7 for K = 2.
// The run also counts the SR-equivalent members that have an inverter at the
// secure side: f0 = 1 (input) for the GF2SR, fK = 1 (output) for the GFSR.
// Those are scan-in (GF2SR) or scan-out (GFSR) secure, hence strongly secure,
// so their number must exceed the lower bound (2^(2^K-1) - 1)/2.
// A random stream is a strong test here but not a proof of SR-equivalence.
module tb_enum_sreq;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 3000;
  localparam int RESET_EVERY = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic xs [N];
  int since_reset = 0;
  int checks = 0;
  int failures = 0;

  logic [7:0]   z_ff1, z_fb1, bad_ff1 = '0, bad_fb1 = '0;
  logic [127:0] z_ff2, z_fb2, bad_ff2 = '0, bad_fb2 = '0;

  for (genvar i = 0; i < 8; i++) begin : g_k1
    gf2sr #(.K(1), .F(3'(i))) u_ff (.clk, .rst_n, .x, .z(z_ff1[i]));
    gfsr  #(.K(1), .F(3'(i))) u_fb (.clk, .rst_n, .x, .z(z_fb1[i]));
  end
  for (genvar i = 0; i < 128; i++) begin : g_k2
    gf2sr #(.K(2), .F(7'(i))) u_ff (.clk, .rst_n, .x, .z(z_ff2[i]));
    gfsr  #(.K(2), .F(7'(i))) u_fb (.clk, .rst_n, .x, .z(z_fb2[i]));
  end

  always #5 clk = ~clk;

  // Number of SR-equivalent settings, not counting the all-zero table.
  function automatic int count_ok(input logic [127:0] bad, input int size);
    int c = 0;
    for (int i = 1; i < size; i++) if (!bad[i]) c++;
    return c;
  endfunction

  // Same, restricted to settings whose table bit 'bitpos' is 1.
  function automatic int count_ok_bit(input logic [127:0] bad, input int size, input int bitpos);
    int c = 0;
    for (int i = 1; i < size; i++) if (!bad[i] && i[bitpos]) c++;
    return c;
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    $display("%s: %0d (expected %0d)", what, got, exp);
    if (got != exp) failures++;
  endtask

  task automatic expect_gt2(input string what, input int got, input int bound);
    checks++;
    $display("%s: %0d (must exceed %0d/2)", what, got, bound);
    if (2 * got <= bound) failures++;
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      if (n % RESET_EVERY == 0) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        since_reset = 0;
      end
      x = 1'($urandom);
      xs[n] = x;
      #1;
      if (since_reset >= 1) begin
        for (int i = 0; i < 8; i++) begin
          if (z_ff1[i] !== xs[n-1]) bad_ff1[i] = 1'b1;
          if (z_fb1[i] !== xs[n-1]) bad_fb1[i] = 1'b1;
        end
      end
      if (since_reset >= 2) begin
        for (int i = 0; i < 128; i++) begin
          if (z_ff2[i] !== xs[n-2]) bad_ff2[i] = 1'b1;
          if (z_fb2[i] !== xs[n-2]) bad_fb2[i] = 1'b1;
        end
      end
      since_reset++;
      @(negedge clk);
    end
    // The plain shift register must pass; it is the reference.
    checks++;
    if (bad_ff1[0] || bad_fb1[0] || bad_ff2[0] || bad_fb2[0]) begin
      failures++;
      $display("a plain shift register was flagged");
    end
    expect_eq("SR-equivalent 1-stage GF2SRs", count_ok(128'(bad_ff1), 8), 1);
    expect_eq("SR-equivalent 1-stage GFSRs",  count_ok(128'(bad_fb1), 8), 1);
    expect_eq("SR-equivalent 2-stage GF2SRs", count_ok(bad_ff2, 128), 7);
    expect_eq("SR-equivalent 2-stage GFSRs",  count_ok(bad_fb2, 128), 7);
    // GF2SR f0 is table bit 0; 2-stage GFSR f2 is table bit 6.
    expect_gt2("SR-equivalent 2-stage GF2SRs with input NOT",  count_ok_bit(bad_ff2, 128, 0), 7);
    expect_gt2("SR-equivalent 2-stage GFSRs with output NOT", count_ok_bit(bad_fb2, 128, 6), 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + N / RESET_EVERY + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

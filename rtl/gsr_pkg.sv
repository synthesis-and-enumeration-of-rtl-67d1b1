// gsr_pkg: constants and helper functions shared by the generalized shift
// register (GSR) blocks.
//
// A k-stage GSR is a chain of k flip-flops y1..yk between a serial input x and
// a serial output z, with one XOR in front of each flip-flop and one at the
// output. Each XOR mixes in an arbitrary Boolean function f0..fk. The generic
// blocks (gf2sr, gfsr) take all k+1 functions as one packed truth-table
// parameter of 2^(k+1)-1 bits. That total matches the class sizes
// 2^(2^(k+1)-1)-1 of both GSR families: every table except the all-zero one,
// which is the plain shift register.
//
// Feed-forward GSR (GF2SR): f_i reads x, y1..y(i-1) (i inputs, 2^i bits) and
// sits at bit offset 2^i - 1. Address bit 0 is x, address bit j is yj.
// Feedback GSR (GFSR): f_i reads y(i+1)..yk (k-i inputs, 2^(k-i) bits) and
// sits at bit offset 2^(k+1) - 2^(k-i+1). Address bit j is y(i+1+j).
// The layout and bit order are this design's choice. The function sets
// and their inputs follow the GF2SR and GFSR structures.
//
// The named tables are the 3-stage example circuits of the design, each
// written in this form (see the matching fixed-gate modules).
package gsr_pkg;

  // Total truth-table bits of a k-stage GF2SR or GFSR.
  function automatic int unsigned gsr_tt_bits(input int unsigned k);
    return (1 << (k + 1)) - 1;
  endfunction

  // Bit offset of f_i in a GF2SR table.
  function automatic int unsigned gf2sr_off(input int unsigned i);
    return (1 << i) - 1;
  endfunction

  // Bit offset of f_i in a k-stage GFSR table.
  function automatic int unsigned gfsr_off(input int unsigned k, input int unsigned i);
    return (1 << (k + 1)) - (1 << (k - i + 1));
  endfunction

  // 3-stage GF2SR tables: {f3[7:0], f2[3:0], f1[1:0], f0}.
  // R1: f2 = x&y1, f3 = y1&y2 (SR-equivalent).
  localparam logic [14:0] GF2SR_R1 = {8'hC0, 4'h8, 2'b00, 1'b0};
  // R2: f2 = x&y1.
  localparam logic [14:0] GF2SR_R2 = {8'h00, 4'h8, 2'b00, 1'b0};
  // R3: f1 = 1 (NOT in front of y2), f2 = x&y1, f3 = 1 (NOT at the output).
  localparam logic [14:0] GF2SR_R3 = {8'hFF, 4'h8, 2'b11, 1'b0};
  // R6: R3 with f3 = 1 ^ (y1 & ~y2) (SR-equivalent and strongly secure).
  localparam logic [14:0] GF2SR_R6 = {8'hF3, 4'h8, 2'b11, 1'b0};

  // 3-stage GFSR tables: {f3, f2[1:0], f1[3:0], f0[7:0]}.
  // R4: f1 = y2&y3.
  localparam logic [14:0] GFSR_R4 = {1'b0, 2'b00, 4'h8, 8'h00};
  // R5: f0 = 1 (NOT at x), f1 = y2&~y3, f3 = 1 (NOT at the output).
  localparam logic [14:0] GFSR_R5 = {1'b1, 2'b00, 4'h2, 8'hFF};
  // R5 repaired by input-side feedback: f0 = 1 ^ (y1 & ~y2). R5 gives
  // z(t+3) = x(t) ^ e, where e = y1(t) & ~y2(t) is known at time t, so
  // feeding e into y1 together with x(t) cancels it (SR-equivalent).
  localparam logic [14:0] GFSR_R5_SREQ = {1'b1, 2'b00, 4'h2, 8'hDD};

endpackage

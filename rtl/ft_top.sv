// ft_top: fault-tolerant combinational circuit built from one totally
// self-checking copy and one simplex copy of a function.
//
// Idea. Triple modular redundancy needs three copies and a voter. Here one
// copy, tsc_cs1, checks itself: its outputs (Y1, Z1) form a parity code word
// whenever it works, and tsc_checker turns that into a two-rail flag (u1, u2).
// A second, cheap and unchecked copy, cs2, runs beside it. The output
// multiplexer ft_mux passes Y1 when the flag and the two-rail pair (Y1, Y1*)
// are valid and falls back to Y2 otherwise. If faults come one at a time and
// each disappears before the next (transient or intermittent faults), either
// the checked copy is right or its fault is detected and the simplex copy,
// then fault-free, is used.
//
// Structure (all nets named so that single faults can be placed on them):
//   branch point 1: x1 = x feeds tsc_cs1, x2 = x feeds cs2;
//   branch point 2: y1 feeds the checker (y1_chk), the multiplexer (y1_mux)
//                   and, inverted, the multiplexer's Y1* input (y1n_mux).
// The function is the example N-bit adder y = {cout, sum} = a + b + cin with
// x = {cin, b, a}; the width N is this design's choice.
//
// Timing: purely combinational, no clock, no reset, zero cycles latency.
module ft_top import ftc_pkg::*; #(
  parameter int unsigned N = DEFAULT_N           // adder width
) (
  input  logic [2*N:0] x,                        // X = {cin, b, a}
  output logic [N:0]   y                         // Y = {cout, sum}
);

  localparam int unsigned M = N + 1;             // primary outputs
  localparam int unsigned S = 1;                 // check outputs

  // Branch point 1.
  logic [2*N:0] x1, x2;
  assign x1 = x;
  assign x2 = x;

  // Checked copy.
  logic [M-1:0] y1;
  logic [S-1:0] z1;
  tsc_cs1 #(.N(N)) u_cs1 (.x(x1), .y(y1), .z(z1));

  // Branch point 2.
  logic [M-1:0] y1_chk, y1_mux, y1n_mux;
  assign y1_chk  = y1;
  assign y1_mux  = y1;
  assign y1n_mux = ~y1;

  // Checker.
  logic u1, u2;
  tsc_checker #(.W(M + S)) u_chk (.cw({z1, y1_chk}), .u1(u1), .u2(u2));

  // Simplex copy.
  logic [M-1:0] y2;
  cs2 #(.N(N)) u_cs2 (.x(x2), .y(y2));

  // Output multiplexer.
  ft_mux #(.M(M)) u_mux (
    .u1 (u1),
    .u2 (u2),
    .y1 (y1_mux),
    .y1n(y1n_mux),
    .y2 (y2),
    .y  (y)
  );

endmodule

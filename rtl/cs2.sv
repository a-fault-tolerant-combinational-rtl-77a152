// cs2: the simplex (unchecked) realisation of the main combinational
// function (CS2 of the fault-tolerant scheme).
//
// It computes the same function as tsc_cs1, the example N-bit adder
// y = {cout, sum} = a + b + cin with x = {cin, b, a}, as cheaply as possible:
// a plain ripple-carry adder with no check outputs. The scheme asks for a
// low-cost copy and suggests a different gate family from the checked copy;
// here every gate is a NAND (ftc_pkg), against NOR gates in tsc_cs1.
// Each full adder is the usual nine-NAND cell:
//   h = XOR(a, b), s = XOR(h, c), cout = NAND(NAND(a, b), NAND(h, c)).
// The adder function is this design's example choice.
//
// Timing: purely combinational, no clock, no reset.
module cs2 import ftc_pkg::*; #(
  parameter int unsigned N = DEFAULT_N           // adder width
) (
  input  logic [2*N:0] x,                        // {cin, b[N-1:0], a[N-1:0]}
  output logic [N:0]   y                         // Y2 = {cout, sum}
);

  logic [N-1:0] a, b, h;
  logic [N:0]   c;

  assign a    = x[N-1:0];
  assign b    = x[2*N-1:N];
  assign c[0] = x[2*N];

  for (genvar j = 0; j < N; j++) begin : g_fa
    assign h[j]   = xor_nand(a[j], b[j]);
    assign y[j]   = xor_nand(h[j], c[j]);
    assign c[j+1] = nand2(nand2(a[j], b[j]), nand2(h[j], c[j]));
  end

  assign y[N] = c[N];

endmodule

// tsc_cs1: totally self-checking realisation of the main combinational
// function (TSC_CS1 of the fault-tolerant scheme).
//
// Function. The scheme leaves the protected function open; this design uses
// an N-bit adder as its example: x = {cin, b, a}, y = {cout, sum} = a + b + cin.
// Besides the primary outputs y (Y1) the circuit drives one check output z (Z1)
// so that (y, z) always has odd parity: z is the predicted parity of y,
// inverted. The parity code is one of the self-checking techniques the scheme
// names; the odd polarity is this design's choice, so that all-zero and
// all-one words are never code words.
//
// Structure. A parity code only detects single-bit errors, so the circuit is
// built so that any single internal fault disturbs at most one of the N+2
// output bits: every output (sum_k, cout and z) has its own logic cone with
// its own private carry chain, and no gate is shared between cones. Cone k
// (generate block g_cone[k]) holds carries c[0..N]; sum_k uses carry k of
// cone k, cout is carry N of cone N, and the parity cone (index N+1) uses its
// own chain cp = g_cone[N+1].c:
//   z = NOT( XOR(a) ^ XOR(b) ^ XOR(cp[N-1:0]) ^ cp[N] ).
// Every cone builds the full chain for simplicity; sum cone k uses only
// carries 0..k, so lint reports the higher carries of those cones as unused
// and synthesis removes them. All gates are NOR gates (ftc_pkg). A synthesis flow merges identical
// cones unless told to keep them; a gate-level netlist must keep them apart
// for the fault-secure property to hold.
//
// Timing: purely combinational, no clock, no reset.
module tsc_cs1 import ftc_pkg::*; #(
  parameter int unsigned N = DEFAULT_N           // adder width
) (
  input  logic [2*N:0] x,                        // {cin, b[N-1:0], a[N-1:0]}
  output logic [N:0]   y,                        // Y1 = {cout, sum}
  output logic         z                         // Z1, check bit
);

  localparam int unsigned CONES = N + 2;         // N sums, cout, parity

  logic [N-1:0] a, b;
  logic         cin;
  assign a   = x[N-1:0];
  assign b   = x[2*N-1:N];
  assign cin = x[2*N];

  // g_cone[k].c[j]: carry into bit j, computed privately inside cone k.
  for (genvar k = 0; k < CONES; k++) begin : g_cone
    logic [N:0] c;
    assign c[0] = cin;
    for (genvar j = 0; j < N; j++) begin : g_carry
      assign c[j+1] = maj_nor(a[j], b[j], c[j]);
    end
  end

  // Sum cones.
  for (genvar k = 0; k < N; k++) begin : g_sum
    assign y[k] = xor_nor(xor_nor(a[k], b[k]), g_cone[k].c[k]);
  end

  // Carry-out cone.
  assign y[N] = g_cone[N].c[N];

  // Parity-prediction cone.
  logic [3*N:0] pterm;                           // every term of the parity
  assign pterm = {g_cone[N+1].c, b, a};

  logic zp;
  always_comb begin
    zp = 1'b1;                                   // odd parity over (y, z)
    for (int unsigned i = 0; i < 3*N + 1; i++) begin
      zp = xor_nor(zp, pterm[i]);
    end
  end
  assign z = zp;

endmodule

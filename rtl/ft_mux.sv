// ft_mux: output multiplexer of the fault-tolerant scheme (MUX).
//
// For every output line i it chooses between the checked copy y1_i and the
// simplex copy y2_i. The checked copy reaches the multiplexer twice, as y1_i
// and as its inverted copy y1n_i (Y1*), so each line arrives in two-rail form.
// The multiplexer trusts y1_i only when both two-rail pairs are valid:
//   sel_i = (u1 != u2) && (y1_i != y1n_i);   y_i = sel_i ? y1_i : y2_i.
// This is Table 1 of the scheme line by line: a checker error (00/11) or a
// broken pair on line i (00/11) hands line i to the simplex copy. The
// selection is made per line (PER_LINE = 1, the default), so a fault on one
// line of the two-rail pair moves only that line to y2. With PER_LINE = 0 the
// multiplexer follows the stricter word-wide reading of the same rule: Y1 is
// passed only when every pair is valid, otherwise the whole word comes from
// y2. Both keep the output correct under one fault at a time. sel is a named
// net so that faults on it can be injected in simulation.
//
// Timing: purely combinational, no clock, no reset.
module ft_mux #(
  parameter int unsigned M        = ftc_pkg::DEFAULT_N + 1, // output lines
  parameter bit          PER_LINE = 1'b1        // 1: per line, 0: word-wide
) (
  input  logic         u1,
  input  logic         u2,
  input  logic [M-1:0] y1,                       // Y1  from branch point 2
  input  logic [M-1:0] y1n,                      // Y1* from branch point 2
  input  logic [M-1:0] y2,                       // Y2  from cs2
  output logic [M-1:0] y
);

  logic         chk_ok;
  logic [M-1:0] pair_ok;
  logic [M-1:0] sel;

  assign chk_ok  = u1 ^ u2;
  assign pair_ok = y1 ^ y1n;

  if (PER_LINE) begin : g_per_line
    assign sel = {M{chk_ok}} & pair_ok;
  end else begin : g_word
    assign sel = {M{chk_ok & (&pair_ok)}};
  end
  assign y      = (sel & y1) | (~sel & y2);

endmodule

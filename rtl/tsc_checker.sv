// tsc_checker: totally self-checking checker for the code word (Y1, Z1) of
// tsc_cs1 (TSC_Ch of the fault-tolerant scheme).
//
// The check code is odd parity over all W bits. The classic self-checking
// parity checker splits the word into two non-empty groups and reduces each
// with its own XOR tree: u1 = XOR(cw[K-1:0]), u2 = XOR(cw[W-1:K]), K = W/2.
// For a code word u1 ^ u2 = 1, so (u1, u2) is 01 or 10; a word with a single
// (or any odd number of) flipped bit gives 00 or 11. A stuck-at fault inside
// either tree also turns the output into 00 or 11 for some code word, since
// each tree output takes both values over the code words. The two-rail output
// form is the scheme's; the parity code and the split point are this
// design's choices.
//
// Timing: purely combinational, no clock, no reset.
module tsc_checker #(
  parameter int unsigned W = ftc_pkg::DEFAULT_N + 2   // m + s bits checked
) (
  input  logic [W-1:0] cw,                       // {Z1, Y1}
  output logic         u1,
  output logic         u2
);

  localparam int unsigned K = W / 2;

  if (W < 2) begin : g_bad_width
    $error("tsc_checker needs W >= 2");
  end

  assign u1 = ^cw[K-1:0];
  assign u2 = ^cw[W-1:K];

endmodule

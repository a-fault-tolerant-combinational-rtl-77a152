// tb_tsc_checker: self-checking testbench for the two-rail parity checker.
//
// At the default width (6) and at width 2, every input word is applied:
// (u1, u2) must be 01 or 10 exactly when the word has odd parity (a code
// word), and 00 or 11 otherwise. It also checks the self-testing condition
// on the outputs: over the code words, each of u1 and u2 takes both values.
// No clock: inputs are applied with #1 steps. A watchdog ends the run.
module tb_tsc_checker;
  import ftc_pkg::*;

  localparam int W  = DEFAULT_N + 2;
  localparam int W2 = 2;

  logic [W-1:0]  cw;
  logic [W2-1:0] cw2;
  logic          u1, u2, v1, v2;

  tsc_checker #(.W(W))  dut   (.cw(cw),  .u1(u1), .u2(u2));
  tsc_checker #(.W(W2)) dut_2 (.cw(cw2), .u1(v1), .u2(v2));

  int checks   = 0;
  int failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] seen1, seen2;                    // values seen on code words
    int ones;
    seen1 = '0;
    seen2 = '0;
    for (int v = 0; v < (1 << W); v++) begin
      cw = v[W-1:0];
      #1;
      ones = $countones(cw);
      checks++;
      if ((u1 != u2) != (ones % 2 == 1)) begin
        failures++;
        $display("FAIL W=%0d cw=%b u=%b%b", W, cw, u1, u2);
      end
      if (ones % 2 == 1) begin
        seen1[u1] = 1'b1;
        seen2[u2] = 1'b1;
      end
    end
    checks += 2;
    if (seen1 != 2'b11) begin failures++; $display("FAIL u1 constant on code words"); end
    if (seen2 != 2'b11) begin failures++; $display("FAIL u2 constant on code words"); end

    for (int v = 0; v < (1 << W2); v++) begin
      cw2 = v[W2-1:0];
      #1;
      checks++;
      if ((v1 != v2) != ($countones(cw2) % 2 == 1)) begin
        failures++;
        $display("FAIL W=2 cw=%b u=%b%b", cw2, v1, v2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

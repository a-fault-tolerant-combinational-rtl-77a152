// tb_ft_mux: self-checking testbench for the output multiplexer.
//
// Applies every combination of (u1, u2, y1, y1n, y2) for the default number
// of lines and compares each output line with the multiplexer's truth table,
// written out row by row below: with a valid checker flag (01 or 10) a valid
// pair (y1, y1n) = 10 gives 1 and 01 gives 0, a broken pair (00 or 11) gives
// y2; with an error flag (00 or 11) every line gives y2. A second instance,
// built for the word-wide rule (PER_LINE = 0), must pass y1 only when the
// flag and every pair are valid, and give the whole word from y2 otherwise.
// No clock: inputs are
// applied with #1 steps. A watchdog ends the run if it hangs.
module tb_ft_mux;
  import ftc_pkg::*;

  localparam int M = DEFAULT_N + 1;

  logic         u1, u2;
  logic [M-1:0] y1, y1n, y2, y, yw;

  ft_mux #(.M(M)) dut (.u1(u1), .u2(u2), .y1(y1), .y1n(y1n), .y2(y2), .y(y));
  ft_mux #(.M(M), .PER_LINE(1'b0)) dut_w (
    .u1(u1), .u2(u2), .y1(y1), .y1n(y1n), .y2(y2), .y(yw)
  );

  int checks   = 0;
  int failures = 0;
  int took_y1  = 0;

  // Truth table of one line.
  function automatic logic table_line(input logic a1, input logic a2,
                                      input logic p, input logic pn,
                                      input logic q);
    case ({a1, a2})
      2'b01, 2'b10:
        case ({p, pn})
          2'b10:   return 1'b1;
          2'b01:   return 1'b0;
          default: return q;                     // 00 or 11
        endcase
      default: return q;                         // checker reports an error
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int uu = 0; uu < 4; uu++) begin
      for (int v = 0; v < (1 << (3*M)); v++) begin
        {u1, u2}       = uu[1:0];
        {y2, y1n, y1}  = v[3*M-1:0];
        #1;
        for (int i = 0; i < M; i++) begin
          checks++;
          if (y[i] !== table_line(u1, u2, y1[i], y1n[i], y2[i])) begin
            failures++;
            if (failures < 10)
              $display("FAIL u=%b%b line %0d y1=%b y1n=%b y2=%b y=%b",
                       u1, u2, i, y1[i], y1n[i], y2[i], y[i]);
          end
          if (y1[i] != y2[i] && y[i] == y1[i]) took_y1++;
        end
        // Word-wide rule.
        checks++;
        if (yw !== (((u1 != u2) && (y1 == ~y1n)) ? y1 : y2)) begin
          failures++;
          if (failures < 10)
            $display("FAIL word-wide u=%b%b y1=%b y1n=%b y2=%b y=%b",
                     u1, u2, y1, y1n, y2, yw);
        end
      end
    end
    checks++;
    if (took_y1 == 0) begin
      failures++;
      $display("FAIL the multiplexer never chose y1 over a differing y2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

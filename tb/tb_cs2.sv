// tb_cs2: self-checking testbench for the simplex adder cs2.
//
// Applies every input at the default width and at width 1, and compares y
// with a + b + cin worked out here with integer arithmetic. No clock: inputs
// are applied with #1 steps. A watchdog ends the run if it hangs.
module tb_cs2;
  import ftc_pkg::*;

  localparam int N  = DEFAULT_N;
  localparam int N1 = 1;

  logic [2*N:0]  x;
  logic [N:0]    y;
  logic [2*N1:0] xs;
  logic [N1:0]   ys;

  cs2 #(.N(N))  dut   (.x(x),  .y(y));
  cs2 #(.N(N1)) dut_1 (.x(xs), .y(ys));

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
    int unsigned e;
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      x = v[2*N:0];
      #1;
      e = int'(x[N-1:0]) + int'(x[2*N-1:N]) + int'(x[2*N]);
      checks++;
      if (y !== e[N:0]) begin
        failures++;
        $display("FAIL N=%0d x=%h y=%h expected %h", N, x, y, e[N:0]);
      end
    end
    for (int v = 0; v < (1 << (2*N1+1)); v++) begin
      xs = v[2*N1:0];
      #1;
      e = int'(xs[0]) + int'(xs[1]) + int'(xs[2]);
      checks++;
      if (ys !== e[N1:0]) begin
        failures++;
        $display("FAIL N=1 x=%h y=%h expected %h", xs, ys, e[N1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_tsc_cs1: self-checking testbench for tsc_cs1 at its default width.
//
// 1. Fault-free, every input: y must equal a + b + cin (worked out here with
//    integer arithmetic) and (y, z) must have odd parity.
// 2. Fault-secure and self-testing: every line that can carry a single
//    stuck-at fault (each private carry of each cone that reaches an output,
//    each output line) is forced to 0 and then to 1 while all inputs are
//    applied. For every input the result must be either the correct code word
//    or a non-code word (even parity), and every fault must give a non-code
//    word for at least one input.
// Faults are placed with force/release from one always block per line,
// because a force target needs a constant select. No clock: inputs are
// applied with #1 steps. A watchdog ends the run if it hangs.
module tb_tsc_cs1;
  import ftc_pkg::*;

  localparam int N     = DEFAULT_N;
  localparam int NC    = N + 2;                  // cones
  localparam int NCS   = NC * (N + 1);           // carry fault sites
  localparam int NOS   = N + 2;                  // output fault sites
  localparam int NIN   = 1 << (2 * N + 1);

  logic [2*N:0] x;
  logic [N:0]   y;
  logic         z;

  tsc_cs1 #(.N(N)) dut (.x(x), .y(y), .z(z));

  int checks   = 0;
  int failures = 0;

  // ---------------- fault injection ----------------
  logic [NCS-1:0] inj_c = '0;
  logic [NOS-1:0] inj_o = '0;
  logic           inj_val = 1'b0;

  for (genvar k = 0; k < NC; k++) begin : g_ck
    for (genvar j = 0; j <= N; j++) begin : g_cj
      always @(inj_c[k*(N+1)+j]) begin
        if (inj_c[k*(N+1)+j]) force dut.g_cone[k].c[j] = inj_val;
        else                  release dut.g_cone[k].c[j];
      end
    end
  end

  for (genvar i = 0; i <= N; i++) begin : g_oy
    always @(inj_o[i]) begin
      if (inj_o[i]) force dut.y[i] = inj_val;
      else          release dut.y[i];
    end
  end

  always @(inj_o[N+1]) begin
    if (inj_o[N+1]) force dut.z = inj_val;
    else            release dut.z;
  end

  // ---------------- reference ----------------
  function automatic logic [N:0] ref_sum(input logic [2*N:0] v);
    int unsigned s;
    s = int'(v[N-1:0]) + int'(v[2*N-1:N]) + int'(v[2*N]);
    return s[N:0];
  endfunction

  // One fault, both polarities, all inputs.
  task automatic run_fault(input string name);
    int detected;
    for (int sa = 0; sa < 2; sa++) begin
      inj_val  = 1'(sa);
      detected = 0;
      #1;
      for (int v = 0; v < NIN; v++) begin
        x = v[2*N:0];
        #1;
        checks++;
        if (^{z, y}) begin
          if (y !== ref_sum(x)) begin
            failures++;
            $display("FAIL %s s-a-%0d x=%h: wrong code word y=%h", name, sa, x, y);
          end
        end else begin
          detected++;
        end
      end
      checks++;
      if (detected == 0) begin
        failures++;
        $display("FAIL %s s-a-%0d never detected", name, sa);
      end
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. fault-free
    for (int v = 0; v < NIN; v++) begin
      x = v[2*N:0];
      #1;
      checks += 2;
      if (y !== ref_sum(x)) begin
        failures++;
        $display("FAIL x=%h y=%h expected %h", x, y, ref_sum(x));
      end
      if (^{z, y} !== 1'b1) begin
        failures++;
        $display("FAIL x=%h (y,z) not a code word", x);
      end
    end

    // 2. single carry faults in every cone (only carries that reach the output)
    for (int k = 0; k < NC; k++) begin
      for (int j = 0; j <= N; j++) begin
        if (k < N && j > k) continue;            // sum_k uses carries 0..k
        inj_c[k*(N+1)+j] = 1'b1;
        run_fault($sformatf("c[%0d][%0d]", k, j));
        inj_c[k*(N+1)+j] = 1'b0;
        #1;
      end
    end

    // 3. single output-line faults
    for (int i = 0; i < NOS; i++) begin
      inj_o[i] = 1'b1;
      run_fault($sformatf("out[%0d]", i));
      inj_o[i] = 1'b0;
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ft_top: end-to-end testbench of the fault-tolerant circuit at its
// default parameters.
//
// It applies every input word, first with no fault and then under each
// single stuck-at fault (value 0, then 1) on every line class the scheme
// covers, and compares Y with a + b + cin worked out here:
//   CS1  - each private carry of tsc_cs1 and each of its outputs Y1, Z1;
//   CH   - each line from branch point 2 into the checker, and u1, u2;
//   CS2  - each input line of cs2 (X2), each of its carries and half-sums,
//          each of its outputs Y2;
//   P2   - each line from branch point 2 into the multiplexer (Y1 and Y1*);
//   MUX  - each per-line select of the multiplexer.
// Under all of these Y must stay correct for every input. Input lines into
// tsc_cs1 (X1) are also faulted: a parity code cannot see such a fault, since
// tsc_cs1 then computes a correct code word for a different input, so the
// check there is that Y equals the sum of the faulted input, and the number
// of wrong outputs is reported.
// It counts how often each mechanism happened: Y1 passed through, checker
// error flag, broken two-rail pair on a line, a CS2 error masked, a
// multiplexer select fault masked. Each must happen at least once.
// Faults are placed with force/release, one always block per line. No clock:
// inputs are applied with #1 steps. A watchdog ends the run if it hangs.
module tb_ft_top;
  import ftc_pkg::*;

  localparam int N   = DEFAULT_N;
  localparam int M   = N + 1;
  localparam int NX  = 2 * N + 1;
  localparam int NIN = 1 << NX;

  // Fault-site index ranges.
  localparam int OFF_C1   = 0;                   // tsc_cs1 carries
  localparam int OFF_Y1   = OFF_C1 + (N + 2) * (N + 1);
  localparam int OFF_Z1   = OFF_Y1 + M;
  localparam int OFF_X1   = OFF_Z1 + 1;
  localparam int OFF_YCHK = OFF_X1 + NX;
  localparam int OFF_U1   = OFF_YCHK + M;
  localparam int OFF_U2   = OFF_U1 + 1;
  localparam int OFF_Y2   = OFF_U2 + 1;
  localparam int OFF_X2   = OFF_Y2 + M;
  localparam int OFF_C2   = OFF_X2 + NX;
  localparam int OFF_H2   = OFF_C2 + (N + 1);
  localparam int OFF_YMUX = OFF_H2 + N;
  localparam int OFF_YN   = OFF_YMUX + M;
  localparam int OFF_SEL  = OFF_YN + M;
  localparam int NS       = OFF_SEL + M;

  typedef enum logic [2:0] {CAT_NONE, CAT_CS1, CAT_X1, CAT_CH, CAT_CS2,
                            CAT_P2, CAT_MUX} cat_e;

  logic [NX-1:0] x;
  logic [M-1:0]  y;

  ft_top dut (.x(x), .y(y));

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int n_y1_used    = 0;                          // a line passed Y1
  int n_chk_err    = 0;                          // checker flag 00/11
  int n_pair_err   = 0;                          // broken Y1/Y1* pair
  int n_cs2_masked = 0;                          // Y2 wrong, Y right
  int n_sel_masked = 0;                          // select faulted, Y right
  int n_x1_wrong   = 0;                          // X1 fault, Y wrong

  // ---------------- fault injection ----------------
  logic [NS-1:0] f_en = '0;
  logic          fv   = 1'b0;

  `define FT_INJ(IDX, PATH) \
    always @(f_en[IDX]) begin \
      if (f_en[IDX]) force PATH = fv; \
      else           release PATH; \
    end

  for (genvar k = 0; k < N + 2; k++) begin : g_c1k
    for (genvar j = 0; j <= N; j++) begin : g_c1j
      `FT_INJ(OFF_C1 + k*(N+1) + j, dut.u_cs1.g_cone[k].c[j])
    end
  end
  for (genvar i = 0; i < M; i++) begin : g_line
    `FT_INJ(OFF_Y1 + i,   dut.y1[i])
    `FT_INJ(OFF_YCHK + i, dut.y1_chk[i])
    `FT_INJ(OFF_Y2 + i,   dut.y2[i])
    `FT_INJ(OFF_YMUX + i, dut.y1_mux[i])
    `FT_INJ(OFF_YN + i,   dut.y1n_mux[i])
    `FT_INJ(OFF_SEL + i,  dut.u_mux.sel[i])
  end
  for (genvar i = 0; i < NX; i++) begin : g_in
    `FT_INJ(OFF_X1 + i, dut.x1[i])
    `FT_INJ(OFF_X2 + i, dut.x2[i])
  end
  for (genvar j = 0; j <= N; j++) begin : g_c2
    `FT_INJ(OFF_C2 + j, dut.u_cs2.c[j])
  end
  for (genvar j = 0; j < N; j++) begin : g_h2
    `FT_INJ(OFF_H2 + j, dut.u_cs2.h[j])
  end
  `FT_INJ(OFF_Z1, dut.z1[0])
  `FT_INJ(OFF_U1, dut.u1)
  `FT_INJ(OFF_U2, dut.u2)

  `undef FT_INJ

  // ---------------- reference ----------------
  function automatic logic [M-1:0] ref_sum(input logic [NX-1:0] v);
    int unsigned s;
    s = int'(v[N-1:0]) + int'(v[2*N-1:N]) + int'(v[2*N]);
    return s[M-1:0];
  endfunction

  // Apply every input with the current fault and check Y.
  task automatic sweep(input cat_e cat, input int site, input string name);
    logic [NX-1:0] xf;
    int            detected;
    detected = 0;
    for (int v = 0; v < NIN; v++) begin
      x = v[NX-1:0];
      #1;
      checks++;
      if (cat == CAT_X1) begin
        // tsc_cs1 sees the input with the faulted bit stuck.
        xf = x;
        xf[site - OFF_X1] = fv;
        if (y !== ref_sum(xf)) begin
          failures++;
          $display("FAIL %s s-a-%0b x=%h y=%h expected %h", name, fv, x, y, ref_sum(xf));
        end
        if (y !== ref_sum(x)) n_x1_wrong++;
      end else if (y !== ref_sum(x)) begin
        failures++;
        $display("FAIL %s s-a-%0b x=%h y=%h expected %h", name, fv, x, y, ref_sum(x));
      end

      // Mechanism bookkeeping from the circuit's own nets.
      n_y1_used += $countones(dut.u_mux.sel);
      if (dut.u1 == dut.u2) begin
        n_chk_err++;
        detected++;
      end else if (|(~(dut.y1_mux ^ dut.y1n_mux))) begin
        n_pair_err++;
      end
      if (dut.y2 !== ref_sum(x) && y === ref_sum(x)) n_cs2_masked++;
      // Select forced against the value the multiplexer would have chosen.
      if (cat == CAT_MUX && y === ref_sum(x) &&
          fv != ((dut.u1 ^ dut.u2) &
                 (dut.y1_mux[site - OFF_SEL] ^ dut.y1n_mux[site - OFF_SEL])))
        n_sel_masked++;
    end
    // A fault in tsc_cs1 must be detectable (self-testing).
    if (cat == CAT_CS1) begin
      checks++;
      if (detected == 0) begin
        failures++;
        $display("FAIL %s s-a-%0b never flagged by the checker", name, fv);
      end
    end
  endtask

  task automatic run_site(input cat_e cat, input int site, input string name);
    for (int sa = 0; sa < 2; sa++) begin
      fv = 1'(sa);
      f_en[site] = 1'b1;
      #1;
      sweep(cat, site, name);
      f_en[site] = 1'b0;
      #1;
    end
  endtask

  task automatic expect_seen(input string what, input int count);
    checks++;
    $display("mechanism %-32s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    sweep(CAT_NONE, 0, "fault-free");

    for (int k = 0; k < N + 2; k++)
      for (int j = 0; j <= N; j++)
        if (!(k < N && j > k))                   // sum_k uses carries 0..k
          run_site(CAT_CS1, OFF_C1 + k*(N+1) + j, $sformatf("cs1 cone %0d carry %0d", k, j));
    for (int i = 0; i < M; i++) run_site(CAT_CS1, OFF_Y1 + i, $sformatf("Y1[%0d]", i));
    run_site(CAT_CS1, OFF_Z1, "Z1");
    for (int i = 0; i < NX; i++) run_site(CAT_X1, OFF_X1 + i, $sformatf("X1[%0d]", i));
    for (int i = 0; i < M; i++) run_site(CAT_CH, OFF_YCHK + i, $sformatf("checker in[%0d]", i));
    run_site(CAT_CH, OFF_U1, "u1");
    run_site(CAT_CH, OFF_U2, "u2");
    for (int i = 0; i < M; i++) run_site(CAT_CS2, OFF_Y2 + i, $sformatf("Y2[%0d]", i));
    for (int i = 0; i < NX; i++) run_site(CAT_CS2, OFF_X2 + i, $sformatf("X2[%0d]", i));
    for (int j = 0; j <= N; j++) run_site(CAT_CS2, OFF_C2 + j, $sformatf("cs2 carry %0d", j));
    for (int j = 0; j < N; j++) run_site(CAT_CS2, OFF_H2 + j, $sformatf("cs2 half-sum %0d", j));
    for (int i = 0; i < M; i++) run_site(CAT_P2, OFF_YMUX + i, $sformatf("mux Y1[%0d]", i));
    for (int i = 0; i < M; i++) run_site(CAT_P2, OFF_YN + i, $sformatf("mux Y1*[%0d]", i));
    for (int i = 0; i < M; i++) run_site(CAT_MUX, OFF_SEL + i, $sformatf("mux sel[%0d]", i));

    expect_seen("Y1 line passed to Y", n_y1_used);
    expect_seen("checker error flag (00/11)", n_chk_err);
    expect_seen("broken Y1/Y1* pair", n_pair_err);
    expect_seen("CS2 error masked", n_cs2_masked);
    expect_seen("mux select fault masked", n_sel_masked);
    $display("X1 input faults giving a wrong Y: %0d input/fault pairs", n_x1_wrong);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// ftc_pkg: shared constants and single-gate helper functions for the
// fault-tolerant combinational circuit.
//
// The scheme pairs a totally self-checking copy of a combinational function
// (tsc_cs1) with a plain copy (cs2). Building the two copies from different
// gate families lowers the chance that one defect hits both in the same way,
// so tsc_cs1 is written with NOR gates only and cs2 with NAND gates only,
// as the scheme suggests. The functions below are those gates and the small
// networks (XOR, majority) built from them. Each function is one gate or one
// fixed gate network; there is no timing, everything is combinational.
//
// DEFAULT_N, the adder width of the example function, is this design's own
// choice: the scheme works for any combinational function.
package ftc_pkg;

  localparam int unsigned DEFAULT_N = 4;

  // ---------------- NOR-only gates (tsc_cs1) ----------------
  function automatic logic nor2(input logic a, input logic b);
    return ~(a | b);
  endfunction

  function automatic logic nor3(input logic a, input logic b, input logic c);
    return ~(a | b | c);
  endfunction

  // XOR from five NOR gates: four form XNOR, the fifth inverts it.
  function automatic logic xor_nor(input logic a, input logic b);
    logic t0, t1, t2, xn;
    t0 = nor2(a, b);
    t1 = nor2(a, t0);
    t2 = nor2(b, t0);
    xn = nor2(t1, t2);
    return nor2(xn, xn);
  endfunction

  // Majority (full-adder carry) from four NOR gates:
  // maj = (a|b)&(a|c)&(b|c) = NOR(NOR(a,b), NOR(a,c), NOR(b,c)).
  function automatic logic maj_nor(input logic a, input logic b, input logic c);
    return nor3(nor2(a, b), nor2(a, c), nor2(b, c));
  endfunction

  // ---------------- NAND-only gates (cs2) ----------------
  function automatic logic nand2(input logic a, input logic b);
    return ~(a & b);
  endfunction

  // XOR from four NAND gates.
  function automatic logic xor_nand(input logic a, input logic b);
    logic t0;
    t0 = nand2(a, b);
    return nand2(nand2(a, t0), nand2(b, t0));
  endfunction

endpackage

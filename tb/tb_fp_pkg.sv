// tb_fp_pkg: testbench helpers converting between real numbers and
// IEEE-754 single-precision words, written independently of the RTL float
// units (they go through the simulator's double-precision $realtobits).
package tb_fp_pkg;

  // double -> single, round to nearest even, subnormals flushed to zero
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [23:0] mm;
    logic [28:0] rest;
    logic [24:0] mr;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    s = d[63];
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mm = m[52:29];
    rest = m[28:0];
    mr = {1'b0, mm};
    if (rest[28] && ((|rest[27:0]) || mm[0])) mr = mr + 25'd1;
    if (mr[24]) begin mr = mr >> 1; e++; end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // |got - exp| <= abs_tol + rel_tol * |exp|
  function automatic bit near(input real got, input real exp_v, input real rel_tol, input real abs_tol);
    return rabs(got - exp_v) <= abs_tol + rel_tol * rabs(exp_v);
  endfunction

endpackage

// tb_fp_pkg: reference conversions between binary32 bit patterns and real,
// written out bit by bit from the double-precision encoding so that the
// testbenches do not depend on a simulator's shortreal support.
//   f2r: binary32 -> real (exact; subnormals read as zero)
//   r2f: real -> binary32, rounded to nearest, ties to even; results below the
//        smallest normal number flush to a signed zero, overflow to infinity.
//   rabs: absolute value of a real.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [23:0] mr;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mr = m[52:29];
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mr[0])) mr = mr + 24'd1;
    if (mr == 24'd0) begin            // carry out of the significand
      mr = 24'h800000;
      e  = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

endpackage

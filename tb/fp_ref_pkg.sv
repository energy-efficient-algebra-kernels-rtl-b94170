// fp_ref_pkg: reference single-precision arithmetic for the testbenches,
// computed independently of the RTL through the simulator's double-precision
// reals. The exact product of two binary32 numbers fits in a double, and a
// double-precision sum rounded once more to binary32 equals the correctly
// rounded binary32 sum (53 >= 2*24 + 2), so rounding the double result to
// binary32 with round-to-nearest-even gives the expected bits. Subnormal
// results are flushed to zero, as the RTL does. Stimulus stays away from
// infinities and NaNs except in dedicated checks.
package fp_ref_pkg;

  function automatic real fp32_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp32(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp32(fp32_to_real(a) * fp32_to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp32(fp32_to_real(a) + fp32_to_real(b));
  endfunction

  // random normal number with exponent in [127-spread, 127+spread]
  function automatic logic [31:0] rand_fp(input int spread);
    int e;
    e = 127 - spread + int'($urandom_range(2 * spread, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Expected y of one sparse row as the streaming SPMV kernel forms it:
  // iterations of L elements (zero padded, at least one), products summed by
  // a pairwise tree, then acc = t_0 + 0, acc = t_k + acc.
  function automatic logic [31:0] ref_spmv_row(input logic [31:0] v [$],
                                               input logic [31:0] xs [$],
                                               input int L);
    logic [31:0] p [$];
    logic [31:0] acc;
    int          it;
    acc = 32'd0;
    it  = 0;
    do begin
      p = {};
      for (int q = 0; q < L; q++) begin
        int j;
        j = it * L + q;
        if (j < v.size()) p.push_back(ref_mul(v[j], xs[j]));
        else              p.push_back(ref_mul(32'd0, 32'd0));
      end
      while (p.size() > 1) begin
        logic [31:0] np [$];
        np = {};
        for (int q = 0; q < p.size(); q += 2) np.push_back(ref_add(p[q], p[q+1]));
        p = np;
      end
      acc = (it == 0) ? ref_add(p[0], 32'd0) : ref_add(p[0], acc);
      it++;
    end while (it * L < v.size());
    return acc;
  endfunction

endpackage

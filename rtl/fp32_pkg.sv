// fp32_pkg: single-precision (IEEE-754 binary32) arithmetic shared by all
// kernels. Both linear-algebra kernels work on 32-bit floats, as the OpenCL
// code does ("sum = 0.0f"). The two functions below are the combinational
// cores of the multiplier and adder; fp32_mul and fp32_add wrap them in a
// pipeline of configurable latency.
//
// Rounding is round-to-nearest-even. Subnormal inputs are read as zero and
// results below the normal range are flushed to zero (a common FPGA choice;
// it is this design's own). Infinities propagate, overflow gives infinity,
// and every NaN result is the canonical quiet NaN 32'h7fc00000.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

  // Round a normalised mantissa {1.f} (24 bits) with guard and sticky bits
  // and pack it with sign and biased exponent; handles overflow/underflow.
  function automatic fp32_t fp32_pack(input logic s, input int e,
                                      input logic [23:0] m, input logic g,
                                      input logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m};
    er = e;
    if (g && (st || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255)    return {s, 8'hff, 23'd0};
    else if (er <= 0) return {s, 31'd0};
    else              return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic fp32_t fp32_mul_f(input fp32_t a, input fp32_t b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    int          e;
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0))
      return FP32_QNAN;
    if (ea == 8'hff || eb == 8'hff) begin
      if (ea == 8'h00 || eb == 8'h00) return FP32_QNAN;  // inf * 0
      return {s, 8'hff, 23'd0};
    end
    if (ea == 8'h00 || eb == 8'h00) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) return fp32_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return fp32_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp32_add_f(input fp32_t a, input fp32_t b);
    fp32_t       x, y;           // |x| >= |y|
    logic [7:0]  ex, ey;
    logic [26:0] mx, my;         // 1.f followed by guard, round, sticky
    logic [27:0] sum;
    int          d, e, lz;
    logic        st;
    ex = a[30:23];
    ey = b[30:23];
    if ((ex == 8'hff && a[22:0] != 0) || (ey == 8'hff && b[22:0] != 0))
      return FP32_QNAN;
    if (ex == 8'hff && ey == 8'hff)
      return (a[31] == b[31]) ? a : FP32_QNAN;
    if (ex == 8'hff) return a;
    if (ey == 8'hff) return b;
    if (ex == 8'h00 && ey == 8'h00) return {a[31] & b[31], 31'd0};
    if (ex == 8'h00) return b;
    if (ey == 8'h00) return a;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    ex = x[30:23];
    ey = y[30:23];
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    d  = int'(ex) - int'(ey);
    if (d > 26) begin
      my = 27'd1;                // only the sticky bit survives
    end else if (d > 0) begin
      st = 1'b0;
      for (int i = 0; i < 27; i++) if (i < d && my[i]) st = 1'b1;
      my = (my >> d) | {26'd0, st};
    end
    e = int'(ex);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 0) return FP32_ZERO;
      lz = 0;
      for (int i = 0; i < 27; i++) if (sum[i]) lz = 26 - i;
      sum = sum << lz;
      e   = e - lz;
    end
    return fp32_pack(x[31], e, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

endpackage

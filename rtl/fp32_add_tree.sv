// fp32_add_tree: sums N single-precision values with a balanced tree of
// pipelined adders: level 0 adds neighbours (x0+x1, x2+x3, ...), each later
// level adds neighbouring results, so the sum appears log2(N)*LAT cycles
// after in_valid. N must be a power of two. No stall; one sum per cycle.
// The summation order is fixed by the tree, which any bit-exact reference
// must follow.
module fp32_add_tree
  import fp32_pkg::*;
#(
  parameter int N   = 4,
  parameter int LAT = 4,
  localparam int LEVELS = (N > 1) ? $clog2(N) : 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t x [N],
  output logic  out_valid,
  output fp32_t sum
);
  // node[l] holds the N >> l values of level l (node[0] = inputs)
  fp32_t node  [LEVELS+1][N];
  logic  vld   [LEVELS+1];

  assign vld[0] = in_valid;
  for (genvar i = 0; i < N; i++) begin : g_in
    assign node[0][i] = x[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < (N >> (l + 1)); i++) begin : g_add
      logic v;
      fp32_add #(.LAT(LAT)) u_add (
        .clk, .rst_n,
        .in_valid (vld[l]),
        .a        (node[l][2*i]),
        .b        (node[l][2*i+1]),
        .out_valid(v),
        .y        (node[l+1][i])
      );
      if (i == 0) begin : g_v
        assign vld[l+1] = v;
      end
    end
    for (genvar i = (N >> (l + 1)); i < N; i++) begin : g_unused
      assign node[l+1][i] = FP32_ZERO;
    end
  end

  assign out_valid = vld[LEVELS];
  assign sum       = node[LEVELS][0];

  initial assert (N >= 1 && (N & (N - 1)) == 0)
    else $error("fp32_add_tree: N must be a power of two");
endmodule

// gemm_dot_lane: one vector lane of the tiled GEMM kernel, i.e. the work of
// one work-item on one pair of tiles: sum_out = sum_in + a[0]*b[0] + ... +
// a[NB-1]*b[NB-1], with the NB products formed in parallel (the unrolled
// inner loop) and added to the running sum strictly in order k = 0..NB-1,
// as the sequential "sum += A[k] * B[k]" of the kernel source prescribes.
// The in-order chain is NB pipelined adders long; product k is delayed by
// k*ADD_LAT cycles to meet the partial sum at adder k. Latency is
// MUL_LAT + NB*ADD_LAT cycles; a new operand set may enter every cycle;
// the tag travels with the data.
module gemm_dot_lane
  import fp32_pkg::*;
#(
  parameter int NB      = 8,
  parameter int MUL_LAT = 4,
  parameter int ADD_LAT = 4,
  parameter int TAGW    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  fp32_t           sum_in,
  input  fp32_t           a [NB],
  input  fp32_t           b [NB],
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output fp32_t           sum_out
);
  fp32_t prod [NB];
  logic  prod_v [NB];
  fp32_t chain [NB+1];
  logic  chain_v [NB+1];

  for (genvar k = 0; k < NB; k++) begin : g_mul
    fp32_mul #(.LAT(MUL_LAT)) u_mul (
      .clk, .rst_n, .in_valid(in_valid), .a(a[k]), .b(b[k]),
      .out_valid(prod_v[k]), .y(prod[k])
    );
  end

  // running sum enters the chain together with the products
  pipe_delay #(.W(32), .LAT(MUL_LAT)) u_sum0 (
    .clk, .rst_n, .d(sum_in), .q(chain[0])
  );
  assign chain_v[0] = prod_v[0];

  for (genvar k = 0; k < NB; k++) begin : g_chain
    fp32_t pk;
    pipe_delay #(.W(32), .LAT(k * ADD_LAT)) u_pd (
      .clk, .rst_n, .d(prod[k]), .q(pk)
    );
    fp32_add #(.LAT(ADD_LAT)) u_add (
      .clk, .rst_n, .in_valid(chain_v[k]), .a(chain[k]), .b(pk),
      .out_valid(chain_v[k+1]), .y(chain[k+1])
    );
  end

  pipe_delay #(.W(TAGW), .LAT(MUL_LAT + NB * ADD_LAT)) u_tag (
    .clk, .rst_n, .d(in_tag), .q(out_tag)
  );
  assign out_valid = chain_v[NB];
  assign sum_out   = chain[NB];
endmodule

// fp32_mul: pipelined single-precision multiplier.
// The result of the operands presented with in_valid appears LAT cycles
// later with out_valid (LAT >= 1). A new operation may start every cycle and
// there is no stall. The arithmetic is fp32_pkg::fp32_mul_f (round to
// nearest even, subnormals flushed to zero). The kernels treat the
// floating-point latency as a design parameter L; the value 4 is the one
// that matches the initiation interval the SPMV kernel is run at.
module fp32_mul
  import fp32_pkg::*;
#(
  parameter int LAT = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  logic [32:0] q;
  pipe_delay #(.W(33), .LAT(LAT)) u_pipe (
    .clk(clk), .rst_n(rst_n),
    .d({in_valid, fp32_mul_f(a, b)}),
    .q(q)
  );
  assign out_valid = q[32];
  assign y         = q[31:0];

  initial assert (LAT >= 1) else $error("fp32_mul: LAT must be at least 1");
endmodule

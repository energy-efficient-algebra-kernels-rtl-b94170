// spmv_stream_kernel: the streaming dataflow SPMV kernel for the HBM
// accelerator card. It holds NCU copies of the dataflow region (spmv_cu),
// each with its own five global-memory ports (one HBM channel each in the
// intended use) and its own copy of x, so NCU blocks of rows are processed
// at the same time. The host divides the matrix beforehand: compute unit u
// gets rows [r_u, r_u + cfg[u].nrows) and the nonzeros of those rows.
// start is shared; done is high when every unit is idle.
// NCU = 4 and II = L = 4 are the configuration the kernel was evaluated in.
module spmv_stream_kernel
  import spmv_pkg::*;
#(
  parameter int NCU        = 4,
  parameter int L          = 4,
  parameter int MUL_LAT    = 4,
  parameter int ADD_LAT    = 4,
  parameter int ROW_DEPTH  = 10000,
  parameter int X_DEPTH    = 40000,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  spmv_cfg_t [NCU-1:0]               cfg,
  output logic                              done,
  output logic [NCU-1:0][NPORTS-1:0]        rd_req_valid,
  input  logic [NCU-1:0][NPORTS-1:0]        rd_req_ready,
  output logic [NCU-1:0][NPORTS-1:0][31:0]  rd_req_addr,
  input  logic [NCU-1:0][NPORTS-1:0]        rd_resp_valid,
  input  logic [NCU-1:0][NPORTS-1:0][31:0]  rd_resp_data,
  output logic [NCU-1:0]                    wr_valid,
  input  logic [NCU-1:0]                    wr_ready,
  output logic [NCU-1:0][31:0]              wr_addr,
  output logic [NCU-1:0][31:0]              wr_data
);
  logic [NCU-1:0] cu_done;
  assign done = &cu_done;

  for (genvar u = 0; u < NCU; u++) begin : g_cu
    spmv_cu #(
      .L(L), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT),
      .ROW_DEPTH(ROW_DEPTH), .X_DEPTH(X_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_cu (
      .clk, .rst_n,
      .start        (start),
      .cfg          (cfg[u]),
      .done         (cu_done[u]),
      .rd_req_valid (rd_req_valid[u]),
      .rd_req_ready (rd_req_ready[u]),
      .rd_req_addr  (rd_req_addr[u]),
      .rd_resp_valid(rd_resp_valid[u]),
      .rd_resp_data (rd_resp_data[u]),
      .wr_valid     (wr_valid[u]),
      .wr_ready     (wr_ready[u]),
      .wr_addr      (wr_addr[u]),
      .wr_data      (wr_data[u])
    );
  end
endmodule

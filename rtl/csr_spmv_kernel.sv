// csr_spmv_kernel: the row-per-work-item CSR SPMV kernel for the embedded
// FPGA: y = A * x with A in CSR form (row_ptr, col_idx, val). It replicates
// the compute unit NCU times (compute-unit replication); work-group g, made
// of rows [g*BS, g*BS + BS), goes to unit g mod NCU. Inside a unit VC vector
// lanes work on VC rows at once (see csr_spmv_cu).
// Ports: every unit has a row-pointer read port (UF words wide) and a y
// write port, flattened as [unit] arrays, and every lane has its own column,
// value and x read ports, flattened as [unit*VC + lane]. start is shared;
// done is high when every unit is idle.
// Default configuration BS = 16, NCU = 2, UF = 2, VC = 1: the kernel that
// performed best on the smallest matrices evaluated. The other evaluated
// combinations (BS 2..64, 1 or 2 units, UF 2..8, VC 1..8) are reached
// through the parameters.
module csr_spmv_kernel
  import fp32_pkg::*;
#(
  parameter int BS      = 16,
  parameter int NCU     = 2,
  parameter int UF      = 2,
  parameter int VC      = 1,
  parameter int MUL_LAT = 4,
  parameter int ADD_LAT = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [31:0]                nrows,
  input  logic [31:0]                base_rp,
  input  logic [31:0]                base_col,
  input  logic [31:0]                base_val,
  input  logic [31:0]                base_x,
  input  logic [31:0]                base_y,
  output logic                       done,
  output logic [NCU-1:0]             rp_req_valid,
  input  logic [NCU-1:0]             rp_req_ready,
  output logic [NCU-1:0][31:0]       rp_req_addr,
  input  logic [NCU-1:0]             rp_resp_valid,
  input  logic [NCU-1:0][UF*32-1:0]  rp_resp_data,
  output logic [NCU*VC-1:0]          col_req_valid,
  input  logic [NCU*VC-1:0]          col_req_ready,
  output logic [NCU*VC-1:0][31:0]    col_req_addr,
  input  logic [NCU*VC-1:0]          col_resp_valid,
  input  logic [NCU*VC-1:0][31:0]    col_resp_data,
  output logic [NCU*VC-1:0]          val_req_valid,
  input  logic [NCU*VC-1:0]          val_req_ready,
  output logic [NCU*VC-1:0][31:0]    val_req_addr,
  input  logic [NCU*VC-1:0]          val_resp_valid,
  input  logic [NCU*VC-1:0][31:0]    val_resp_data,
  output logic [NCU*VC-1:0]          x_req_valid,
  input  logic [NCU*VC-1:0]          x_req_ready,
  output logic [NCU*VC-1:0][31:0]    x_req_addr,
  input  logic [NCU*VC-1:0]          x_resp_valid,
  input  logic [NCU*VC-1:0][31:0]    x_resp_data,
  output logic [NCU-1:0]             y_wr_valid,
  input  logic [NCU-1:0]             y_wr_ready,
  output logic [NCU-1:0][31:0]       y_wr_addr,
  output logic [NCU-1:0][31:0]       y_wr_data
);
  logic [NCU-1:0] cu_done;
  assign done = &cu_done;

  for (genvar u = 0; u < NCU; u++) begin : g_cu
    csr_spmv_cu #(
      .BS(BS), .UF(UF), .VC(VC), .NCU(NCU), .CU_ID(u), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)
    ) u_cu (
      .clk, .rst_n, .start, .nrows, .base_rp, .base_col, .base_val, .base_x, .base_y,
      .done          (cu_done[u]),
      .rp_req_valid  (rp_req_valid[u]),  .rp_req_ready (rp_req_ready[u]),
      .rp_req_addr   (rp_req_addr[u]),   .rp_resp_valid(rp_resp_valid[u]),
      .rp_resp_data  (rp_resp_data[u]),
      .col_req_valid (col_req_valid[u*VC +: VC]), .col_req_ready (col_req_ready[u*VC +: VC]),
      .col_req_addr  (col_req_addr[u*VC +: VC]),  .col_resp_valid(col_resp_valid[u*VC +: VC]),
      .col_resp_data (col_resp_data[u*VC +: VC]),
      .val_req_valid (val_req_valid[u*VC +: VC]), .val_req_ready (val_req_ready[u*VC +: VC]),
      .val_req_addr  (val_req_addr[u*VC +: VC]),  .val_resp_valid(val_resp_valid[u*VC +: VC]),
      .val_resp_data (val_resp_data[u*VC +: VC]),
      .x_req_valid   (x_req_valid[u*VC +: VC]),   .x_req_ready   (x_req_ready[u*VC +: VC]),
      .x_req_addr    (x_req_addr[u*VC +: VC]),    .x_resp_valid  (x_resp_valid[u*VC +: VC]),
      .x_resp_data   (x_resp_data[u*VC +: VC]),
      .y_wr_valid    (y_wr_valid[u]),    .y_wr_ready    (y_wr_ready[u]),
      .y_wr_addr     (y_wr_addr[u]),     .y_wr_data     (y_wr_data[u])
    );
  end
endmodule

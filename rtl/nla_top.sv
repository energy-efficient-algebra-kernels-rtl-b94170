// nla_top: the two linear-algebra kernel families side by side.
//  - hbm_*  : the streaming dataflow SPMV kernel of the HBM accelerator card
//             (spmv_stream_kernel, 4 compute units, II = 4).
//  - gemm_* : the tiled GEMM kernel of the embedded FPGA (gemm_tile_unit,
//             8 x 8 tiles, 4-wide vectorisation).
//  - csr_*  : the row-per-work-item CSR SPMV kernel of the embedded FPGA
//             (csr_spmv_kernel, work-groups of 16 rows, 2 compute units,
//             row-pointer copy unrolled by 2, VC = 1 vector lane per unit;
//             the column, value and x ports are per lane, [unit*VC + lane]).
// The kernels target different devices and share nothing but the clock and
// reset here; each keeps its own start/done and its own global-memory
// ports, which are brought out unchanged (see the kernels for the port
// protocols). Host processors and external memories (HBM, DDR3) are outside.
module nla_top
  import fp32_pkg::*;
  import spmv_pkg::*;
#(
  parameter int HBM_NCU       = 4,
  parameter int HBM_L         = 4,
  parameter int HBM_ROW_DEPTH = 10000,
  parameter int HBM_X_DEPTH   = 40000,
  parameter int GEMM_NB       = 8,
  parameter int GEMM_SIMD     = 4,
  parameter int CSR_BS        = 16,
  parameter int CSR_NCU       = 2,
  parameter int CSR_UF        = 2,
  parameter int CSR_VC        = 1,
  parameter int FP_LAT        = 4
) (
  input  logic clk,
  input  logic rst_n,

  // ---- streaming SPMV (HBM card) ----
  input  logic                                       hbm_start,
  input  spmv_cfg_t [HBM_NCU-1:0]                    hbm_cfg,
  output logic                                       hbm_done,
  output logic [HBM_NCU-1:0][NPORTS-1:0]             hbm_rd_req_valid,
  input  logic [HBM_NCU-1:0][NPORTS-1:0]             hbm_rd_req_ready,
  output logic [HBM_NCU-1:0][NPORTS-1:0][31:0]       hbm_rd_req_addr,
  input  logic [HBM_NCU-1:0][NPORTS-1:0]             hbm_rd_resp_valid,
  input  logic [HBM_NCU-1:0][NPORTS-1:0][31:0]       hbm_rd_resp_data,
  output logic [HBM_NCU-1:0]                         hbm_wr_valid,
  input  logic [HBM_NCU-1:0]                         hbm_wr_ready,
  output logic [HBM_NCU-1:0][31:0]                   hbm_wr_addr,
  output logic [HBM_NCU-1:0][31:0]                   hbm_wr_data,

  // ---- tiled GEMM (embedded) ----
  input  logic                    gemm_start,
  input  logic [31:0]             gemm_m,
  input  logic [31:0]             gemm_n,
  input  logic [31:0]             gemm_k,
  input  logic [31:0]             gemm_base_a,
  input  logic [31:0]             gemm_base_b,
  input  logic [31:0]             gemm_base_c,
  output logic                    gemm_done,
  output logic                    gemm_a_req_valid,
  input  logic                    gemm_a_req_ready,
  output logic [31:0]             gemm_a_req_addr,
  input  logic                    gemm_a_resp_valid,
  input  logic [GEMM_SIMD*32-1:0] gemm_a_resp_data,
  output logic                    gemm_b_req_valid,
  input  logic                    gemm_b_req_ready,
  output logic [31:0]             gemm_b_req_addr,
  input  logic                    gemm_b_resp_valid,
  input  logic [GEMM_SIMD*32-1:0] gemm_b_resp_data,
  output logic                    gemm_c_wr_valid,
  input  logic                    gemm_c_wr_ready,
  output logic [31:0]             gemm_c_wr_addr,
  output logic [GEMM_SIMD*32-1:0] gemm_c_wr_data,

  // ---- CSR SPMV (embedded) ----
  input  logic                             csr_start,
  input  logic [31:0]                      csr_nrows,
  input  logic [31:0]                      csr_base_rp,
  input  logic [31:0]                      csr_base_col,
  input  logic [31:0]                      csr_base_val,
  input  logic [31:0]                      csr_base_x,
  input  logic [31:0]                      csr_base_y,
  output logic                             csr_done,
  output logic [CSR_NCU-1:0]               csr_rp_req_valid,
  input  logic [CSR_NCU-1:0]               csr_rp_req_ready,
  output logic [CSR_NCU-1:0][31:0]         csr_rp_req_addr,
  input  logic [CSR_NCU-1:0]               csr_rp_resp_valid,
  input  logic [CSR_NCU-1:0][CSR_UF*32-1:0] csr_rp_resp_data,
  output logic [CSR_NCU*CSR_VC-1:0]       csr_col_req_valid,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_col_req_ready,
  output logic [CSR_NCU*CSR_VC-1:0][31:0] csr_col_req_addr,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_col_resp_valid,
  input  logic [CSR_NCU*CSR_VC-1:0][31:0] csr_col_resp_data,
  output logic [CSR_NCU*CSR_VC-1:0]       csr_val_req_valid,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_val_req_ready,
  output logic [CSR_NCU*CSR_VC-1:0][31:0] csr_val_req_addr,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_val_resp_valid,
  input  logic [CSR_NCU*CSR_VC-1:0][31:0] csr_val_resp_data,
  output logic [CSR_NCU*CSR_VC-1:0]       csr_x_req_valid,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_x_req_ready,
  output logic [CSR_NCU*CSR_VC-1:0][31:0] csr_x_req_addr,
  input  logic [CSR_NCU*CSR_VC-1:0]       csr_x_resp_valid,
  input  logic [CSR_NCU*CSR_VC-1:0][31:0] csr_x_resp_data,
  output logic [CSR_NCU-1:0]               csr_y_wr_valid,
  input  logic [CSR_NCU-1:0]               csr_y_wr_ready,
  output logic [CSR_NCU-1:0][31:0]         csr_y_wr_addr,
  output logic [CSR_NCU-1:0][31:0]         csr_y_wr_data
);
  spmv_stream_kernel #(
    .NCU(HBM_NCU), .L(HBM_L), .MUL_LAT(FP_LAT), .ADD_LAT(FP_LAT),
    .ROW_DEPTH(HBM_ROW_DEPTH), .X_DEPTH(HBM_X_DEPTH)
  ) u_hbm_spmv (
    .clk, .rst_n,
    .start        (hbm_start),
    .cfg          (hbm_cfg),
    .done         (hbm_done),
    .rd_req_valid (hbm_rd_req_valid),
    .rd_req_ready (hbm_rd_req_ready),
    .rd_req_addr  (hbm_rd_req_addr),
    .rd_resp_valid(hbm_rd_resp_valid),
    .rd_resp_data (hbm_rd_resp_data),
    .wr_valid     (hbm_wr_valid),
    .wr_ready     (hbm_wr_ready),
    .wr_addr      (hbm_wr_addr),
    .wr_data      (hbm_wr_data)
  );

  gemm_tile_unit #(
    .NB(GEMM_NB), .SIMD(GEMM_SIMD), .MUL_LAT(FP_LAT), .ADD_LAT(FP_LAT)
  ) u_gemm (
    .clk, .rst_n,
    .start(gemm_start), .m(gemm_m), .n(gemm_n), .k(gemm_k),
    .base_a(gemm_base_a), .base_b(gemm_base_b), .base_c(gemm_base_c),
    .done(gemm_done),
    .a_req_valid(gemm_a_req_valid), .a_req_ready(gemm_a_req_ready),
    .a_req_addr(gemm_a_req_addr), .a_resp_valid(gemm_a_resp_valid),
    .a_resp_data(gemm_a_resp_data),
    .b_req_valid(gemm_b_req_valid), .b_req_ready(gemm_b_req_ready),
    .b_req_addr(gemm_b_req_addr), .b_resp_valid(gemm_b_resp_valid),
    .b_resp_data(gemm_b_resp_data),
    .c_wr_valid(gemm_c_wr_valid), .c_wr_ready(gemm_c_wr_ready),
    .c_wr_addr(gemm_c_wr_addr), .c_wr_data(gemm_c_wr_data)
  );

  csr_spmv_kernel #(
    .BS(CSR_BS), .NCU(CSR_NCU), .UF(CSR_UF), .VC(CSR_VC), .MUL_LAT(FP_LAT), .ADD_LAT(FP_LAT)
  ) u_csr_spmv (
    .clk, .rst_n,
    .start(csr_start), .nrows(csr_nrows),
    .base_rp(csr_base_rp), .base_col(csr_base_col), .base_val(csr_base_val),
    .base_x(csr_base_x), .base_y(csr_base_y),
    .done(csr_done),
    .rp_req_valid(csr_rp_req_valid), .rp_req_ready(csr_rp_req_ready),
    .rp_req_addr(csr_rp_req_addr), .rp_resp_valid(csr_rp_resp_valid),
    .rp_resp_data(csr_rp_resp_data),
    .col_req_valid(csr_col_req_valid), .col_req_ready(csr_col_req_ready),
    .col_req_addr(csr_col_req_addr), .col_resp_valid(csr_col_resp_valid),
    .col_resp_data(csr_col_resp_data),
    .val_req_valid(csr_val_req_valid), .val_req_ready(csr_val_req_ready),
    .val_req_addr(csr_val_req_addr), .val_resp_valid(csr_val_resp_valid),
    .val_resp_data(csr_val_resp_data),
    .x_req_valid(csr_x_req_valid), .x_req_ready(csr_x_req_ready),
    .x_req_addr(csr_x_req_addr), .x_resp_valid(csr_x_resp_valid),
    .x_resp_data(csr_x_resp_data),
    .y_wr_valid(csr_y_wr_valid), .y_wr_ready(csr_y_wr_ready),
    .y_wr_addr(csr_y_wr_addr), .y_wr_data(csr_y_wr_data)
  );
endmodule

// tb_nla_top: end-to-end test of the whole design at its default
// parameters (4-unit streaming SPMV, 8x8 / 4-wide tiled GEMM, 16-row /
// 2-unit CSR SPMV), all three kernels running at the same time, each on its
// own behavioural memories.
//  - GEMM: the smallest evaluated product, A(64x32) * B(32x32).
//  - streaming SPMV: a random 240-row matrix split in four row blocks, with
//    empty rows, short rows and rows longer than several iterations.
//  - CSR SPMV: a random 150-row matrix (ten work-groups over two units).
// Every result is compared with an independent double-precision reference
// rounded to binary32 in each kernel's summation order. The testbench also
// counts how often each mechanism of the design occurred and fails if one
// never did: zero padding of a partial iteration, an empty row, a stream
// running dry, a row held back by a full result FIFO, accumulator
// forwarding, the stage-1 to stage-2 switch, accumulation across K tiles,
// a tile barrier wait, work-groups on both CSR units and CSR add forwarding.
module tb_nla_top;
  import fp32_pkg::*;
  import fp_ref_pkg::*;
  import spmv_pkg::*;

  localparam int HN = 4, CN = 2, UF = 2, SIMD = 4, L = 4;
  localparam int HD = 16384, GD = 16384, CD = 16384;
  localparam int RB = 0, XB = 1024, CB = 2048, VB = 8192, YB = 14336;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic hbm_start, hbm_done;
  spmv_cfg_t [HN-1:0] hbm_cfg;
  logic [HN-1:0][NPORTS-1:0]       hbm_rd_req_valid, hbm_rd_req_ready, hbm_rd_resp_valid;
  logic [HN-1:0][NPORTS-1:0][31:0] hbm_rd_req_addr, hbm_rd_resp_data;
  logic [HN-1:0]       hbm_wr_valid, hbm_wr_ready;
  logic [HN-1:0][31:0] hbm_wr_addr, hbm_wr_data;

  logic gemm_start, gemm_done;
  logic [31:0] gemm_m, gemm_n, gemm_k, gemm_base_a, gemm_base_b, gemm_base_c;
  logic gemm_a_req_valid, gemm_a_req_ready, gemm_a_resp_valid;
  logic gemm_b_req_valid, gemm_b_req_ready, gemm_b_resp_valid;
  logic gemm_c_wr_valid, gemm_c_wr_ready;
  logic [31:0] gemm_a_req_addr, gemm_b_req_addr, gemm_c_wr_addr;
  logic [SIMD*32-1:0] gemm_a_resp_data, gemm_b_resp_data, gemm_c_wr_data;

  logic csr_start, csr_done;
  logic [31:0] csr_nrows, csr_base_rp, csr_base_col, csr_base_val, csr_base_x, csr_base_y;
  logic [CN-1:0] csr_rp_req_valid, csr_rp_req_ready, csr_rp_resp_valid;
  logic [CN-1:0][31:0] csr_rp_req_addr;
  logic [CN-1:0][UF*32-1:0] csr_rp_resp_data;
  logic [CN-1:0] csr_col_req_valid, csr_col_req_ready, csr_col_resp_valid;
  logic [CN-1:0][31:0] csr_col_req_addr, csr_col_resp_data;
  logic [CN-1:0] csr_val_req_valid, csr_val_req_ready, csr_val_resp_valid;
  logic [CN-1:0][31:0] csr_val_req_addr, csr_val_resp_data;
  logic [CN-1:0] csr_x_req_valid, csr_x_req_ready, csr_x_resp_valid;
  logic [CN-1:0][31:0] csr_x_req_addr, csr_x_resp_data;
  logic [CN-1:0] csr_y_wr_valid, csr_y_wr_ready;
  logic [CN-1:0][31:0] csr_y_wr_addr, csr_y_wr_data;

  nla_top dut (.*);

  // ---------------- memories ----------------
  logic hold_y = 1'b0;
  for (genvar u = 0; u < HN; u++) begin : g_hmem
    logic [0:0] wrdy;
    logic       hold;
    // unit 3's result port is held off for a while after start so that
    // its result FIFO fills up
    assign hold = (u == 3) && hold_y;
    // units 0 and 1 see a memory that stalls, units 2 and 3 a fast one
    gmem_model #(.NRD(NPORTS), .NWR(1), .DEPTH(HD), .LAT(u < 2 ? 8 : 2), .STALL(u < 2)) m (
      .clk, .rd_req_valid(hbm_rd_req_valid[u]), .rd_req_ready(hbm_rd_req_ready[u]),
      .rd_req_addr(hbm_rd_req_addr[u]), .rd_resp_valid(hbm_rd_resp_valid[u]),
      .rd_resp_data(hbm_rd_resp_data[u]), .wr_valid(hbm_wr_valid[u] && !hold), .wr_ready(wrdy),
      .wr_addr(hbm_wr_addr[u]), .wr_data(hbm_wr_data[u]));
    assign hbm_wr_ready[u] = wrdy[0] && !hold;
  end

  logic [1:0] g_rrdy, g_rv;
  logic [1:0][SIMD*32-1:0] g_rd;
  logic [0:0] g_wrdy;
  gmem_model #(.NRD(2), .NWR(1), .WPB(SIMD), .DEPTH(GD), .LAT(6), .STALL(1)) gmem (
    .clk, .rd_req_valid({gemm_b_req_valid, gemm_a_req_valid}), .rd_req_ready(g_rrdy),
    .rd_req_addr({gemm_b_req_addr, gemm_a_req_addr}), .rd_resp_valid(g_rv), .rd_resp_data(g_rd),
    .wr_valid(gemm_c_wr_valid), .wr_ready(g_wrdy), .wr_addr(gemm_c_wr_addr), .wr_data(gemm_c_wr_data));
  assign {gemm_b_req_ready, gemm_a_req_ready}   = g_rrdy;
  assign {gemm_b_resp_valid, gemm_a_resp_valid} = g_rv;
  assign gemm_a_resp_data = g_rd[0];
  assign gemm_b_resp_data = g_rd[1];
  assign gemm_c_wr_ready  = g_wrdy[0];

  logic [CN-1:0] nowr = '0, nowr_rdy;
  logic [CN-1:0][31:0] nowa = '0;
  logic [CN-1:0][UF*32-1:0] nowd = '0;
  gmem_model #(.NRD(CN), .NWR(CN), .WPB(UF), .DEPTH(CD), .LAT(5), .STALL(0)) crp (
    .clk, .rd_req_valid(csr_rp_req_valid), .rd_req_ready(csr_rp_req_ready),
    .rd_req_addr(csr_rp_req_addr), .rd_resp_valid(csr_rp_resp_valid),
    .rd_resp_data(csr_rp_resp_data), .wr_valid(nowr), .wr_ready(nowr_rdy), .wr_addr(nowa), .wr_data(nowd));
  gmem_model #(.NRD(3*CN), .NWR(CN), .WPB(1), .DEPTH(CD), .LAT(5), .STALL(1)) cmem (
    .clk, .rd_req_valid({csr_x_req_valid, csr_val_req_valid, csr_col_req_valid}),
    .rd_req_ready({csr_x_req_ready, csr_val_req_ready, csr_col_req_ready}),
    .rd_req_addr({csr_x_req_addr, csr_val_req_addr, csr_col_req_addr}),
    .rd_resp_valid({csr_x_resp_valid, csr_val_resp_valid, csr_col_resp_valid}),
    .rd_resp_data({csr_x_resp_data, csr_val_resp_data, csr_col_resp_data}),
    .wr_valid(csr_y_wr_valid), .wr_ready(csr_y_wr_ready), .wr_addr(csr_y_wr_addr), .wr_data(csr_y_wr_data));

  // ---------------- mechanism counters ----------------
  int n_pad = 0, n_empty = 0, n_dry = 0, n_full = 0, n_fwd = 0, n_stage = 0;
  int n_ktile = 0, n_barrier = 0, n_csr_fwd = 0;
  int n_wg [CN] = '{0, 0};

  for (genvar u = 0; u < HN; u++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      // spmv_core states: 1 = row set-up, 2 = length, 3 = gather
      if (dut.u_hbm_spmv.g_cu[u].u_cu.u_core.take && !dut.u_hbm_spmv.g_cu[u].u_cu.u_core.need) n_pad++;
      if (32'(dut.u_hbm_spmv.g_cu[u].u_cu.u_core.state) == 2 && dut.u_hbm_spmv.g_cu[u].u_cu.u_core.len_rdata == 0) n_empty++;
      if (32'(dut.u_hbm_spmv.g_cu[u].u_cu.u_core.state) == 3 && !dut.u_hbm_spmv.g_cu[u].u_cu.u_core.take) n_dry++;
      if (32'(dut.u_hbm_spmv.g_cu[u].u_cu.u_core.state) == 1 &&
          32'(dut.u_hbm_spmv.g_cu[u].u_cu.u_core.inflight) + 32'(dut.u_hbm_spmv.g_cu[u].u_cu.u_core.out_count) >= 8) n_full++;
      if (dut.u_hbm_spmv.g_cu[u].u_cu.u_core.tree_v && dut.u_hbm_spmv.g_cu[u].u_cu.u_core.acc_v &&
          !dut.u_hbm_spmv.g_cu[u].u_cu.u_core.tree_flags[1]) n_fwd++;
      if (dut.u_hbm_spmv.g_cu[u].u_cu.start2) n_stage++;
    end
  end
  for (genvar u = 0; u < CN; u++) begin : g_ccnt
    always @(posedge clk) if (rst_n) begin
      // csr_spmv_cu state 1 = next work-group
      if (32'(dut.u_csr_spmv.g_cu[u].u_cu.state) == 1 &&
          dut.u_csr_spmv.g_cu[u].u_cu.grp * 16 < csr_nrows) n_wg[u]++;
      if (dut.u_csr_spmv.g_cu[u].u_cu.g_lane[0].u_lane.add_go && dut.u_csr_spmv.g_cu[u].u_cu.g_lane[0].u_lane.add_v) n_csr_fwd++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    // gemm_tile_unit states: 1 = load, 2 = compute
    if (32'(dut.u_gemm.state) == 2 && dut.u_gemm.grp == 0 && dut.u_gemm.kb != 0) n_ktile++;
    if (32'(dut.u_gemm.state) == 1 && dut.u_gemm.a_iss == 16 && dut.u_gemm.a_rcv != 16) n_barrier++;
  end

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: %08h expected %08h", what, got, exp);
    end
  endtask

  // ---------------- GEMM ----------------
  localparam int GM = 64, GK = 32, GNN = 32, GA = 0, GB = 4096, GC = 8192;
  fp32_t ga [GM*GK], gb [GK*GNN];

  // ---------------- streaming SPMV ----------------
  localparam int HNROWS = 240;
  fp32_t hx [HNROWS], hy [HNROWS];
  int    h_r0 [HN];

  // ---------------- CSR SPMV ----------------
  localparam int CNROWS = 150, CRP = 0, CCB = 1024, CVB = 4096, CXB = 8192, CYB = 12288;
  fp32_t cy [CNROWS];

  initial begin
    hbm_start = 0; gemm_start = 0; csr_start = 0; hbm_cfg = '0;
    gemm_m = 0; gemm_n = 0; gemm_k = 0; gemm_base_a = 0; gemm_base_b = 0; gemm_base_c = 0;
    csr_nrows = 0; csr_base_rp = CRP; csr_base_col = CCB; csr_base_val = CVB;
    csr_base_x = CXB; csr_base_y = CYB;

    // GEMM data
    for (int i = 0; i < GM * GK; i++) begin ga[i] = rand_fp(8); gmem.mem[GA + i] = ga[i]; end
    for (int i = 0; i < GK * GNN; i++) begin gb[i] = rand_fp(8); gmem.mem[GB + i] = gb[i]; end

    // streaming SPMV data: unit u gets rows [h_r0[u], h_r0[u] + 60)
    for (int c = 0; c < HNROWS; c++) hx[c] = rand_fp(5);
    for (int u = 0; u < HN; u++) begin
      int nz, nr;
      nz = 0; nr = HNROWS / HN;
      h_r0[u] = u * nr;
      for (int r = 0; r < nr; r++) begin
        fp32_t v [$], xs [$];
        int len, c;
        len = (r % 9 == 4) ? 0 : (r % 13 == 0) ? 37 : $urandom_range(10, 1);
        v = {}; xs = {};
        for (int q = 0; q < len; q++) begin
          c = $urandom_range(HNROWS - 1, 0);
          v.push_back(rand_fp(5)); xs.push_back(hx[c]);
          case (u)
            0: begin g_hmem[0].m.mem[CB + nz] = c; g_hmem[0].m.mem[VB + nz] = v[q]; end
            1: begin g_hmem[1].m.mem[CB + nz] = c; g_hmem[1].m.mem[VB + nz] = v[q]; end
            2: begin g_hmem[2].m.mem[CB + nz] = c; g_hmem[2].m.mem[VB + nz] = v[q]; end
            default: begin g_hmem[3].m.mem[CB + nz] = c; g_hmem[3].m.mem[VB + nz] = v[q]; end
          endcase
          nz++;
        end
        case (u)
          0: g_hmem[0].m.mem[RB + r] = len;
          1: g_hmem[1].m.mem[RB + r] = len;
          2: g_hmem[2].m.mem[RB + r] = len;
          default: g_hmem[3].m.mem[RB + r] = len;
        endcase
        hy[h_r0[u] + r] = ref_spmv_row(v, xs, L);
      end
      for (int c2 = 0; c2 < HNROWS; c2++)
        case (u)
          0: g_hmem[0].m.mem[XB + c2] = hx[c2];
          1: g_hmem[1].m.mem[XB + c2] = hx[c2];
          2: g_hmem[2].m.mem[XB + c2] = hx[c2];
          default: g_hmem[3].m.mem[XB + c2] = hx[c2];
        endcase
      hbm_cfg[u] = '{nrows: nr, ncols: HNROWS, nnz: nz, base_rows: RB, base_x: XB,
                     base_cols: CB, base_vals: VB, base_y: YB};
    end

    // CSR data
    begin
      fp32_t xv [CNROWS];
      int nz;
      nz = 0;
      for (int c = 0; c < CNROWS; c++) begin xv[c] = rand_fp(5); cmem.mem[CXB + c] = xv[c]; end
      for (int r = 0; r < CNROWS; r++) begin
        int len, c;
        fp32_t acc, v;
        crp.mem[CRP + r] = nz;
        len = (r % 7 == 5) ? 0 : $urandom_range(12, 1);
        acc = FP32_ZERO;
        for (int q = 0; q < len; q++) begin
          c = $urandom_range(CNROWS - 1, 0);
          v = rand_fp(5);
          cmem.mem[CCB + nz] = c;
          cmem.mem[CVB + nz] = v;
          acc = ref_add(acc, ref_mul(v, xv[c]));
          nz++;
        end
        cy[r] = acc;
      end
      crp.mem[CRP + CNROWS] = nz;
    end

    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    @(negedge clk);
    gemm_m = GM; gemm_n = GNN; gemm_k = GK;
    gemm_base_a = GA; gemm_base_b = GB; gemm_base_c = GC;
    csr_nrows = CNROWS;
    hbm_start = 1; gemm_start = 1; csr_start = 1;
    @(negedge clk);
    hbm_start = 0; gemm_start = 0; csr_start = 0;
    hold_y = 1'b1;
    repeat (2000) @(negedge clk);
    hold_y = 1'b0;
    while (!(hbm_done && gemm_done && csr_done)) @(negedge clk);

    // results
    for (int i = 0; i < GM; i++)
      for (int j = 0; j < GNN; j++) begin
        fp32_t acc;
        acc = FP32_ZERO;
        for (int x = 0; x < GK; x++) acc = ref_add(acc, ref_mul(ga[i * GK + x], gb[x * GNN + j]));
        check($sformatf("C[%0d][%0d]", i, j), gmem.mem[GC + i * GNN + j], acc);
      end
    for (int r = 0; r < HNROWS / HN; r++) begin
      check($sformatf("hbm y[%0d]", h_r0[0] + r), g_hmem[0].m.mem[YB + r], hy[h_r0[0] + r]);
      check($sformatf("hbm y[%0d]", h_r0[1] + r), g_hmem[1].m.mem[YB + r], hy[h_r0[1] + r]);
      check($sformatf("hbm y[%0d]", h_r0[2] + r), g_hmem[2].m.mem[YB + r], hy[h_r0[2] + r]);
      check($sformatf("hbm y[%0d]", h_r0[3] + r), g_hmem[3].m.mem[YB + r], hy[h_r0[3] + r]);
    end
    for (int r = 0; r < CNROWS; r++)
      check($sformatf("csr y[%0d]", r), cmem.mem[CYB + r], cy[r]);

    $display("mechanisms: pad=%0d empty_row=%0d stream_dry=%0d result_fifo_full=%0d acc_forward=%0d stage_switch=%0d",
             n_pad, n_empty, n_dry, n_full, n_fwd, n_stage);
    $display("            gemm_k_tiles=%0d gemm_barrier_wait=%0d csr_wg_unit0=%0d csr_wg_unit1=%0d csr_add_forward=%0d",
             n_ktile, n_barrier, n_wg[0], n_wg[1], n_csr_fwd);
    begin
      int seen [11];
      seen = '{n_pad, n_empty, n_dry, n_full, n_fwd, n_stage, n_ktile, n_barrier,
                        n_wg[0], n_wg[1], n_csr_fwd};
      foreach (seen[i]) begin
        checks++;
        if (seen[i] == 0) begin
          failures++;
          $display("mechanism %0d never occurred", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

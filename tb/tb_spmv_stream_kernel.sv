// tb_spmv_stream_kernel: self-checking test of the multi-unit streaming
// SPMV kernel. A random CSR matrix is split by rows among the compute units
// as the host would do it; each unit gets its own behavioural memory (one
// HBM channel in the intended use) holding its row lengths, the whole x, its
// column indices and values. After done, every y in every unit's memory is
// compared with the reference in the kernel's summation order. Run once with
// fast memories and once with memories that withhold ready at random.
module tb_spmv_stream_kernel;
  import fp32_pkg::*;
  import fp_ref_pkg::*;
  import spmv_pkg::*;

  localparam int NCU = 2, L = 4, ROW_DEPTH = 64, X_DEPTH = 128, DEPTH = 4096;
  localparam int RB = 0, XB = 256, CB = 512, VB = 1536, YB = 3072;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  spmv_cfg_t [NCU-1:0] cfg;
  logic [NCU-1:0][NPORTS-1:0]       rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [NCU-1:0][NPORTS-1:0][31:0] rd_req_addr, rd_resp_data;
  logic [NCU-1:0]                   wr_valid, wr_ready;
  logic [NCU-1:0][31:0]             wr_addr, wr_data;

  spmv_stream_kernel #(.NCU(NCU), .L(L), .ROW_DEPTH(ROW_DEPTH), .X_DEPTH(X_DEPTH)) dut (.*);

  bit slow;
  for (genvar u = 0; u < NCU; u++) begin : g_mem
    logic [NPORTS-1:0]       f_rdy, s_rdy, f_rv, s_rv;
    logic [NPORTS-1:0][31:0] f_rd, s_rd;
    logic [0:0]              f_wr, s_wr;
    gmem_model #(.NRD(NPORTS), .NWR(1), .DEPTH(DEPTH), .LAT(4), .STALL(0)) fast (
      .clk, .rd_req_valid(rd_req_valid[u]), .rd_req_ready(f_rdy), .rd_req_addr(rd_req_addr[u]),
      .rd_resp_valid(f_rv), .rd_resp_data(f_rd),
      .wr_valid(wr_valid[u]), .wr_ready(f_wr), .wr_addr(wr_addr[u]), .wr_data(wr_data[u]));
    gmem_model #(.NRD(NPORTS), .NWR(1), .DEPTH(DEPTH), .LAT(7), .STALL(1)) slw (
      .clk, .rd_req_valid(rd_req_valid[u]), .rd_req_ready(s_rdy), .rd_req_addr(rd_req_addr[u]),
      .rd_resp_valid(s_rv), .rd_resp_data(s_rd),
      .wr_valid(wr_valid[u]), .wr_ready(s_wr), .wr_addr(wr_addr[u]), .wr_data(wr_data[u]));
    assign rd_req_ready[u]  = slow ? s_rdy : f_rdy;
    assign rd_resp_valid[u] = slow ? s_rv  : f_rv;
    assign rd_resp_data[u]  = slow ? s_rd  : f_rd;
    assign wr_ready[u]      = slow ? s_wr[0] : f_wr[0];
  end

  int checks = 0, failures = 0;
  logic [31:0] mem_img [NCU][DEPTH];

  task automatic put(input int u, input int a, input logic [31:0] d);
    mem_img[u][a] = d;
  endtask

  task automatic run_spmv(input int n, input int maxlen, input bit use_slow);
    fp32_t xv [];
    fp32_t yexp [];
    int    r0, nr, nz;
    xv   = new[n];
    yexp = new[n];
    slow = use_slow;
    for (int c = 0; c < n; c++) xv[c] = rand_fp(5);
    r0 = 0;
    for (int u = 0; u < NCU; u++) begin
      for (int a = 0; a < DEPTH; a++) mem_img[u][a] = 32'hdead_beef;
      nr = (u == NCU - 1) ? n - r0 : n / NCU;
      nz = 0;
      for (int c = 0; c < n; c++) put(u, XB + c, xv[c]);
      for (int r = 0; r < nr; r++) begin
        fp32_t v [$], xs [$];
        int len;
        len = (r % 7 == 3) ? 0 : $urandom_range(maxlen, 0);
        put(u, RB + r, len);
        v = {}; xs = {};
        for (int q = 0; q < len; q++) begin
          int c;
          c = $urandom_range(n - 1, 0);
          v.push_back(rand_fp(5));
          xs.push_back(xv[c]);
          put(u, CB + nz, c);
          put(u, VB + nz, v[q]);
          nz++;
        end
        yexp[r0 + r] = ref_spmv_row(v, xs, L);
      end
      cfg[u] = '{nrows: nr, ncols: n, nnz: nz, base_rows: RB, base_x: XB,
                 base_cols: CB, base_vals: VB, base_y: YB};
      r0 += nr;
    end
    for (int a = 0; a < DEPTH; a++) begin
      g_mem[0].fast.mem[a] = mem_img[0][a];
      g_mem[0].slw.mem[a]  = mem_img[0][a];
      g_mem[1].fast.mem[a] = mem_img[1][a];
      g_mem[1].slw.mem[a]  = mem_img[1][a];
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    r0 = 0;
    for (int u = 0; u < NCU; u++) begin
      for (int r = 0; r < int'(cfg[u].nrows); r++) begin
        logic [31:0] got;
        got = (u == 0) ? (slow ? g_mem[0].slw.mem[YB + r] : g_mem[0].fast.mem[YB + r])
                       : (slow ? g_mem[1].slw.mem[YB + r] : g_mem[1].fast.mem[YB + r]);
        checks++;
        if (got !== yexp[r0 + r]) begin
          failures++;
          if (failures < 10) $display("unit %0d row %0d: %08h expected %08h", u, r, got, yexp[r0 + r]);
        end
      end
      r0 += int'(cfg[u].nrows);
    end
  endtask

  initial begin
    start = 0; slow = 0; cfg = '0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_spmv(100, 12, 0);
    run_spmv(90, 20, 1);
    run_spmv(33, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spmv_workload: the streaming SPMV kernel at its default configuration
// (4 compute units, II = L = 4, 10 000-row and 40 000-word local memories)
// on matrices with the dimensions of three of the evaluated sparse test
// problems: n = 25503 / nnz = 14765, n = 20000 / nnz = 30000 and
// n = 20082 / nnz = 281150. Only the sizes are taken from those problems;
// the sparsity pattern is synthetic: nnz is spread as evenly as possible
// over the rows (so the sparsest matrix is mostly rows of 0 or 1 element)
// with random column indices and random values.
// As the host would, the testbench gives unit u the u-th quarter of the rows
// and its nonzeros, plus the whole of x, in a memory of its own. Every y is
// compared with the reference in the kernel's summation order. For every
// unit the cycles its compute stage is busy are compared with the II = L
// rate: at least sum over rows of 2 + L*max(1, ceil(len/L)), and at most
// that plus a small allowance for the streams starting up.
module tb_spmv_workload;
  import fp32_pkg::*;
  import fp_ref_pkg::*;
  import spmv_pkg::*;

  localparam int NCU = 4, L = 4, DEPTH = 524288;
  localparam int RB = 0, XB = 16384, CB = 65536, VB = 262144, YB = 458752;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  spmv_cfg_t [NCU-1:0] cfg;
  logic [NCU-1:0][NPORTS-1:0]       rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [NCU-1:0][NPORTS-1:0][31:0] rd_req_addr, rd_resp_data;
  logic [NCU-1:0]                   wr_valid, wr_ready;
  logic [NCU-1:0][31:0]             wr_addr, wr_data;

  spmv_stream_kernel dut (.*);

  int busy [NCU];
  for (genvar u = 0; u < NCU; u++) begin : g_mem
    logic [0:0] wrdy;
    gmem_model #(.NRD(NPORTS), .NWR(1), .DEPTH(DEPTH), .LAT(4), .STALL(0)) m (
      .clk, .rd_req_valid(rd_req_valid[u]), .rd_req_ready(rd_req_ready[u]),
      .rd_req_addr(rd_req_addr[u]), .rd_resp_valid(rd_resp_valid[u]),
      .rd_resp_data(rd_resp_data[u]), .wr_valid(wr_valid[u]), .wr_ready(wrdy),
      .wr_addr(wr_addr[u]), .wr_data(wr_data[u]));
    assign wr_ready[u] = wrdy[0];
    // compute stage busy: any state but idle
    always @(posedge clk) if (rst_n && 32'(dut.g_cu[u].u_cu.u_core.state) != 0) busy[u]++;
  end

  task automatic put(input int u, input int a, input logic [31:0] d);
    case (u)
      0: g_mem[0].m.mem[a] = d;
      1: g_mem[1].m.mem[a] = d;
      2: g_mem[2].m.mem[a] = d;
      default: g_mem[3].m.mem[a] = d;
    endcase
  endtask

  function automatic logic [31:0] get(input int u, input int a);
    case (u)
      0: return g_mem[0].m.mem[a];
      1: return g_mem[1].m.mem[a];
      2: return g_mem[2].m.mem[a];
      default: return g_mem[3].m.mem[a];
    endcase
  endfunction

  int checks = 0, failures = 0;

  task automatic run_matrix(input string name, input int n, input int nnz);
    fp32_t xv [];
    fp32_t yexp [];
    int    r0, nr, nz, expect_cyc [NCU];
    longint t0;
    xv   = new[n];
    yexp = new[n];
    for (int c = 0; c < n; c++) xv[c] = rand_fp(5);
    r0 = 0;
    for (int u = 0; u < NCU; u++) begin
      nr = (u == NCU - 1) ? n - r0 : (n + NCU - 1) / NCU;
      nz = 0;
      expect_cyc[u] = 0;
      for (int c = 0; c < n; c++) put(u, XB + c, xv[c]);
      for (int r = 0; r < nr; r++) begin
        fp32_t v [$], xs [$];
        int len, gr;
        gr  = r0 + r;
        len = int'((longint'(gr + 1) * nnz) / n - (longint'(gr) * nnz) / n);
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
        yexp[gr] = ref_spmv_row(v, xs, L);
        expect_cyc[u] += 2 + L * ((len == 0) ? 1 : (len + L - 1) / L);
      end
      cfg[u] = '{nrows: nr, ncols: n, nnz: nz, base_rows: RB, base_x: XB,
                 base_cols: CB, base_vals: VB, base_y: YB};
      r0 += nr;
      busy[u] = 0;
    end
    @(negedge clk);
    t0 = longint'($time);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    $display("%s: n=%0d nnz=%0d, %0d cycles in all", name, n, nnz, (longint'($time) - t0) / 10);
    r0 = 0;
    for (int u = 0; u < NCU; u++) begin
      for (int r = 0; r < int'(cfg[u].nrows); r++) begin
        checks++;
        if (get(u, YB + r) !== yexp[r0 + r]) begin
          failures++;
          if (failures < 10) $display("%s unit %0d row %0d: %08h expected %08h", name, u, r, get(u, YB + r), yexp[r0 + r]);
        end
      end
      r0 += int'(cfg[u].nrows);
      $display("  unit %0d: %0d rows, %0d nonzeros, compute busy %0d cycles, II = L bound %0d",
               u, cfg[u].nrows, cfg[u].nnz, busy[u], expect_cyc[u]);
      checks++;
      if (busy[u] < expect_cyc[u] || busy[u] > expect_cyc[u] + expect_cyc[u] / 100 + 64) begin
        failures++;
        $display("  unit %0d compute cycles out of range", u);
      end
    end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_matrix("25503 x 25503, nnz 14765", 25503, 14765);
    run_matrix("20000 x 20000, nnz 30000", 20000, 30000);
    run_matrix("20082 x 20082, nnz 281150", 20082, 281150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

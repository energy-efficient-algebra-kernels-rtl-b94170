// tb_csr_spmv_kernel: self-checking test of the row-per-work-item CSR SPMV
// kernel and its compute units. A random CSR matrix (with empty rows, a row
// count that is not a multiple of the work-group size, and repeated column
// indices) lives in a behavioural global memory shared by all units; the
// row-pointer ports see it UF words per beat. y is compared with a reference
// that accumulates val[j] * x[col_idx[j]] in j order from +0, each step
// rounded to binary32 (the serial CSR algorithm). Every unit must have
// written the rows of its own work-groups (g mod NCU). The units run VC = 3
// vector lanes, which does not divide the work-group size, so the last step
// of every group has idle lanes; all lanes of a unit must be seen busy at
// the same time.
module tb_csr_spmv_kernel;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int BS = 4, NCU = 2, UF = 2, VC = 3, NL = NCU * VC, DEPTH = 8192;
  localparam int RPB = 0, CB = 1024, VB = 3072, XB = 5120, YB = 6144;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic [31:0] nrows;
  logic [NCU-1:0] rp_req_valid, rp_req_ready, rp_resp_valid;
  logic [NCU-1:0][31:0] rp_req_addr;
  logic [NCU-1:0][UF*32-1:0] rp_resp_data;
  logic [NL-1:0] col_req_valid, col_req_ready, col_resp_valid;
  logic [NL-1:0][31:0] col_req_addr, col_resp_data;
  logic [NL-1:0] val_req_valid, val_req_ready, val_resp_valid;
  logic [NL-1:0][31:0] val_req_addr, val_resp_data;
  logic [NL-1:0] x_req_valid, x_req_ready, x_resp_valid;
  logic [NL-1:0][31:0] x_req_addr, x_resp_data;
  logic [NCU-1:0] y_wr_valid, y_wr_ready;
  logic [NCU-1:0][31:0] y_wr_addr, y_wr_data;

  csr_spmv_kernel #(.BS(BS), .NCU(NCU), .UF(UF), .VC(VC)) dut (
    .clk, .rst_n, .start, .nrows, .base_rp(RPB), .base_col(CB), .base_val(VB),
    .base_x(XB), .base_y(YB), .done, .*);

  // row pointers, UF words per beat
  logic [NCU-1:0] nowr = '0, nowr_rdy;
  logic [NCU-1:0][31:0] nowa = '0;
  logic [NCU-1:0][UF*32-1:0] nowd = '0;
  gmem_model #(.NRD(NCU), .NWR(NCU), .WPB(UF), .DEPTH(DEPTH), .LAT(4), .STALL(1)) rpmem (
    .clk, .rd_req_valid(rp_req_valid), .rd_req_ready(rp_req_ready), .rd_req_addr(rp_req_addr),
    .rd_resp_valid(rp_resp_valid), .rd_resp_data(rp_resp_data),
    .wr_valid(nowr), .wr_ready(nowr_rdy), .wr_addr(nowa), .wr_data(nowd));
  // columns, values, x and y of all units
  gmem_model #(.NRD(3*NL), .NWR(NCU), .WPB(1), .DEPTH(DEPTH), .LAT(6), .STALL(1)) mem (
    .clk, .rd_req_valid({x_req_valid, val_req_valid, col_req_valid}),
    .rd_req_ready({x_req_ready, val_req_ready, col_req_ready}),
    .rd_req_addr({x_req_addr, val_req_addr, col_req_addr}),
    .rd_resp_valid({x_resp_valid, val_resp_valid, col_resp_valid}),
    .rd_resp_data({x_resp_data, val_resp_data, col_resp_data}),
    .wr_valid(y_wr_valid), .wr_ready(y_wr_ready), .wr_addr(y_wr_addr), .wr_data(y_wr_data));

  int checks = 0, failures = 0;
  int overlap = 0;   // cycles in which all lanes of unit 0 work at once
  always @(posedge clk) if (rst_n && dut.g_cu[0].u_cu.lane_done == '0) overlap++;
  int writer [DEPTH];
  always @(posedge clk) if (rst_n)
    for (int u = 0; u < NCU; u++)
      if (y_wr_valid[u] && y_wr_ready[u]) writer[y_wr_addr[u] % DEPTH] = u;

  task automatic run_csr(input int n, input int maxlen);
    fp32_t xv [], yexp [];
    int    nz;
    xv = new[n];
    yexp = new[n];
    for (int a = 0; a < DEPTH; a++) begin mem.mem[a] = 32'hdead_beef; rpmem.mem[a] = 32'h0; writer[a] = -1; end
    for (int c = 0; c < n; c++) begin xv[c] = rand_fp(5); mem.mem[XB + c] = xv[c]; end
    nz = 0;
    for (int r = 0; r < n; r++) begin
      int len;
      fp32_t acc;
      rpmem.mem[RPB + r] = nz;
      len = (r % 5 == 2) ? 0 : $urandom_range(maxlen, 1);
      acc = FP32_ZERO;
      for (int q = 0; q < len; q++) begin
        int c;
        fp32_t v;
        c = (q == 1) ? mem.mem[CB + nz - 1] : $urandom_range(n - 1, 0);
        v = rand_fp(5);
        mem.mem[CB + nz] = c;
        mem.mem[VB + nz] = v;
        acc = ref_add(acc, ref_mul(v, xv[c]));
        nz++;
      end
      yexp[r] = acc;
    end
    rpmem.mem[RPB + n] = nz;
    @(negedge clk);
    nrows = n; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    for (int r = 0; r < n; r++) begin
      checks++;
      if (mem.mem[YB + r] !== yexp[r] || writer[YB + r] != (r / BS) % NCU) begin
        failures++;
        if (failures < 10)
          $display("row %0d: %08h expected %08h (written by unit %0d)", r, mem.mem[YB + r], yexp[r], writer[YB + r]);
      end
    end
    checks++;
    if (mem.mem[YB + n] !== 32'hdead_beef) begin
      failures++;
      $display("write beyond the last row");
    end
  endtask

  initial begin
    start = 0; nrows = 0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_csr(37, 9);
    run_csr(16, 3);
    run_csr(3, 20);
    checks++;
    if (overlap == 0) begin
      failures++;
      $display("the vector lanes never worked at the same time");
    end
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

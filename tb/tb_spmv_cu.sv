// tb_spmv_cu: self-checking test of one compute unit of the streaming SPMV
// kernel (stage 1 local-memory fill, stage 2 dataflow). A random CSR block
// (row lengths, x, column indices, values) is placed in a behavioural memory
// that withholds ready at random; after done every y is compared with the
// reference in the kernel's summation order. The run is repeated on a second
// matrix to check that the unit restarts cleanly, and the stage ordering is
// checked: no column index may be requested before the last x word arrived.
module tb_spmv_cu;
  import fp32_pkg::*;
  import fp_ref_pkg::*;
  import spmv_pkg::*;

  localparam int L = 4, ROW_DEPTH = 64, X_DEPTH = 128, DEPTH = 4096;
  localparam int RB = 0, XB = 256, CB = 512, VB = 1536, YB = 3072;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  spmv_cfg_t cfg;
  logic [NPORTS-1:0]       rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [NPORTS-1:0][31:0] rd_req_addr, rd_resp_data;
  logic                    wr_valid, wr_ready;
  logic [31:0]             wr_addr, wr_data;
  logic [0:0]              wr_ready_v;
  assign wr_ready = wr_ready_v[0];

  spmv_cu #(.L(L), .ROW_DEPTH(ROW_DEPTH), .X_DEPTH(X_DEPTH)) dut (.*);

  gmem_model #(.NRD(NPORTS), .NWR(1), .DEPTH(DEPTH), .LAT(6), .STALL(1)) mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready(wr_ready_v), .wr_addr, .wr_data);

  int checks = 0, failures = 0, x_seen = 0, early = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_resp_valid[PORT_X]) x_seen++;
    if (rd_req_valid[PORT_COLS] && x_seen < int'(cfg.ncols)) early++;
  end

  task automatic run_cu(input int n, input int nr, input int maxlen);
    fp32_t xv [];
    fp32_t yexp [];
    int    nz;
    xv = new[n];
    yexp = new[nr];
    for (int a = 0; a < DEPTH; a++) mem.mem[a] = 32'hdead_beef;
    for (int c = 0; c < n; c++) begin xv[c] = rand_fp(5); mem.mem[XB + c] = xv[c]; end
    nz = 0;
    for (int r = 0; r < nr; r++) begin
      fp32_t v [$], xs [$];
      int len;
      len = $urandom_range(maxlen, 0);
      mem.mem[RB + r] = len;
      v = {}; xs = {};
      for (int q = 0; q < len; q++) begin
        int c;
        c = $urandom_range(n - 1, 0);
        v.push_back(rand_fp(5));
        xs.push_back(xv[c]);
        mem.mem[CB + nz] = c;
        mem.mem[VB + nz] = v[q];
        nz++;
      end
      yexp[r] = ref_spmv_row(v, xs, L);
    end
    x_seen = 0;
    @(negedge clk);
    cfg = '{nrows: nr, ncols: n, nnz: nz, base_rows: RB, base_x: XB,
            base_cols: CB, base_vals: VB, base_y: YB};
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    for (int r = 0; r < nr; r++) begin
      checks++;
      if (mem.mem[YB + r] !== yexp[r]) begin
        failures++;
        if (failures < 10) $display("row %0d: %08h expected %08h", r, mem.mem[YB + r], yexp[r]);
      end
    end
    checks++;
    if (mem.mem[YB + nr] !== 32'hdead_beef) begin
      failures++;
      $display("write beyond the last row");
    end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_cu(120, 60, 15);
    run_cu(40, 25, 6);
    checks++;
    if (early != 0) begin
      failures++;
      $display("%0d column requests before x was complete", early);
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

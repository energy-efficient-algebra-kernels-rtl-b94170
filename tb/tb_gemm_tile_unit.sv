// tb_gemm_tile_unit: self-checking test of the tiled GEMM unit.
// Random A and B are placed in a behavioural global memory; C = A * B is
// computed by the unit and compared element by element with a reference
// that forms every product and adds it to the running sum in k order, each
// step rounded to binary32 (the order the kernel source prescribes).
// Two products are run: one with a fast memory and one where the memory
// withholds ready at random; the compute phase is checked to issue SIMD
// work-items per cycle (NB*NB/SIMD cycles per tile).
module tb_gemm_tile_unit;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NB = 8, SIMD = 4, WPB = SIMD;
  localparam int DEPTH = 8192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, done;
  logic [31:0] m, n, k, base_a, base_b, base_c;
  logic [1:0]           rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [1:0][31:0]     rd_req_addr;
  logic [1:0][WPB*32-1:0] rd_resp_data;
  logic [0:0]           wr_valid, wr_ready;
  logic [0:0][31:0]     wr_addr;
  logic [0:0][WPB*32-1:0] wr_data;

  gemm_tile_unit #(.NB(NB), .SIMD(SIMD)) dut (
    .clk, .rst_n, .start, .m, .n, .k, .base_a, .base_b, .base_c, .done,
    .a_req_valid(rd_req_valid[0]), .a_req_ready(rd_req_ready[0]), .a_req_addr(rd_req_addr[0]),
    .a_resp_valid(rd_resp_valid[0]), .a_resp_data(rd_resp_data[0]),
    .b_req_valid(rd_req_valid[1]), .b_req_ready(rd_req_ready[1]), .b_req_addr(rd_req_addr[1]),
    .b_resp_valid(rd_resp_valid[1]), .b_resp_data(rd_resp_data[1]),
    .c_wr_valid(wr_valid[0]), .c_wr_ready(wr_ready[0]), .c_wr_addr(wr_addr[0]), .c_wr_data(wr_data[0])
  );

  gmem_model #(.NRD(2), .NWR(1), .WPB(WPB), .DEPTH(DEPTH), .LAT(3), .STALL(0)) mem_fast (
    .clk, .rd_req_valid, .rd_req_ready(), .rd_req_addr, .rd_resp_valid(), .rd_resp_data(),
    .wr_valid, .wr_ready(), .wr_addr, .wr_data);
  gmem_model #(.NRD(2), .NWR(1), .WPB(WPB), .DEPTH(DEPTH), .LAT(5), .STALL(1)) mem_slow (
    .clk, .rd_req_valid, .rd_req_ready(), .rd_req_addr, .rd_resp_valid(), .rd_resp_data(),
    .wr_valid, .wr_ready(), .wr_addr, .wr_data);

  bit slow;
  // the selected memory drives the unit; the other one only listens
  assign rd_req_ready  = slow ? mem_slow.rd_req_ready  : mem_fast.rd_req_ready;
  assign rd_resp_valid = slow ? mem_slow.rd_resp_valid : mem_fast.rd_resp_valid;
  assign rd_resp_data  = slow ? mem_slow.rd_resp_data  : mem_fast.rd_resp_data;
  assign wr_ready      = slow ? mem_slow.wr_ready      : mem_fast.wr_ready;

  int checks = 0, failures = 0;
  int compute_cycles = 0, compute_tiles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.state == dut.G_COMPUTE) compute_cycles++;
    if (dut.state == dut.G_COMPUTE && dut.grp == 0) compute_tiles++;
  end

  task automatic run_gemm(input int mm, input int nn, input int kk, input bit use_slow);
    fp32_t av [], bv [], acc;
    av = new[mm * kk];
    bv = new[kk * nn];
    slow = use_slow;
    for (int i = 0; i < mm * kk; i++) av[i] = rand_fp(8);
    for (int i = 0; i < kk * nn; i++) bv[i] = rand_fp(8);
    for (int i = 0; i < DEPTH; i++) begin
      mem_fast.mem[i] = '0;
      mem_slow.mem[i] = '0;
    end
    for (int i = 0; i < mm * kk; i++) begin mem_fast.mem[i] = av[i]; mem_slow.mem[i] = av[i]; end
    for (int i = 0; i < kk * nn; i++) begin mem_fast.mem[2048 + i] = bv[i]; mem_slow.mem[2048 + i] = bv[i]; end
    compute_cycles = 0; compute_tiles = 0;
    @(negedge clk);
    m = mm; n = nn; k = kk; base_a = 0; base_b = 2048; base_c = 4096;
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    for (int i = 0; i < mm; i++)
      for (int j = 0; j < nn; j++) begin
        fp32_t got;
        acc = FP32_ZERO;
        for (int x = 0; x < kk; x++) acc = ref_add(acc, ref_mul(av[i * kk + x], bv[x * nn + j]));
        got = use_slow ? mem_slow.mem[4096 + i * nn + j] : mem_fast.mem[4096 + i * nn + j];
        checks++;
        if (got !== acc) begin
          failures++;
          if (failures < 10) $display("C[%0d][%0d] = %08h expected %08h", i, j, got, acc);
        end
      end
    checks++;
    if (compute_cycles != compute_tiles * NB * NB / SIMD ||
        compute_tiles != (mm / NB) * (nn / NB) * (kk / NB)) begin
      failures++;
      $display("compute: %0d cycles for %0d tiles", compute_cycles, compute_tiles);
    end
  endtask

  initial begin
    start = 0; m = 0; n = 0; k = 0; base_a = 0; base_b = 0; base_c = 0; slow = 0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_gemm(16, 24, 16, 0);
    run_gemm(24, 16, 32, 1);
    run_gemm(8, 8, 8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gemm_workload: the tiled GEMM unit at its default configuration
// (NB = 8 tiles, SIMD = 4) on the three smallest evaluated dense products:
// A(64x32)*B(32x32), A(128x64)*B(64x64) and A(256x128)*B(128x128), with
// random single-precision data in a behavioural memory that answers every
// request after a fixed latency. Every element of C is compared with a
// reference that adds the products to the running sum in k order, each step
// rounded to binary32. The compute phase must take exactly NB*NB/SIMD
// cycles per tile pair (SIMD work-items per cycle), and the run prints the
// total cycle count. The larger evaluated products only differ in size.
module tb_gemm_workload;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NB = 8, SIMD = 4, WPB = SIMD;
  localparam int DEPTH = 262144, BA = 0, BB = 65536, BC = 131072;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, done;
  logic [31:0] m, n, k, base_a, base_b, base_c;
  logic [1:0]             rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [1:0][31:0]       rd_req_addr;
  logic [1:0][WPB*32-1:0] rd_resp_data;
  logic [0:0]             wr_valid, wr_ready;
  logic [0:0][31:0]       wr_addr;
  logic [0:0][WPB*32-1:0] wr_data;

  gemm_tile_unit dut (
    .clk, .rst_n, .start, .m, .n, .k, .base_a, .base_b, .base_c, .done,
    .a_req_valid(rd_req_valid[0]), .a_req_ready(rd_req_ready[0]), .a_req_addr(rd_req_addr[0]),
    .a_resp_valid(rd_resp_valid[0]), .a_resp_data(rd_resp_data[0]),
    .b_req_valid(rd_req_valid[1]), .b_req_ready(rd_req_ready[1]), .b_req_addr(rd_req_addr[1]),
    .b_resp_valid(rd_resp_valid[1]), .b_resp_data(rd_resp_data[1]),
    .c_wr_valid(wr_valid[0]), .c_wr_ready(wr_ready[0]), .c_wr_addr(wr_addr[0]), .c_wr_data(wr_data[0])
  );

  gmem_model #(.NRD(2), .NWR(1), .WPB(WPB), .DEPTH(DEPTH), .LAT(4), .STALL(0)) mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  int checks = 0, failures = 0;
  int compute_cycles = 0, compute_tiles = 0;
  always @(posedge clk) if (rst_n) begin
    // gemm_tile_unit state 2 = compute, grp = work-item group within a tile
    if (32'(dut.state) == 2) compute_cycles++;
    if (32'(dut.state) == 2 && dut.grp == 0) compute_tiles++;
  end

  task automatic run_gemm(input string name, input int mm, input int kk, input int nn);
    fp32_t av [], bv [], acc;
    longint t0;
    av = new[mm * kk];
    bv = new[kk * nn];
    for (int i = 0; i < mm * kk; i++) begin av[i] = rand_fp(8); mem.mem[BA + i] = av[i]; end
    for (int i = 0; i < kk * nn; i++) begin bv[i] = rand_fp(8); mem.mem[BB + i] = bv[i]; end
    compute_cycles = 0; compute_tiles = 0;
    @(negedge clk);
    m = mm; n = nn; k = kk; base_a = BA; base_b = BB; base_c = BC;
    t0 = longint'($time);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    $display("%s: %0d cycles in all, %0d in compute for %0d tile pairs",
             name, (longint'($time) - t0) / 10, compute_cycles, compute_tiles);
    for (int i = 0; i < mm; i++)
      for (int j = 0; j < nn; j++) begin
        acc = FP32_ZERO;
        for (int x = 0; x < kk; x++) acc = ref_add(acc, ref_mul(av[i * kk + x], bv[x * nn + j]));
        checks++;
        if (mem.mem[BC + i * nn + j] !== acc) begin
          failures++;
          if (failures < 10) $display("%s C[%0d][%0d] = %08h expected %08h", name, i, j, mem.mem[BC + i * nn + j], acc);
        end
      end
    checks++;
    if (compute_tiles != (mm / NB) * (nn / NB) * (kk / NB) ||
        compute_cycles != compute_tiles * NB * NB / SIMD) begin
      failures++;
      $display("%s: compute rate wrong", name);
    end
  endtask

  initial begin
    start = 0; m = 0; n = 0; k = 0; base_a = 0; base_b = 0; base_c = 0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_gemm("A(64x32)*B(32x32)", 64, 32, 32);
    run_gemm("A(128x64)*B(64x64)", 128, 64, 64);
    run_gemm("A(256x128)*B(128x128)", 256, 128, 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

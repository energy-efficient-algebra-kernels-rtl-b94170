// gemm_tile_unit: tiled single-precision matrix product C = A * B for the
// embedded FPGA, the hardware form of a 2-D NDRange OpenCL kernel with
// NB x NB work-groups vectorised SIMD wide.
//
// A (M x K), B (K x N) and C (M x N) are row-major in global memory at word
// addresses base_a, base_b, base_c; M, N and K must be multiples of NB. For
// each NB x NB block of C the unit walks the K dimension one tile at a time:
//   LOAD    read the NB x NB tiles of A and B into local memory (both read
//           ports in parallel, SIMD words per beat); wait for all (barrier);
//   COMPUTE the NB*NB work-items, SIMD per cycle, each add the NB products of
//           its row of the A tile and column of the B tile to its private
//           running sum (gemm_dot_lane); wait for all (barrier);
// and after the last tile
//   STORE   write the NB x NB sums to C, SIMD words per beat.
// One work-item per element of C: the running sums start at +0 for every
// block and are accumulated in k order, exactly as the sequential loop
// "sum += A[i][k] * B[k][j]".
//
// Ports: read ports as in mem_reader (in-order responses, no back-pressure
// on responses), write port as in mem_writer, each SIMD*32 bits wide. start
// is taken while idle; done is high while idle.
// NB = 8 and SIMD = 4 are the evaluated configuration; the latencies of the
// floating-point units are this design's own choice.
module gemm_tile_unit
  import fp32_pkg::*;
#(
  parameter int NB      = 8,
  parameter int SIMD    = 4,
  parameter int MUL_LAT = 4,
  parameter int ADD_LAT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        m,
  input  logic [31:0]        n,
  input  logic [31:0]        k,
  input  logic [31:0]        base_a,
  input  logic [31:0]        base_b,
  input  logic [31:0]        base_c,
  output logic               done,
  // A read port
  output logic               a_req_valid,
  input  logic               a_req_ready,
  output logic [31:0]        a_req_addr,
  input  logic               a_resp_valid,
  input  logic [SIMD*32-1:0] a_resp_data,
  // B read port
  output logic               b_req_valid,
  input  logic               b_req_ready,
  output logic [31:0]        b_req_addr,
  input  logic               b_resp_valid,
  input  logic [SIMD*32-1:0] b_resp_data,
  // C write port
  output logic               c_wr_valid,
  input  logic               c_wr_ready,
  output logic [31:0]        c_wr_addr,
  output logic [SIMD*32-1:0] c_wr_data
);
  localparam int CPR   = NB / SIMD;        // beats per tile row
  localparam int BEATS = NB * NB / SIMD;   // beats (and SIMD groups) per tile
  localparam int BW    = $clog2(BEATS + 1);
  localparam int TAGW  = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [2:0] {G_IDLE, G_LOAD, G_COMPUTE, G_DRAIN, G_STORE} gstate_t;
  gstate_t state;

  logic [31:0] bi, bj, kb;              // block row, block column, k tile
  logic [31:0] mb, nbk, kbk;            // number of blocks in each dimension
  logic [BW-1:0] a_iss, a_rcv, b_iss, b_rcv, grp, ret, st_beat;

  fp32_t a_mem [NB][NB];                // A tile, [row i][k]
  fp32_t b_mem [NB][NB];                // B tile, [k][column j]
  fp32_t sums  [NB*NB];                 // running sum of each work-item

  assign done = (state == G_IDLE);

  // ---------------- tile loads ----------------
  logic [31:0] a_row, a_col, b_row, b_col;
  assign a_row = bi * NB + 32'(a_iss) / CPR;
  assign a_col = kb * NB + (32'(a_iss) % CPR) * SIMD;
  assign b_row = kb * NB + 32'(b_iss) / CPR;
  assign b_col = bj * NB + (32'(b_iss) % CPR) * SIMD;
  assign a_req_valid = (state == G_LOAD) && (a_iss != BW'(BEATS));
  assign b_req_valid = (state == G_LOAD) && (b_iss != BW'(BEATS));
  assign a_req_addr  = base_a + a_row * k + a_col;
  assign b_req_addr  = base_b + b_row * n + b_col;

  // ---------------- compute issue ----------------
  logic  issue;
  fp32_t lane_a   [SIMD][NB];
  fp32_t lane_b   [SIMD][NB];
  fp32_t lane_sum [SIMD];
  logic  lane_v   [SIMD];
  logic [TAGW-1:0] lane_tag [SIMD];
  fp32_t lane_out [SIMD];

  assign issue = (state == G_COMPUTE);

  always_comb begin
    for (int s = 0; s < SIMD; s++) begin
      int w;
      w = int'(grp) * SIMD + s;
      lane_sum[s] = sums[w % (NB*NB)];
      for (int kk = 0; kk < NB; kk++) begin
        lane_a[s][kk] = a_mem[(w / NB) % NB][kk];
        lane_b[s][kk] = b_mem[kk][w % NB];
      end
    end
  end

  for (genvar s = 0; s < SIMD; s++) begin : g_lane
    gemm_dot_lane #(.NB(NB), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .TAGW(TAGW)) u_lane (
      .clk, .rst_n,
      .in_valid (issue),
      .in_tag   (TAGW'(grp)),
      .sum_in   (lane_sum[s]),
      .a        (lane_a[s]),
      .b        (lane_b[s]),
      .out_valid(lane_v[s]),
      .out_tag  (lane_tag[s]),
      .sum_out  (lane_out[s])
    );
  end

  // ---------------- store ----------------
  logic [31:0] c_row, c_col;
  assign c_row      = bi * NB + 32'(st_beat) / CPR;
  assign c_col      = bj * NB + (32'(st_beat) % CPR) * SIMD;
  assign c_wr_valid = (state == G_STORE);
  assign c_wr_addr  = base_c + c_row * n + c_col;
  always_comb
    for (int s = 0; s < SIMD; s++)
      c_wr_data[s*32 +: 32] = sums[(int'(st_beat) * SIMD + s) % (NB*NB)];

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      bi <= '0; bj <= '0; kb <= '0;
      mb <= '0; nbk <= '0; kbk <= '0;
      a_iss <= '0; a_rcv <= '0; b_iss <= '0; b_rcv <= '0;
      grp <= '0; ret <= '0; st_beat <= '0;
      for (int i = 0; i < NB * NB; i++) sums[i] <= FP32_ZERO;
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NB; j++) begin
          a_mem[i][j] <= FP32_ZERO;
          b_mem[i][j] <= FP32_ZERO;
        end
    end else begin
      // tile data arrives in request order
      if (a_resp_valid) begin
        for (int s = 0; s < SIMD; s++)
          a_mem[int'(a_rcv) / CPR][(int'(a_rcv) % CPR) * SIMD + s] <= a_resp_data[s*32 +: 32];
        a_rcv <= a_rcv + 1'b1;
      end
      if (b_resp_valid) begin
        for (int s = 0; s < SIMD; s++)
          b_mem[int'(b_rcv) / CPR][(int'(b_rcv) % CPR) * SIMD + s] <= b_resp_data[s*32 +: 32];
        b_rcv <= b_rcv + 1'b1;
      end
      if (a_req_valid && a_req_ready) a_iss <= a_iss + 1'b1;
      if (b_req_valid && b_req_ready) b_iss <= b_iss + 1'b1;
      // work-item results
      if (lane_v[0]) begin
        for (int s = 0; s < SIMD; s++)
          sums[(int'(lane_tag[s]) * SIMD + s) % (NB*NB)] <= lane_out[s];
        ret <= ret + 1'b1;
      end

      unique case (state)
        G_IDLE:
          if (start) begin
            mb  <= m / NB;
            nbk <= n / NB;
            kbk <= k / NB;
            bi <= '0; bj <= '0; kb <= '0;
            a_iss <= '0; a_rcv <= '0; b_iss <= '0; b_rcv <= '0;
            for (int i = 0; i < NB * NB; i++) sums[i] <= FP32_ZERO;
            state <= (m < NB || n < NB || k < NB) ? G_IDLE : G_LOAD;
          end
        G_LOAD:   // barrier: both tiles complete
          if (a_rcv == BW'(BEATS) && b_rcv == BW'(BEATS)) begin
            grp   <= '0;
            ret   <= '0;
            state <= G_COMPUTE;
          end
        G_COMPUTE: begin
          grp <= grp + 1'b1;
          if (grp == BW'(BEATS - 1)) state <= G_DRAIN;
        end
        G_DRAIN:  // barrier: every work-item has consumed the tiles
          if (ret == BW'(BEATS)) begin
            a_iss <= '0; a_rcv <= '0; b_iss <= '0; b_rcv <= '0;
            if (kb + 1 == kbk) begin
              kb      <= '0;
              st_beat <= '0;
              state   <= G_STORE;
            end else begin
              kb    <= kb + 1;
              state <= G_LOAD;
            end
          end
        G_STORE:
          if (c_wr_ready) begin
            st_beat <= st_beat + 1'b1;
            if (st_beat == BW'(BEATS - 1)) begin
              for (int i = 0; i < NB * NB; i++) sums[i] <= FP32_ZERO;
              if (bj + 1 == nbk) begin
                bj <= '0;
                bi <= bi + 1;
                state <= (bi + 1 == mb) ? G_IDLE : G_LOAD;
              end else begin
                bj    <= bj + 1;
                state <= G_LOAD;
              end
            end
          end
        default: state <= G_IDLE;
      endcase
    end
  end

  initial assert (NB % SIMD == 0) else $error("gemm_tile_unit: NB must be a multiple of SIMD");
  a_dims: assert property (@(posedge clk) disable iff (!rst_n)
                           (start && done) |-> (m % NB == 0 && n % NB == 0 && k % NB == 0));
endmodule

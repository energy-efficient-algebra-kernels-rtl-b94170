// tb_spmv_core: self-checking test of the SPMV compute stage.
// The testbench plays the local memories (row lengths and x, one-cycle
// reads) and the column/value streams, and compares every y with a
// reference computed in double precision, rounded to binary32 after every
// operation in the core's documented summation order (products of an
// iteration summed pairwise, then added to the row accumulator).
// Phase 1 streams at full rate and checks the cycle count: each row must cost
// 2 + L * max(1, ceil(len/L)) cycles, i.e. one nonzero per cycle at II = L.
// Phase 2 inserts random gaps in the streams and random back-pressure on y.
module tb_spmv_core;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int L = 4, MUL_LAT = 4, ADD_LAT = 4;
  localparam int ROW_DEPTH = 64, X_DEPTH = 64, MAXNZ = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic [31:0] nrows;
  logic        done;
  logic [5:0]  len_raddr, x_raddr;
  logic [31:0] len_rdata;
  fp32_t       x_rdata;
  logic        col_valid, col_ready, val_valid, val_ready, y_valid, y_ready;
  logic [31:0] col_data;
  fp32_t       val_data, y_data;

  spmv_core #(.L(L), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT),
              .ROW_DEPTH(ROW_DEPTH), .X_DEPTH(X_DEPTH)) dut (.*);

  logic [31:0] lens [ROW_DEPTH];
  fp32_t       xv   [X_DEPTH];
  logic [31:0] cols [MAXNZ];
  fp32_t       vals [MAXNZ];
  fp32_t       yexp [ROW_DEPTH];
  int          nnz, sp, yi;
  int          checks = 0, failures = 0;
  bit          gaps, bp;
  longint      cyc = 0;
  longint      t_start, t_last_y;

  always_ff @(posedge clk) begin
    len_rdata <= lens[len_raddr];
    x_rdata   <= xv[x_raddr];
  end
  always @(posedge clk) cyc <= cyc + 1;

  // stream driver
  assign col_data  = cols[sp];
  assign val_data  = vals[sp];
  logic gap_now;
  always @(posedge clk) gap_now <= gaps && ($urandom_range(2, 0) == 0);
  assign col_valid = (sp < nnz) && !gap_now;
  assign val_valid = (sp < nnz) && !gap_now;
  always @(posedge clk) if (col_valid && col_ready) sp <= sp + 1;
  always @(posedge clk) y_ready <= !bp || ($urandom_range(1, 0) == 0);

  // result checker
  always @(posedge clk) if (rst_n && y_valid && y_ready) begin
    checks++;
    if (y_data !== yexp[yi]) begin
      failures++;
      $display("row %0d (len %0d, gaps %0d): y=%08h expected %08h", yi, lens[yi], gaps, y_data, yexp[yi]);
    end
    yi <= yi + 1;
    t_last_y = cyc;
  end

  task automatic make_matrix(input int rows, input int maxlen);
    fp32_t p [L];
    fp32_t acc, t;
    int    j, it;
    nnz = 0;
    for (int c = 0; c < X_DEPTH; c++) xv[c] = rand_fp(6);
    for (int r = 0; r < rows; r++) begin
      if (lens[r] == 32'hffff_ffff) lens[r] = $urandom_range(maxlen, 0);
      j  = nnz;
      it = 0;
      acc = FP32_ZERO;
      do begin
        for (int k = 0; k < L; k++) begin
          if (j < nnz + int'(lens[r]) ) begin
            cols[j] = $urandom_range(X_DEPTH - 1, 0);
            vals[j] = rand_fp(6);
            p[k] = ref_mul(vals[j], xv[cols[j]]);
            j++;
          end else p[k] = ref_mul(FP32_ZERO, FP32_ZERO);
        end
        t   = ref_add(ref_add(p[0], p[1]), ref_add(p[2], p[3]));
        acc = (it == 0) ? ref_add(t, FP32_ZERO) : ref_add(t, acc);
        it++;
      end while (j < nnz + int'(lens[r]));
      yexp[r] = acc;
      nnz = nnz + int'(lens[r]);
    end
  endtask

  task automatic run(input int rows);
    sp = 0; yi = 0;
    @(negedge clk);
    nrows = rows; start = 1;
    t_start = cyc;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (!done) @(negedge clk);
    checks++;
    if (yi != rows || sp != nnz) begin
      failures++;
      $display("run: %0d results, %0d nonzeros used, expected %0d / %0d", yi, sp, rows, nnz);
    end
  endtask

  initial begin
    int exp_cyc;
    start = 0; nrows = 0; gaps = 0; bp = 0; sp = 0; yi = 0; nnz = 0;
    for (int i = 0; i < ROW_DEPTH; i++) lens[i] = 32'hffff_ffff;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;

    // phase 1: fixed lengths, full rate, cycle count
    begin
      int fixed [10] = '{0, 1, 3, 4, 5, 8, 13, 2, 16, 7};
      for (int r = 0; r < 10; r++) lens[r] = fixed[r];
    end
    make_matrix(10, 0);
    run(10);
    exp_cyc = 0;
    for (int r = 0; r < 10; r++)
      exp_cyc += 2 + L * ((lens[r] == 0) ? 1 : (int'(lens[r]) + L - 1) / L);
    // last row ends at exp_cyc-1 after the start edge; fill, issue, multiply,
    // two tree levels, accumulate, FIFO
    exp_cyc += 2 + MUL_LAT + 3 * ADD_LAT + 1;
    checks++;
    if (t_last_y - t_start != longint'(exp_cyc)) begin
      failures++;
      $display("phase 1: last result after %0d cycles, expected %0d", t_last_y - t_start, exp_cyc);
    end

    // phase 2: random matrices with stream gaps and output back-pressure
    gaps = 1; bp = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < ROW_DEPTH; i++) lens[i] = 32'hffff_ffff;
      make_matrix(40, 14);
      run(40);
    end

    // phase 3: no rows at all
    nnz = 0;
    run(0);

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

// tb_fp32_mul: self-checking test of the pipelined fp32 multiplier.
// Random normal operands (narrow and wide exponent spreads, so that
// cancellation, alignment shifts, overflow and flush-to-zero all occur) and a
// few special values are issued one per cycle; each result must match the
// double-precision reference rounded to binary32 and must arrive exactly LAT
// cycles after its operands.
module tb_fp32_mul;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 20000;

  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  fp32_t a, b, y;
  fp32_mul #(.LAT(LAT)) dut (.*);

  fp32_t  ea [N + 16];
  longint ta [N + 16];
  longint cyc = 0;
  int     nin = 0, nout = 0, checks = 0, failures = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && in_valid) begin
    ea[nin] = ref_mul(a, b);
    ta[nin] = cyc;
    nin++;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (y !== ea[nout] || cyc - ta[nout] != LAT) begin
      failures++;
      if (failures < 10)
        $display("result %0d: %08h expected %08h after %0d cycles", nout, y, ea[nout], cyc - ta[nout]);
    end
    nout++;
  end

  initial begin
    fp32_t sp [6] = '{32'h3f80_0000, 32'hbf80_0000, 32'h0000_0000, 32'h8000_0000,
                      32'h7f7f_ffff, 32'h0080_0000};
    in_valid = 0; a = '0; b = '0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(7, 0) != 0);
      a = rand_fp((i % 3 == 0) ? 126 : 20);
      b = rand_fp((i % 3 == 0) ? 126 : 20);
      if (i % 5 == 0) b = {~a[31], a[30:0]} ^ 32'($urandom_range(3, 0));  // near cancellation
      if (i < 36) begin a = sp[i % 6]; b = sp[i / 6]; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (nout != nin) begin
      failures++;
      $display("%0d results for %0d operations", nout, nin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stream_fifo: self-checking test of the stream FIFO. A random producer
// and a random consumer run against it for many cycles; every word must come
// out once, in order, and in_ready / out_valid / count must agree with a
// model of the occupancy (full exactly at DEPTH, empty at 0).
module tb_stream_fifo;
  localparam int W = 16, DEPTH = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [3:0]   count;

  stream_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, occ = 0, fulls = 0;
  logic [W-1:0] q [$];

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(count) != occ || in_ready != (occ < DEPTH) || out_valid != (occ > 0)) begin
      failures++;
      $display("count %0d ready %0b valid %0b, model occupancy %0d", count, in_ready, out_valid, occ);
    end
    if (occ == DEPTH) fulls++;
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data !== q[0]) begin
        failures++;
        $display("got %h expected %h", out_data, (q.size() != 0) ? q[0] : '0);
      end
      if (q.size() != 0) void'(q.pop_front());
      occ--;
    end
    if (in_valid && in_ready) begin
      q.push_back(in_data);
      occ++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // alternate producer-heavy and consumer-heavy phases
      in_valid  = ($urandom_range(9, 0) < ((i / 500) % 2 ? 8 : 3));
      out_ready = ($urandom_range(9, 0) < ((i / 500) % 2 ? 3 : 8));
      in_data   = W'($urandom);
    end
    checks++;
    if (fulls == 0) begin
      failures++;
      $display("FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

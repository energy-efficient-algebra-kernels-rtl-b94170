// tb_mem_reader: self-checking test of the sequential global-memory reader.
// Blocks of random length and base are streamed from a behavioural memory
// that withholds ready at random and answers after a fixed latency, into a
// consumer that stalls at random. Every word must arrive once, in address
// order, the request count must equal the block length (also 0), and the
// FIFO must never be over-committed (checked by the reader's assertion).
module tb_mem_reader;
  localparam int DEPTH = 8, MEMD = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, done;
  logic [31:0] base, count;
  logic [0:0]  rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [0:0][31:0] rd_req_addr, rd_resp_data;
  logic        out_valid, out_ready;
  logic [31:0] out_data;
  logic [0:0]  wv = '0, wr_unused;
  logic [0:0][31:0] wa = '0, wd = '0;

  mem_reader #(.DW(32), .AW(32), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .base, .count, .done,
    .rd_req_valid(rd_req_valid[0]), .rd_req_ready(rd_req_ready[0]), .rd_req_addr(rd_req_addr[0]),
    .rd_resp_valid(rd_resp_valid[0]), .rd_resp_data(rd_resp_data[0]),
    .out_valid, .out_ready, .out_data);

  gmem_model #(.NRD(1), .NWR(1), .DEPTH(MEMD), .LAT(5), .STALL(1)) mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid(wv), .wr_ready(wr_unused), .wr_addr(wa), .wr_data(wd));

  int checks = 0, failures = 0, got = 0, reqs = 0;
  always @(posedge clk) out_ready <= ($urandom_range(2, 0) != 0);
  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid[0] && rd_req_ready[0]) reqs++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== mem.mem[base + 32'(got)]) begin
        failures++;
        $display("word %0d: %h expected %h", got, out_data, mem.mem[base + 32'(got)]);
      end
      got++;
    end
  end

  task automatic run_block(input int b, input int c);
    got = 0; reqs = 0;
    @(negedge clk);
    base = b; count = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!(done && !out_valid)) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got != c || reqs != c) begin
      failures++;
      $display("block of %0d: %0d words, %0d requests", c, got, reqs);
    end
  endtask

  initial begin
    start = 0; base = 0; count = 0;
    for (int i = 0; i < MEMD; i++) mem.mem[i] = $urandom;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_block(0, 1);
    run_block(100, 0);
    run_block(7, 300);
    for (int i = 0; i < 10; i++) run_block($urandom_range(1000, 0), $urandom_range(100, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

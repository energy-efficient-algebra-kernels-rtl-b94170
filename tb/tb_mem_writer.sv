// tb_mem_writer: self-checking test of the sequential global-memory writer.
// Random words are offered on the input stream with random gaps, the memory
// withholds ready at random; afterwards the memory must hold exactly the
// COUNT words at BASE.., the words around the block must be untouched, and
// the writer must take no more than COUNT words from the stream.
module tb_mem_writer;
  localparam int MEMD = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, done, in_valid, in_ready;
  logic [31:0] base, count, in_data;
  logic [0:0]  wr_valid, wr_ready;
  logic [0:0][31:0] wr_addr, wr_data;
  logic [0:0]  rv = '0, rr, rresp;
  logic [0:0][31:0] ra = '0, rd;

  mem_writer #(.DW(32), .AW(32)) dut (
    .clk, .rst_n, .start, .base, .count, .done, .in_valid, .in_ready, .in_data,
    .wr_valid(wr_valid[0]), .wr_ready(wr_ready[0]), .wr_addr(wr_addr[0]), .wr_data(wr_data[0]));

  gmem_model #(.NRD(1), .NWR(1), .DEPTH(MEMD), .LAT(2), .STALL(1)) mem (
    .clk, .rd_req_valid(rv), .rd_req_ready(rr), .rd_req_addr(ra), .rd_resp_valid(rresp),
    .rd_resp_data(rd), .wr_valid, .wr_ready, .wr_addr, .wr_data);

  logic [31:0] src [256];
  int sent = 0, checks = 0, failures = 0;
  logic gap;
  always @(posedge clk) gap <= ($urandom_range(3, 0) == 0);
  assign in_valid = (sent < 256) && !gap;
  assign in_data  = src[sent % 256];
  always @(posedge clk) if (rst_n && in_valid && in_ready) sent <= sent + 1;

  task automatic run_block(input int b, input int c);
    for (int i = 0; i < MEMD; i++) mem.mem[i] = 32'hdead_beef;
    for (int i = 0; i < 256; i++) src[i] = $urandom;
    sent = 0;
    @(negedge clk);
    base = b; count = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < c; i++) begin
      checks++;
      if (mem.mem[b + i] !== src[i]) begin
        failures++;
        $display("word %0d: %h expected %h", i, mem.mem[b + i], src[i]);
      end
    end
    checks++;
    if (mem.mem[b + c] !== 32'hdead_beef || (b > 0 && mem.mem[b - 1] !== 32'hdead_beef) || sent != c) begin
      failures++;
      $display("block %0d/%0d: neighbours or stream count wrong (%0d taken)", b, c, sent);
    end
  endtask

  initial begin
    start = 0; base = 0; count = 0;
    repeat (12) @(negedge clk);   // longer than any memory latency
    rst_n = 1;
    run_block(10, 1);
    run_block(50, 0);
    run_block(300, 200);
    run_block(3, 77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

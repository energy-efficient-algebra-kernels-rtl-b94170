// tb_local_ram: self-checking test of the local RAM. Random writes and reads
// on both ports at once (including the same address in the same cycle, which
// must return the old word) are compared with a shadow array; read data must
// be valid exactly one cycle after the address.
module tb_local_ram;
  localparam int DW = 32, DEPTH = 40;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          we;
  logic [5:0]    waddr, raddr;
  logic [DW-1:0] wdata, rdata;

  local_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW-1:0] shadow [DEPTH];
  logic [DW-1:0] expect_q;
  logic          check_q = 0;
  bit            armed = 0;
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    if (check_q) begin
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("read %h expected %h", rdata, expect_q);
      end
    end
    check_q  <= armed;
    expect_q <= shadow[raddr];
    if (we) shadow[waddr] <= wdata;
  end

  initial begin
    we = 1; raddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = 6'(i); wdata = $urandom;
      @(negedge clk);
    end
    armed = 1;
    for (int i = 0; i < 3000; i++) begin
      we    = $urandom_range(1, 0);
      waddr = 6'($urandom_range(DEPTH - 1, 0));
      raddr = (i % 4 == 0) ? waddr : 6'($urandom_range(DEPTH - 1, 0));
      wdata = $urandom;
      @(negedge clk);
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

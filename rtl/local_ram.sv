// local_ram: simple dual-port on-chip RAM (one write port, one read port,
// one clock), used for the kernel's local memories: the copy of the vector x
// and the table of row lengths. Read data appears one cycle after the
// address (registered read, as block RAM does). The contents are not reset.
module local_ram #(
  parameter int DW    = 32,
  parameter int DEPTH = 1024,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

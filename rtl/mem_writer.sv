// mem_writer: the "Write y" function of the dataflow SPMV kernel. It takes
// COUNT words from an input stream and writes them to consecutive word
// addresses from BASE through a global-memory write port. A write is
// accepted when wr_valid && wr_ready (posted, no response). done is high
// while idle, i.e. from the cycle after the last write was accepted.
module mem_writer #(
  parameter int DW = 32,
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [31:0]   count,
  output logic          done,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  // global memory write port
  output logic          wr_valid,
  input  logic          wr_ready,
  output logic [AW-1:0] wr_addr,
  output logic [DW-1:0] wr_data
);
  logic        busy;
  logic [31:0] written;

  assign wr_valid = busy && in_valid;
  assign wr_addr  = base + AW'(written);
  assign wr_data  = in_data;
  assign in_ready = busy && wr_ready;
  assign done     = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      written <= '0;
    end else if (start && !busy) begin
      busy    <= (count != 0);
      written <= '0;
    end else if (wr_valid && wr_ready) begin
      written <= written + 1;
      if (written == count - 1) busy <= 1'b0;
    end
  end
endmodule

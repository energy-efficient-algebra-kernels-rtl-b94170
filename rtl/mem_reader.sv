// mem_reader: streams COUNT consecutive words, starting at word address
// BASE, from a global-memory read port into a FIFO. It is the "Read rows",
// "Read x", "Read cols" and "Read vals" function of the dataflow SPMV
// kernel: one reader per input port, each with a port of its own.
//
// Memory port (this design's own choice): a request is accepted when
// rd_req_valid && rd_req_ready; responses return in order on rd_resp_valid
// (one cycle pulse, any latency, no back-pressure). The reader never has
// more requests outstanding than it has free FIFO entries, so a response
// always finds room. done is high while the reader is idle: from the cycle
// after the last of the COUNT words has arrived (it may still sit in the
// FIFO) until the next start. start is ignored while a transfer runs.
module mem_reader #(
  parameter int DW    = 32,
  parameter int AW    = 32,
  parameter int DEPTH = 16,
  localparam int CW   = $clog2(DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [31:0]   count,
  output logic          done,
  // global memory read port
  output logic          rd_req_valid,
  input  logic          rd_req_ready,
  output logic [AW-1:0] rd_req_addr,
  input  logic          rd_resp_valid,
  input  logic [DW-1:0] rd_resp_data,
  // output stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  logic [31:0]   issued, received;
  logic          busy;
  logic [CW-1:0] outstanding, fifo_count;
  logic          fifo_in_ready;

  assign rd_req_valid = busy && (issued != count) &&
                        (32'(outstanding) + 32'(fifo_count) < DEPTH);
  assign rd_req_addr  = base + AW'(issued);
  assign done         = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      issued      <= '0;
      received    <= '0;
      outstanding <= '0;
    end else if (start && !busy) begin
      busy        <= (count != 0);
      issued      <= '0;
      received    <= '0;
      outstanding <= '0;
    end else if (busy) begin
      if (rd_req_valid && rd_req_ready) issued <= issued + 1;
      if (rd_resp_valid) received <= received + 1;
      outstanding <= outstanding + CW'(rd_req_valid && rd_req_ready) - CW'(rd_resp_valid);
      if (rd_resp_valid && received == count - 1) busy <= 1'b0;
    end
  end

  stream_fifo #(.WIDTH(DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (rd_resp_valid && busy),
    .in_ready (fifo_in_ready),
    .in_data  (rd_resp_data),
    .out_valid, .out_ready, .out_data,
    .count    (fifo_count)
  );

  a_resp_has_room: assert property (@(posedge clk) disable iff (!rst_n)
                                    rd_resp_valid |-> fifo_in_ready);
endmodule

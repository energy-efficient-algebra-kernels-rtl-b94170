// csr_row_lane: the datapath of one CSR SPMV work-item, i.e. one row:
// result = sum over j in [row_begin, row_begin + row_len) of
// val[j] * x[col_idx[j]], accumulated in j order from +0, each step rounded
// to binary32 (the serial CSR loop).
//
// How it works: on start, two mem_readers stream the row's column indices
// and values from global memory. Every column index is turned into a read of
// x[col] on the x port (the irregular gather), the returned x and the value
// are multiplied, and the products queue in front of a single adder. The
// accumulation is a loop-carried dependency, so a product enters the adder
// only when the previous sum is back (ADD_LAT cycles); a sum that returns in
// the same cycle is forwarded straight into the next add. Reads and
// multiplies run ahead of the adder by up to FIFO_DEPTH elements.
// (The product queue's count output is left unused: the in-flight counter
// in front of the multiplier already keeps the queue from overflowing.)
//
// Interface: pulse start (while done) with row_begin / row_len stable for
// that cycle; done falls the next cycle and rises again once the last add
// has returned, with result valid and held until the next start. An empty
// row gives +0. The col, val and x ports follow the in-order request /
// response protocol of mem_reader (no back-pressure on responses).
// Per row it costs about the memory latency plus ADD_LAT cycles per nonzero.
//
// The j-order accumulation follows the serial algorithm of the kernel; the
// queues, forwarding and port protocol are this design's own.
module csr_row_lane
  import fp32_pkg::*;
#(
  parameter int MUL_LAT    = 4,
  parameter int ADD_LAT    = 4,
  parameter int FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] base_col,
  input  logic [31:0] base_val,
  input  logic [31:0] base_x,
  input  logic [31:0] row_begin,
  input  logic [31:0] row_len,
  output logic        done,
  output fp32_t       result,
  // column index read port
  output logic        col_req_valid,
  input  logic        col_req_ready,
  output logic [31:0] col_req_addr,
  input  logic        col_resp_valid,
  input  logic [31:0] col_resp_data,
  // value read port
  output logic        val_req_valid,
  input  logic        val_req_ready,
  output logic [31:0] val_req_addr,
  input  logic        val_resp_valid,
  input  logic [31:0] val_resp_data,
  // x read port (gather)
  output logic        x_req_valid,
  input  logic        x_req_ready,
  output logic [31:0] x_req_addr,
  input  logic        x_resp_valid,
  input  logic [31:0] x_resp_data
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  logic        active;
  logic [31:0] len_q, adds_done;
  fp32_t       acc;

  assign done   = !active;
  assign result = acc;

  // ---------------- nonzero streams ----------------
  logic        col_done, val_done;
  logic        cs_valid, cs_ready, vs_valid, vs_ready;
  logic [31:0] cs_data;
  fp32_t       vs_data;

  mem_reader #(.DW(32), .AW(32), .DEPTH(FIFO_DEPTH)) u_col (
    .clk, .rst_n, .start, .base(base_col + row_begin), .count(row_len),
    .done(col_done),
    .rd_req_valid(col_req_valid), .rd_req_ready(col_req_ready), .rd_req_addr(col_req_addr),
    .rd_resp_valid(col_resp_valid), .rd_resp_data(col_resp_data),
    .out_valid(cs_valid), .out_ready(cs_ready), .out_data(cs_data)
  );
  mem_reader #(.DW(32), .AW(32), .DEPTH(FIFO_DEPTH)) u_val (
    .clk, .rst_n, .start, .base(base_val + row_begin), .count(row_len),
    .done(val_done),
    .rd_req_valid(val_req_valid), .rd_req_ready(val_req_ready), .rd_req_addr(val_req_addr),
    .rd_resp_valid(val_resp_valid), .rd_resp_data(val_resp_data),
    .out_valid(vs_valid), .out_ready(vs_ready), .out_data(vs_data)
  );

  // ---------------- x gather ----------------
  logic [CW-1:0] x_out, xq_count;
  logic          xq_valid, xq_ready, xq_in_ready;
  fp32_t         xq_data;
  assign x_req_valid = active && cs_valid && (32'(x_out) + 32'(xq_count) < FIFO_DEPTH);
  assign x_req_addr  = base_x + cs_data;
  assign cs_ready    = x_req_valid && x_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_out <= '0;
    else x_out <= x_out + CW'(x_req_valid && x_req_ready) - CW'(x_resp_valid);
  end

  stream_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_xq (
    .clk, .rst_n, .in_valid(x_resp_valid), .in_ready(xq_in_ready), .in_data(x_resp_data),
    .out_valid(xq_valid), .out_ready(xq_ready), .out_data(xq_data), .count(xq_count)
  );

  // ---------------- multiply, then accumulate in order ----------------
  logic          mul_go, mul_v, add_go, add_v, add_busy;
  fp32_t         mul_y, add_y, pq_data;
  logic [CW-1:0] p_inflight, pq_count;
  logic          pq_valid, pq_in_ready;

  assign mul_go   = xq_valid && vs_valid && (32'(p_inflight) < FIFO_DEPTH);
  assign xq_ready = mul_go;
  assign vs_ready = mul_go;

  fp32_mul #(.LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(mul_go), .a(vs_data), .b(xq_data), .out_valid(mul_v), .y(mul_y)
  );
  stream_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_pq (
    .clk, .rst_n, .in_valid(mul_v), .in_ready(pq_in_ready), .in_data(mul_y),
    .out_valid(pq_valid), .out_ready(add_go), .out_data(pq_data), .count(pq_count)
  );
  // a sum that returns this cycle is forwarded straight into the next add
  assign add_go = pq_valid && (!add_busy || add_v);

  fp32_add #(.LAT(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(add_go), .a(add_v ? add_y : acc), .b(pq_data),
    .out_valid(add_v), .y(add_y)
  );

  // products in the multiplier or waiting for the adder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_inflight <= '0;
    else p_inflight <= p_inflight + CW'(mul_go) - CW'(add_go);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; len_q <= '0; adds_done <= '0;
      acc <= FP32_ZERO; add_busy <= 1'b0;
    end else begin
      if (add_v) begin
        acc       <= add_y;
        add_busy  <= 1'b0;
        adds_done <= adds_done + 1;
      end
      if (add_go) add_busy <= 1'b1;
      if (start && !active) begin
        active    <= 1'b1;
        len_q     <= row_len;
        adds_done <= '0;
        acc       <= FP32_ZERO;
      end else if (active && adds_done == len_q && !add_busy && col_done && val_done)
        active <= 1'b0;
    end
  end

  a_xq_room: assert property (@(posedge clk) disable iff (!rst_n) x_resp_valid |-> xq_in_ready);
  a_pq_room: assert property (@(posedge clk) disable iff (!rst_n) mul_v |-> pq_in_ready);
endmodule

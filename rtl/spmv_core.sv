// spmv_core: the compute stage of the streaming SPMV kernel. For each of
// nrows rows it reads the row length from the row-length local memory,
// takes that many (column index, value) pairs from the two input streams,
// looks every column up in the local copy of x, and sends
// y[i] = sum_j val[j] * x[col[j]] to the output stream.
//
// The floating-point adder has a latency of ADD_LAT cycles, so a single
// accumulator cannot take one element per cycle. As in the kernel this is
// modelled on, each loop iteration handles L elements side by side and a new
// iteration starts every L cycles (initiation interval II = L): the L
// elements of an iteration are gathered one per cycle from the streams, then
// multiplied by L parallel multipliers, summed by an adder tree, and added
// to the row's accumulator. Because iterations of one row are at least L
// cycles apart, the accumulator result is always back in time (with a
// forwarding path when ADD_LAT == L). A row whose length is not a multiple
// of L is padded with zero products; an empty row takes one all-zero
// iteration and yields +0.
//
// Summation order per row (a bit-exact reference must follow it):
//   t_k = tree sum of the L products of iteration k (pairwise, see
//         fp32_add_tree); acc = t_0 + 0, then acc = t_k + acc.
//
// Timing: each row costs 2 cycles of set-up (row-length read) plus
// L * max(1, ceil(len/L)) cycles, when the streams never run dry. A row is
// only started when the output FIFO can take its result, so the arithmetic
// pipeline never stalls. done is high while idle with the output FIFO empty.
module spmv_core
  import fp32_pkg::*;
#(
  parameter int L         = 4,
  parameter int MUL_LAT   = 4,
  parameter int ADD_LAT   = 4,
  parameter int ROW_DEPTH = 10000,
  parameter int X_DEPTH   = 40000,
  parameter int OUT_DEPTH = 8,
  localparam int RAW = (ROW_DEPTH > 1) ? $clog2(ROW_DEPTH) : 1,
  localparam int XAW = (X_DEPTH > 1) ? $clog2(X_DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    nrows,
  output logic           done,
  // row-length local memory (rows_size_local), 1-cycle read
  output logic [RAW-1:0] len_raddr,
  input  logic [31:0]    len_rdata,
  // local copy of x (x_local), 1-cycle read
  output logic [XAW-1:0] x_raddr,
  input  fp32_t          x_rdata,
  // input streams
  input  logic           col_valid,
  output logic           col_ready,
  input  logic [31:0]    col_data,
  input  logic           val_valid,
  output logic           val_ready,
  input  fp32_t          val_data,
  // output stream
  output logic           y_valid,
  input  logic           y_ready,
  output fp32_t          y_data
);
  localparam int TREE_LAT = ((L > 1) ? $clog2(L) : 0) * ADD_LAT;
  localparam int KW       = (L > 1) ? $clog2(L) : 1;
  localparam int OCW      = $clog2(OUT_DEPTH) + 1;

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_LEN, S_GATHER, S_DRAIN} state_t;
  state_t state;

  logic [31:0]   row, remaining;
  logic [KW-1:0] k;
  logic          first;
  logic [OCW:0]  inflight;
  logic [OCW-1:0] out_count;

  // gather stage
  logic need, take, pop, last_slot, row_end;
  assign need      = (remaining != 0);
  assign pop       = (state == S_GATHER) && need && col_valid && val_valid;
  assign take      = (state == S_GATHER) && (!need || (col_valid && val_valid));
  assign last_slot = (k == KW'(L - 1));
  assign row_end   = take && last_slot && (remaining - (need ? 1 : 0) == 0);
  assign col_ready = pop;
  assign val_ready = pop;
  assign x_raddr   = XAW'(col_data);
  assign len_raddr = RAW'(row);
  assign done      = (state == S_IDLE) && !y_valid;

  logic result_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      row       <= '0;
      remaining <= '0;
      k         <= '0;
      first     <= 1'b0;
      inflight  <= '0;
    end else begin
      inflight <= inflight + (OCW+1)'(state == S_LEN) - (OCW+1)'(result_push);
      unique case (state)
        S_IDLE:
          if (start) begin
            row   <= '0;
            state <= (nrows == 0) ? S_IDLE : S_ROW;
          end
        S_ROW:   // row length address is presented; wait for room
          if (32'(inflight) + 32'(out_count) < OUT_DEPTH) state <= S_LEN;
        S_LEN: begin
          remaining <= len_rdata;
          k         <= '0;
          first     <= 1'b1;
          state     <= S_GATHER;
        end
        S_GATHER:
          if (take) begin
            if (need) remaining <= remaining - 1;
            k <= last_slot ? '0 : k + 1'b1;
            if (last_slot) first <= 1'b0;
            if (row_end) begin
              row   <= row + 1;
              state <= (row + 1 == nrows) ? S_DRAIN : S_ROW;
            end
          end
        S_DRAIN:
          if (inflight == 0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // fill stage: x data arrives one cycle after the lookup
  logic          fill_v, fill_pad, fill_first, fill_last, fill_iter_end;
  logic [KW-1:0] fill_k;
  fp32_t         fill_val;
  fp32_t         a_buf [L];
  fp32_t         x_buf [L];
  logic          issue_v, issue_first, issue_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_v        <= 1'b0;
      fill_pad      <= 1'b0;
      fill_first    <= 1'b0;
      fill_last     <= 1'b0;
      fill_iter_end <= 1'b0;
      fill_k        <= '0;
      fill_val      <= '0;
      issue_v       <= 1'b0;
      issue_first   <= 1'b0;
      issue_last    <= 1'b0;
      for (int i = 0; i < L; i++) begin
        a_buf[i] <= '0;
        x_buf[i] <= '0;
      end
    end else begin
      fill_v        <= take;
      fill_pad      <= !need;
      fill_k        <= k;
      fill_val      <= val_data;
      fill_first    <= first;
      fill_last     <= row_end;
      fill_iter_end <= last_slot;
      if (fill_v) begin
        a_buf[fill_k] <= fill_pad ? FP32_ZERO : fill_val;
        x_buf[fill_k] <= fill_pad ? FP32_ZERO : x_rdata;
      end
      issue_v     <= fill_v && fill_iter_end;
      issue_first <= fill_first;
      issue_last  <= fill_last;
    end
  end

  // L parallel multipliers
  fp32_t prod   [L];
  logic  prod_v [L];
  for (genvar i = 0; i < L; i++) begin : g_mul
    fp32_mul #(.LAT(MUL_LAT)) u_mul (
      .clk, .rst_n,
      .in_valid (issue_v),
      .a        (a_buf[i]),
      .b        (x_buf[i]),
      .out_valid(prod_v[i]),
      .y        (prod[i])
    );
  end

  // adder tree over the L products
  logic  tree_v;
  fp32_t tree_sum;
  fp32_add_tree #(.N(L), .LAT(ADD_LAT)) u_tree (
    .clk, .rst_n,
    .in_valid (prod_v[0]),
    .x        (prod),
    .out_valid(tree_v),
    .sum      (tree_sum)
  );

  logic [1:0] tree_flags;   // {first, last} aligned with tree_v
  pipe_delay #(.W(2), .LAT(MUL_LAT + TREE_LAT)) u_flags (
    .clk, .rst_n, .d({issue_first, issue_last}), .q(tree_flags)
  );

  // row accumulator, with forwarding of a result that returns this cycle
  logic  acc_v, acc_last;
  fp32_t acc_y, acc_q, acc_b;
  assign acc_b = tree_flags[1] ? FP32_ZERO : (acc_v ? acc_y : acc_q);

  fp32_add #(.LAT(ADD_LAT)) u_acc (
    .clk, .rst_n,
    .in_valid (tree_v),
    .a        (tree_sum),
    .b        (acc_b),
    .out_valid(acc_v),
    .y        (acc_y)
  );
  pipe_delay #(.W(1), .LAT(ADD_LAT)) u_last (
    .clk, .rst_n, .d(tree_flags[0]), .q(acc_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc_q <= FP32_ZERO;
    else if (acc_v) acc_q <= acc_y;
  end

  assign result_push = acc_v && acc_last;

  logic out_in_ready;
  stream_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid (result_push),
    .in_ready (out_in_ready),
    .in_data  (acc_y),
    .out_valid(y_valid),
    .out_ready(y_ready),
    .out_data (y_data),
    .count    (out_count)
  );

  initial assert (ADD_LAT <= L)
    else $error("spmv_core: the accumulator needs ADD_LAT <= L (II = L)");
  a_push_room: assert property (@(posedge clk) disable iff (!rst_n)
                                result_push |-> out_in_ready);
  a_col_range: assert property (@(posedge clk) disable iff (!rst_n)
                                pop |-> col_data < X_DEPTH);
endmodule

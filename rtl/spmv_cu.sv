// spmv_cu: one compute unit of the streaming SPMV kernel, i.e. one copy of
// the dataflow region, which handles a contiguous block of rows.
//
// Stage 1 reads the row lengths ("Read rows") and the whole vector x
// ("Read x") from global memory into two local memories (rows_size_local and
// x_local). Stage 2 then runs four functions concurrently, linked by FIFO
// streams: "Read cols" fills colind_stream, "Read vals" fills vals_stream,
// the compute function (spmv_core) consumes both together with the local
// memories, and "Write y" drains the result stream to global memory. Stage 2
// waits for stage 1 because every nonzero may need any element of x; keeping
// x on chip avoids irregular global-memory reads.
//
// Interface: pulse start with cfg stable; done is high while idle (from the
// cycle after the last y write was accepted). Read ports are numbered as in
// spmv_pkg (rows, x, cols, vals); see mem_reader for the port protocol.
module spmv_cu
  import fp32_pkg::*;
  import spmv_pkg::*;
#(
  parameter int L          = 4,
  parameter int MUL_LAT    = 4,
  parameter int ADD_LAT    = 4,
  parameter int ROW_DEPTH  = 10000,
  parameter int X_DEPTH    = 40000,
  parameter int FIFO_DEPTH = 16,
  localparam int RAW = (ROW_DEPTH > 1) ? $clog2(ROW_DEPTH) : 1,
  localparam int XAW = (X_DEPTH > 1) ? $clog2(X_DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  spmv_cfg_t               cfg,
  output logic                    done,
  output logic [NPORTS-1:0]       rd_req_valid,
  input  logic [NPORTS-1:0]       rd_req_ready,
  output logic [NPORTS-1:0][31:0] rd_req_addr,
  input  logic [NPORTS-1:0]       rd_resp_valid,
  input  logic [NPORTS-1:0][31:0] rd_resp_data,
  output logic                    wr_valid,
  input  logic                    wr_ready,
  output logic [31:0]             wr_addr,
  output logic [31:0]             wr_data
);
  typedef enum logic [2:0] {C_IDLE, C_STAGE1, C_STAGE2_GO, C_STAGE2} cstate_t;
  cstate_t state;

  logic start1, start2;
  assign start1 = (state == C_IDLE) && start;
  assign start2 = (state == C_STAGE2_GO);
  assign done   = (state == C_IDLE);

  // ---------------- readers ----------------
  logic [NPORTS-1:0]       rdr_done, s_valid, s_ready;
  logic [NPORTS-1:0][31:0] s_data, s_base, s_count;
  logic [NPORTS-1:0]       s_start;

  assign s_base[PORT_ROWS]  = cfg.base_rows;
  assign s_base[PORT_X]     = cfg.base_x;
  assign s_base[PORT_COLS]  = cfg.base_cols;
  assign s_base[PORT_VALS]  = cfg.base_vals;
  assign s_count[PORT_ROWS] = cfg.nrows;
  assign s_count[PORT_X]    = cfg.ncols;
  assign s_count[PORT_COLS] = cfg.nnz;
  assign s_count[PORT_VALS] = cfg.nnz;
  assign s_start[PORT_ROWS] = start1;
  assign s_start[PORT_X]    = start1;
  assign s_start[PORT_COLS] = start2;
  assign s_start[PORT_VALS] = start2;

  for (genvar p = 0; p < NPORTS; p++) begin : g_rd
    mem_reader #(.DW(32), .AW(32), .DEPTH(FIFO_DEPTH)) u_rd (
      .clk, .rst_n,
      .start        (s_start[p]),
      .base         (s_base[p]),
      .count        (s_count[p]),
      .done         (rdr_done[p]),
      .rd_req_valid (rd_req_valid[p]),
      .rd_req_ready (rd_req_ready[p]),
      .rd_req_addr  (rd_req_addr[p]),
      .rd_resp_valid(rd_resp_valid[p]),
      .rd_resp_data (rd_resp_data[p]),
      .out_valid    (s_valid[p]),
      .out_ready    (s_ready[p]),
      .out_data     (s_data[p])
    );
  end

  // ---------------- stage 1: fill the local memories ----------------
  logic [31:0] rows_loaded, x_loaded;
  logic        len_we, x_we;
  assign s_ready[PORT_ROWS] = (state == C_STAGE1) && (rows_loaded != cfg.nrows);
  assign s_ready[PORT_X]    = (state == C_STAGE1) && (x_loaded != cfg.ncols);
  assign len_we = s_valid[PORT_ROWS] && s_ready[PORT_ROWS];
  assign x_we   = s_valid[PORT_X] && s_ready[PORT_X];

  logic [RAW-1:0] len_raddr;
  logic [31:0]    len_rdata;
  logic [XAW-1:0] x_raddr;
  fp32_t          x_rdata;

  local_ram #(.DW(32), .DEPTH(ROW_DEPTH)) u_rows_size_local (
    .clk, .we(len_we), .waddr(RAW'(rows_loaded)), .wdata(s_data[PORT_ROWS]),
    .raddr(len_raddr), .rdata(len_rdata)
  );
  local_ram #(.DW(32), .DEPTH(X_DEPTH)) u_x_local (
    .clk, .we(x_we), .waddr(XAW'(x_loaded)), .wdata(s_data[PORT_X]),
    .raddr(x_raddr), .rdata(x_rdata)
  );

  // ---------------- stage 2: stream, compute, write back ----------------
  logic  core_done, wr_done;
  logic  y_valid, y_ready;
  fp32_t y_data;

  spmv_core #(
    .L(L), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT),
    .ROW_DEPTH(ROW_DEPTH), .X_DEPTH(X_DEPTH)
  ) u_core (
    .clk, .rst_n,
    .start    (start2),
    .nrows    (cfg.nrows),
    .done     (core_done),
    .len_raddr(len_raddr),
    .len_rdata(len_rdata),
    .x_raddr  (x_raddr),
    .x_rdata  (x_rdata),
    .col_valid(s_valid[PORT_COLS]),
    .col_ready(s_ready[PORT_COLS]),
    .col_data (s_data[PORT_COLS]),
    .val_valid(s_valid[PORT_VALS]),
    .val_ready(s_ready[PORT_VALS]),
    .val_data (s_data[PORT_VALS]),
    .y_valid, .y_ready, .y_data
  );

  mem_writer #(.DW(32), .AW(32)) u_write_y (
    .clk, .rst_n,
    .start   (start2),
    .base    (cfg.base_y),
    .count   (cfg.nrows),
    .done    (wr_done),
    .in_valid(y_valid),
    .in_ready(y_ready),
    .in_data (y_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      rows_loaded <= '0;
      x_loaded    <= '0;
    end else begin
      if (len_we) rows_loaded <= rows_loaded + 1;
      if (x_we)   x_loaded    <= x_loaded + 1;
      unique case (state)
        C_IDLE:
          if (start) begin
            rows_loaded <= '0;
            x_loaded    <= '0;
            state       <= C_STAGE1;
          end
        C_STAGE1:
          if (rows_loaded == cfg.nrows && x_loaded == cfg.ncols &&
              rdr_done[PORT_ROWS] && rdr_done[PORT_X])
            state <= C_STAGE2_GO;
        C_STAGE2_GO:
          state <= C_STAGE2;
        C_STAGE2:
          if (core_done && wr_done && rdr_done[PORT_COLS] && rdr_done[PORT_VALS])
            state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  a_rows_fit: assert property (@(posedge clk) disable iff (!rst_n)
                               start1 |-> cfg.nrows <= ROW_DEPTH && cfg.ncols <= X_DEPTH);
endmodule

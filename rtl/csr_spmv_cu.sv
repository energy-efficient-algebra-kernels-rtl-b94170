// csr_spmv_cu: one compute unit of the row-per-work-item ("scalar") CSR
// SPMV kernel for the embedded FPGA. The unit takes the work-groups
// g = CU_ID, CU_ID + NCU, CU_ID + 2*NCU, ... of BS consecutive rows each.
// For a work-group it first copies the BS+1 row pointers it needs from
// global into local memory, UF words per memory beat (the unrolled copy
// loop), and waits for the whole copy (barrier). Then the work-items (rows)
// run VC at a time, one per vector lane (csr_row_lane), in lockstep: the VC
// lanes start together on rows wi .. wi+VC-1 of the group, each walks its
// own nonzeros j = row_ptr[i] .. row_ptr[i+1]-1 with its own column, value
// and x ports, and the next VC rows start when every lane is done (the
// longest row of the step sets its length). Lanes past the end of the group
// get an empty row and write nothing. The finished sums are then written to
// y one per cycle through the unit's single y port.
// Each row's sum is accumulated in j order from +0, as in the serial
// algorithm, so the result does not depend on VC, BS, NCU or UF.
//
// Ports: rp (row pointer, UF words per beat) and the col, val and x read
// ports (one of each per lane, flattened [VC]) use the in-order
// request/response protocol of mem_reader; y is a write port. The
// row-pointer array is read in whole UF-word beats, so it must be readable
// up to UF-1 words past row_ptr[n]. done is high while idle.
// BS, UF, NCU and VC are the kernel's tuning parameters; the defaults are
// the configuration chosen for the smallest evaluated matrices. Lockstep
// lanes with private ports and the sequential y write are this design's own
// choices.
module csr_spmv_cu
  import fp32_pkg::*;
#(
  parameter int BS         = 16,
  parameter int UF         = 2,
  parameter int VC         = 1,
  parameter int NCU        = 2,
  parameter int CU_ID      = 0,
  parameter int MUL_LAT    = 4,
  parameter int ADD_LAT    = 4,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          nrows,
  input  logic [31:0]          base_rp,
  input  logic [31:0]          base_col,
  input  logic [31:0]          base_val,
  input  logic [31:0]          base_x,
  input  logic [31:0]          base_y,
  output logic                 done,
  // row pointer read port (UF words per beat)
  output logic                 rp_req_valid,
  input  logic                 rp_req_ready,
  output logic [31:0]          rp_req_addr,
  input  logic                 rp_resp_valid,
  input  logic [UF*32-1:0]     rp_resp_data,
  // column index read ports, one per lane
  output logic [VC-1:0]        col_req_valid,
  input  logic [VC-1:0]        col_req_ready,
  output logic [VC-1:0][31:0]  col_req_addr,
  input  logic [VC-1:0]        col_resp_valid,
  input  logic [VC-1:0][31:0]  col_resp_data,
  // value read ports, one per lane
  output logic [VC-1:0]        val_req_valid,
  input  logic [VC-1:0]        val_req_ready,
  output logic [VC-1:0][31:0]  val_req_addr,
  input  logic [VC-1:0]        val_resp_valid,
  input  logic [VC-1:0][31:0]  val_resp_data,
  // x read ports (gather), one per lane
  output logic [VC-1:0]        x_req_valid,
  input  logic [VC-1:0]        x_req_ready,
  output logic [VC-1:0][31:0]  x_req_addr,
  input  logic [VC-1:0]        x_resp_valid,
  input  logic [VC-1:0][31:0]  x_resp_data,
  // y write port
  output logic                 y_wr_valid,
  input  logic                 y_wr_ready,
  output logic [31:0]          y_wr_addr,
  output logic [31:0]          y_wr_data
);
  localparam int RPB = (BS + 1 + UF - 1) / UF;        // row-pointer beats
  localparam int RPW = RPB * UF;
  localparam int LW  = (VC > 1) ? $clog2(VC) : 1;

  typedef enum logic [2:0] {W_IDLE, W_GROUP, W_RPLOAD, W_ROW, W_ELEMS, W_WRITE} wstate_t;
  wstate_t state;

  logic [31:0]   grp, r0, rows_in_grp, wi;
  logic [31:0]   rp_iss, rp_rcv;
  logic [31:0]   rp_mem [RPW];     // local copy of the work-group's row pointers
  logic [LW-1:0] wl;               // lane whose result is being written

  assign done = (state == W_IDLE);

  // ---------------- row pointer copy ----------------
  assign rp_req_valid = (state == W_RPLOAD) && (rp_iss != RPB);
  assign rp_req_addr  = base_rp + r0 + rp_iss * UF;

  // ---------------- vector lanes ----------------
  logic [VC-1:0] lane_done;
  fp32_t         lane_sum [VC];

  for (genvar l = 0; l < VC; l++) begin : g_lane
    logic [31:0] row_begin, row_len;
    logic        live;
    assign live      = (wi + 32'(l) < rows_in_grp);
    assign row_begin = rp_mem[(int'(wi) + l) % RPW];
    assign row_len   = live ? rp_mem[(int'(wi) + l + 1) % RPW] - row_begin : '0;

    csr_row_lane #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .FIFO_DEPTH(FIFO_DEPTH)) u_lane (
      .clk, .rst_n, .start(state == W_ROW), .base_col, .base_val, .base_x,
      .row_begin, .row_len, .done(lane_done[l]), .result(lane_sum[l]),
      .col_req_valid(col_req_valid[l]), .col_req_ready(col_req_ready[l]),
      .col_req_addr(col_req_addr[l]), .col_resp_valid(col_resp_valid[l]),
      .col_resp_data(col_resp_data[l]),
      .val_req_valid(val_req_valid[l]), .val_req_ready(val_req_ready[l]),
      .val_req_addr(val_req_addr[l]), .val_resp_valid(val_resp_valid[l]),
      .val_resp_data(val_resp_data[l]),
      .x_req_valid(x_req_valid[l]), .x_req_ready(x_req_ready[l]),
      .x_req_addr(x_req_addr[l]), .x_resp_valid(x_resp_valid[l]),
      .x_resp_data(x_resp_data[l])
    );
  end

  // ---------------- y write ----------------
  logic last_wr;
  assign y_wr_valid = (state == W_WRITE);
  assign y_wr_addr  = base_y + r0 + wi + 32'(wl);
  assign y_wr_data  = lane_sum[int'(wl) % VC];
  assign last_wr    = (32'(wl) + 1 == VC) || (wi + 32'(wl) + 1 == rows_in_grp);

  // ---------------- work-group / work-item sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W_IDLE;
      grp <= '0; r0 <= '0; rows_in_grp <= '0; wi <= '0; wl <= '0;
      rp_iss <= '0; rp_rcv <= '0;
      for (int i = 0; i < RPW; i++) rp_mem[i] <= '0;
    end else begin
      if (rp_req_valid && rp_req_ready) rp_iss <= rp_iss + 1;
      if (rp_resp_valid) begin
        for (int u = 0; u < UF; u++)
          rp_mem[(int'(rp_rcv) * UF + u) % RPW] <= rp_resp_data[u*32 +: 32];
        rp_rcv <= rp_rcv + 1;
      end

      unique case (state)
        W_IDLE:
          if (start) begin
            grp   <= 32'(CU_ID);
            state <= W_GROUP;
          end
        W_GROUP:
          if (grp * BS >= nrows) state <= W_IDLE;
          else begin
            r0          <= grp * BS;
            rows_in_grp <= (nrows - grp * BS < BS) ? nrows - grp * BS : BS;
            rp_iss      <= '0;
            rp_rcv      <= '0;
            state       <= W_RPLOAD;
          end
        W_RPLOAD:   // local copy complete (barrier)
          if (rp_rcv == RPB) begin
            wi    <= '0;
            state <= W_ROW;
          end
        W_ROW:      // the lanes start this cycle with their rows' ranges
          state <= W_ELEMS;
        W_ELEMS:
          if (&lane_done) begin
            wl    <= '0;
            state <= W_WRITE;
          end
        W_WRITE:
          if (y_wr_ready) begin
            if (!last_wr) wl <= wl + 1'b1;
            else if (wi + VC >= rows_in_grp) begin
              grp   <= grp + NCU;
              state <= W_GROUP;
            end else begin
              wi    <= wi + VC;
              state <= W_ROW;
            end
          end
        default: state <= W_IDLE;
      endcase
    end
  end
endmodule

// spmv_pkg: types and constants shared by the streaming SPMV kernel.
// Each compute unit of the kernel owns four global-memory read ports, one
// per input array, and one write port for the result.
package spmv_pkg;

  // read-port numbering inside a compute unit
  localparam int PORT_ROWS = 0;   // row lengths (nonzeros per row)
  localparam int PORT_X    = 1;   // dense vector x
  localparam int PORT_COLS = 2;   // column index of each nonzero
  localparam int PORT_VALS = 3;   // value of each nonzero
  localparam int NPORTS    = 4;

  // Work assigned to one compute unit by the host. All addresses are word
  // addresses (32-bit words) in the unit's memory space. The unit computes
  // y[i] for its nrows consecutive rows; cols/vals hold exactly its nnz
  // nonzeros in row order; x is the whole vector (ncols words).
  typedef struct packed {
    logic [31:0] nrows;
    logic [31:0] ncols;
    logic [31:0] nnz;
    logic [31:0] base_rows;
    logic [31:0] base_x;
    logic [31:0] base_cols;
    logic [31:0] base_vals;
    logic [31:0] base_y;
  } spmv_cfg_t;

endpackage

// gmem_model: behavioural global memory for the testbenches (not
// synthesizable). NRD read ports and NWR write ports share one array of
// 32-bit words. A beat is WPB consecutive words starting at the word address
// given with the request. Read requests are accepted when req_valid &&
// req_ready and answered, in order, LAT cycles later with a one-cycle
// resp_valid. With STALL = 1 every ready is low on random cycles (about one
// in four), which exercises the kernels' flow control. The testbench fills
// and inspects mem[] hierarchically.
module gmem_model #(
  parameter int NRD   = 1,
  parameter int NWR   = 1,
  parameter int WPB   = 1,
  parameter int DEPTH = 4096,
  parameter int LAT   = 3,
  parameter bit STALL = 0
) (
  input  logic                         clk,
  input  logic [NRD-1:0]               rd_req_valid,
  output logic [NRD-1:0]               rd_req_ready,
  input  logic [NRD-1:0][31:0]         rd_req_addr,
  output logic [NRD-1:0]               rd_resp_valid,
  output logic [NRD-1:0][WPB*32-1:0]   rd_resp_data,
  input  logic [NWR-1:0]               wr_valid,
  output logic [NWR-1:0]               wr_ready,
  input  logic [NWR-1:0][31:0]         wr_addr,
  input  logic [NWR-1:0][WPB*32-1:0]   wr_data
);
  logic [31:0] mem [DEPTH];
  logic        pv [NRD][LAT];
  logic [31:0] pa [NRD][LAT];
  int          reads = 0, writes = 0, stalls = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int p = 0; p < NRD; p++)
      for (int s = 0; s < LAT; s++) begin
        pv[p][s] = 1'b0;
        pa[p][s] = '0;
      end
    rd_req_ready = '1;
    wr_ready     = '1;
  end

  always @(posedge clk) begin
    for (int p = 0; p < NRD; p++) begin
      pv[p][0] <= rd_req_valid[p] && rd_req_ready[p];
      pa[p][0] <= rd_req_addr[p];
      for (int s = 1; s < LAT; s++) begin
        pv[p][s] <= pv[p][s-1];
        pa[p][s] <= pa[p][s-1];
      end
      if (rd_req_valid[p] && rd_req_ready[p]) reads++;
      if (rd_req_valid[p] && !rd_req_ready[p]) stalls++;
    end
    for (int w = 0; w < NWR; w++)
      if (wr_valid[w] && wr_ready[w]) begin
        for (int i = 0; i < WPB; i++)
          mem[(wr_addr[w] + 32'(i)) % DEPTH] <= wr_data[w][i*32 +: 32];
        writes++;
      end
    for (int p = 0; p < NRD; p++) rd_req_ready[p] <= STALL ? ($urandom_range(3, 0) != 0) : 1'b1;
    for (int w = 0; w < NWR; w++) wr_ready[w]     <= STALL ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_resp_valid[p] = pv[p][LAT-1];
      for (int i = 0; i < WPB; i++)
        rd_resp_data[p][i*32 +: 32] = mem[(pa[p][LAT-1] + 32'(i)) % DEPTH];
    end
  end
endmodule

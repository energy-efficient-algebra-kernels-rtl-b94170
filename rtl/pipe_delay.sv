// pipe_delay: a W-bit shift register of LAT stages (LAT = 0 is a wire).
// Used to keep side-band data (tags, flags, operands) aligned with the
// pipelined floating-point units. No stall input: data advances every cycle.
module pipe_delay #(
  parameter int W   = 32,
  parameter int LAT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [LAT];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < LAT; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[LAT-1];
  end
endmodule

// din_sync: brings asynchronous digital inputs into the simulation clock
// domain.
//
// The gate signals of the controller under test arrive on digital input
// lines that are not related to the FPGA clock. Each bit passes through
// STAGES flip-flops before the model reads it, which delays it by STAGES
// clocks (50 ns at 40 MHz with the default 2) and keeps metastable values out
// of the model. The synchronizer is this design's choice: the published
// design reads the lines through the I/O module's own interface.
module din_sync #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_async,
  output logic [WIDTH-1:0] d_sync
);
  logic [WIDTH-1:0] sr [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) sr[i] <= '0;
    end else begin
      sr[0] <= d_async;
      for (int i = 1; i < int'(STAGES); i++) sr[i] <= sr[i-1];
    end
  end
  assign d_sync = sr[STAGES-1];
endmodule

// loop_rate_meter: reports how many clock ticks one model iteration took.
//
// A free-running 32-bit tick counter is read at the start of every iteration
// (iter pulse); the difference from the reading of the previous iteration is
// the loop rate, in ticks. This is the measurement the simulation uses to
// find its real time step h (6 ticks, 150 ns at 40 MHz, for the buck model).
// The counters wrap around, so the difference stays right across a wrap.
// loop_rate and rate_valid update in the cycle after an iter pulse;
// rate_valid rises once two iterations have been seen. Interface and width
// (unsigned 32-bit result) follow the published measurement; the valid flag
// is this design's addition.
module loop_rate_meter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        iter,        // an iteration starts
  output logic [31:0] loop_rate,   // ticks between the last two iterations
  output logic        rate_valid
);
  logic [31:0] ticks, last;
  logic        seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ticks      <= '0;
      last       <= '0;
      seen       <= 1'b0;
      loop_rate  <= '0;
      rate_valid <= 1'b0;
    end else begin
      ticks <= ticks + 1'b1;
      if (iter) begin
        last <= ticks;
        seen <= 1'b1;
        if (seen) begin
          loop_rate  <= ticks - last;
          rate_valid <= 1'b1;
        end
      end
    end
  end
endmodule

// hil_step_timer: issues the start pulse of one model time step every
// STEP_CYCLES clocks while run is high.
//
// The simulated time step h only matches real time if the model is iterated
// at a fixed clock count, so every converter loop is paced by one of these.
// The first pulse comes in the first cycle run is high; while run is low the
// counter rests at zero. Interface: run in, go out (one-cycle pulse).
module hil_step_timer #(
  parameter int unsigned STEP_CYCLES = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic go
);
  localparam int unsigned CW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;
  logic [CW-1:0] cnt;

  assign go = run && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                cnt <= '0;
    else if (!run)                             cnt <= '0;
    else if (cnt == CW'(STEP_CYCLES - 1))      cnt <= '0;
    else                                       cnt <= cnt + 1'b1;
  end
endmodule

// pwm_gen: counter-based PWM generator that stands in for the controller.
//
// A 16-bit counter advances one step per clock and wraps to zero after
// period-1, so the switching period is `period` clock ticks (1000 ticks at
// 40 MHz give the 40 kHz switching frequency of the buck design). The output
// is high while the count is below `duty`: duty = period/2 gives 50 %.
// load copies counter_init into the counter, which sets the phase of the
// carrier. The output is registered and changes one clock after the count it
// belongs to. Duty, period and the starting count as inputs follow the
// published front panel; the comparison and wrap rule are this design's.
module pwm_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] counter_init,
  input  logic [15:0] duty,        // on-time in ticks
  input  logic [15:0] period,      // switching period in ticks
  output logic        pwm,
  output logic [15:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      pwm   <= 1'b0;
    end else begin
      if (load)                                 count <= counter_init;
      else if ({16'd0, count} + 32'd1 >= {16'd0, period}) count <= '0;
      else                                      count <= count + 1'b1;
      pwm <= (count < duty);
    end
  end
endmodule

// buck_hil_core: the real-time iteration loop of the buck converter model.
//
// The state registers hold iL(k) and vC(k). load_init copies the initial
// values into them (the "set initial conditions" step of the simulation
// flow). While run is high a step timer starts one step of buck_model_pipe
// every STEP_CYCLES clocks; when the step leaves the pipeline its iL(k+1) and
// vC(k+1) are written back into the state registers and all results of the
// step (vo(k), io(k), ic(k), iL(k+1), vC(k+1)) are latched on res for the
// DAC and the host. step_done pulses for one cycle as soon as state and res
// hold the new values; go pulses when a step starts. The switch command pwm is sampled when a step starts.
//
// With the default STEP_CYCLES = 6 a step starts in the cycle right after the
// previous one was written back: 6 clocks, 150 ns at 40 MHz, which is the
// simulation time step h the constants h/L and h/C must be computed for.
// STEP_CYCLES may be raised to slow the step down; it may not go below 6,
// which an elaboration check enforces. load_init has priority over a
// write-back; it should be used with run low.
module buck_hil_core
  import hil_fxp_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        load_init,
  input  buck_state_t init,
  input  logic        pwm,
  input  buck_param_t prm,
  output buck_state_t state,      // iL(k), vC(k)
  output buck_out_t   res,        // results of the last finished step
  output buck_mode_t  res_mode,   // switching state of the last step
  output logic        go,         // a step starts
  output logic        step_done   // a step was written back
);
  localparam int unsigned PIPE_CYCLES = 6;

  if (STEP_CYCLES < PIPE_CYCLES) begin : g_step_check
    $error("buck_hil_core: STEP_CYCLES below the 6-cycle loop latency");
  end

  logic       out_valid;
  buck_out_t  out;
  buck_mode_t out_mode;

  hil_step_timer #(.STEP_CYCLES(STEP_CYCLES)) u_timer (
    .clk, .rst_n, .run, .go
  );

  buck_model_pipe u_pipe (
    .clk, .rst_n,
    .in_valid (go),
    .in_state (state),
    .pwm,
    .prm,
    .out_valid,
    .out,
    .out_mode
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      res       <= '0;
      res_mode  <= BUCK_ON;
      step_done <= 1'b0;
    end else begin
      step_done <= 1'b0;
      if (load_init) begin
        state <= init;
      end else if (out_valid) begin
        state.i_l <= out.i_l_next;
        state.v_c <= out.v_c_next;
        res       <= out;
        res_mode  <= out_mode;
        step_done <= 1'b1;
      end
    end
  end

  // A step may only start once the previous one has been written back.
  property p_no_overlap;
    @(posedge clk) out_valid |-> !go;
  endproperty
  a_no_overlap: assert property (p_no_overlap);
endmodule

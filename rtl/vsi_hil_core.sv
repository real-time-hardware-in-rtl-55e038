// vsi_hil_core: the real-time iteration loop of the three-phase VSI model.
//
// The state registers hold the three phase currents. load_init copies the
// initial currents in. While run is high a step timer starts one step of
// vsi_model_pipe every STEP_CYCLES clocks, with the switch commands sampled at
// that moment; 4 clocks later the new currents are written back, latched with
// the phase voltages of the step, and step_done pulses once for a cycle.
// The default of 30 clocks is a 750 ns time step at 40 MHz, the step the
// published VSI simulation runs at; h/L must be computed for it. The datapath
// itself needs only 4 clocks, so STEP_CYCLES may go down to 4 (checked at
// elaboration) for a shorter step.
module vsi_hil_core
  import hil_fxp_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 30
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       load_init,
  input  vsi_state_t init,
  input  logic [2:0] sw,          // {s3, s2, s1}
  input  vsi_param_t prm,
  output vsi_state_t state,       // i_a, i_b, i_c
  output s32_10_t    v_ph [3],    // phase voltages of the last step
  output logic [2:0] last_sw,     // switch vector of the last step
  output logic       go,
  output logic       step_done
);
  localparam int unsigned PIPE_CYCLES = 4;

  if (STEP_CYCLES < PIPE_CYCLES) begin : g_step_check
    $error("vsi_hil_core: STEP_CYCLES below the 4-cycle loop latency");
  end

  logic       out_valid;
  vsi_state_t out_state;
  s32_10_t    out_v [3];
  logic [2:0] sw_q [3];

  hil_step_timer #(.STEP_CYCLES(STEP_CYCLES)) u_timer (
    .clk, .rst_n, .run, .go
  );

  vsi_model_pipe u_pipe (
    .clk, .rst_n,
    .in_valid  (go),
    .in_state  (state),
    .sw,
    .prm,
    .out_valid,
    .out_state,
    .v_ph      (out_v)
  );

  always_ff @(posedge clk) begin
    sw_q[0] <= sw;
    sw_q[1] <= sw_q[0];
    sw_q[2] <= sw_q[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      v_ph      <= '{default: '0};
      last_sw   <= '0;
      step_done <= 1'b0;
    end else begin
      step_done <= 1'b0;
      if (load_init) begin
        state <= init;
      end else if (out_valid) begin
        state     <= out_state;
        v_ph      <= out_v;
        last_sw   <= sw_q[2];
        step_done <= 1'b1;
      end
    end
  end

  property p_no_overlap;
    @(posedge clk) out_valid |-> !go;
  endproperty
  a_no_overlap: assert property (p_no_overlap);
endmodule

// hil_top: FPGA side of a real-time hardware-in-the-loop simulator for power
// converters, with two independent converter models side by side.
//
// Buck converter. buck_hil_core iterates the fixed-point Euler model of the
// buck converter every 6 clocks (150 ns at 40 MHz). Its switch command comes
// either from the on-chip PWM generator (pwm_src_ext = 0), which stands in
// for a controller, or from an external digital input (pwm_src_ext = 1)
// brought in through a two-flop synchronizer; the on-chip PWM is also driven
// out on pwm_out so it can be looped back or watched. A loop-rate meter
// reports the clocks per iteration, and dac_output writes the output voltage
// (gain 0.5) and the inductor current (gain 1) to the analog outputs every
// sample time.
//
// Three-phase VSI. vsi_hil_core iterates the inverter model with RL load
// every 30 clocks (750 ns); the three upper-switch commands come from
// external digital inputs through synchronizers. It has its own loop-rate
// meter and writes phase currents i_a and i_b to two analog outputs
// (gain 1, this design's choice).
//
// Everything the host sets (converter constants, initial values, PWM duty,
// period and starting count, DAC sample time, run and load commands) enters
// as ports and must be held steady while the model runs; everything the host
// reads leaves as ports. Analog outputs are fixed-point values plus a
// strobe for the analog-output module, which converts them to volts.
module hil_top
  import hil_fxp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  // ---- buck converter --------------------------------------------------
  input  buck_param_t buck_prm,
  input  buck_state_t buck_init,
  input  logic        buck_load_init,
  input  logic        buck_run,
  input  logic        pwm_load,
  input  logic [15:0] pwm_counter_init,
  input  logic [15:0] pwm_duty,
  input  logic [15:0] pwm_period,
  input  logic        pwm_src_ext,      // 1: switch command from pwm_ext_async
  input  logic        pwm_ext_async,
  input  logic [31:0] buck_sample_time, // DAC sample time, us
  output logic        pwm_out,          // on-chip PWM
  output buck_state_t buck_state,       // iL(k), vC(k)
  output buck_out_t   buck_res,         // iL(k+1), vC(k+1), vo, io, ic
  output buck_mode_t  buck_mode,
  output logic        buck_step_done,
  output logic [31:0] buck_loop_rate,
  output logic        buck_loop_rate_valid,
  output s32_6_t      buck_ao0,         // 0.5 * vo
  output s32_6_t      buck_ao1,         // iL(k+1)
  output logic        buck_ao_strobe,

  // ---- three-phase VSI -------------------------------------------------
  input  vsi_param_t  vsi_prm,
  input  vsi_state_t  vsi_init,
  input  logic        vsi_load_init,
  input  logic        vsi_run,
  input  logic [2:0]  vsi_sw_async,     // {s3, s2, s1}
  input  logic [31:0] vsi_sample_time,  // DAC sample time, us
  output vsi_state_t  vsi_state,
  output s32_10_t     vsi_v_ph [3],
  output logic [2:0]  vsi_last_sw,
  output logic        vsi_step_done,
  output logic [31:0] vsi_loop_rate,
  output logic        vsi_loop_rate_valid,
  output s32_10_t     vsi_ao0,          // i_a
  output s32_10_t     vsi_ao1,          // i_b
  output logic        vsi_ao_strobe
);
  // ---------------- buck converter --------------------------------------
  logic        pwm_ext, pwm_model, buck_go;
  logic [15:0] pwm_count;  // carrier count, not used further

  pwm_gen u_pwm (
    .clk, .rst_n,
    .load         (pwm_load),
    .counter_init (pwm_counter_init),
    .duty         (pwm_duty),
    .period       (pwm_period),
    .pwm          (pwm_out),
    .count        (pwm_count)
  );

  din_sync #(.WIDTH(1)) u_pwm_sync (
    .clk, .rst_n, .d_async (pwm_ext_async), .d_sync (pwm_ext)
  );

  assign pwm_model = pwm_src_ext ? pwm_ext : pwm_out;

  // vo is <+,32,5>; the DAC channel takes <+/-,32,6>.
  s32_6_t buck_vo_ch;
  assign buck_vo_ch = s32_6_t'(fx_fit(wide_t'(buck_res.v_o), F_U32_5, 32, F_S32_6, 1'b1));

  buck_hil_core u_buck (
    .clk, .rst_n,
    .run       (buck_run),
    .load_init (buck_load_init),
    .init      (buck_init),
    .pwm       (pwm_model),
    .prm       (buck_prm),
    .state     (buck_state),
    .res       (buck_res),
    .res_mode  (buck_mode),
    .go        (buck_go),
    .step_done (buck_step_done)
  );

  loop_rate_meter u_buck_rate (
    .clk, .rst_n, .iter (buck_go),
    .loop_rate (buck_loop_rate), .rate_valid (buck_loop_rate_valid)
  );

  dac_output u_buck_dac (
    .clk, .rst_n,
    .sample_time (buck_sample_time),
    .ch0         (buck_vo_ch),
    .ch1         (buck_res.i_l_next),
    .ao0         (buck_ao0),
    .ao1         (buck_ao1),
    .ao_strobe   (buck_ao_strobe)
  );

  // ---------------- three-phase VSI --------------------------------------
  logic [2:0] vsi_sw;
  logic       vsi_go;

  din_sync #(.WIDTH(3)) u_vsi_sync (
    .clk, .rst_n, .d_async (vsi_sw_async), .d_sync (vsi_sw)
  );

  vsi_hil_core u_vsi (
    .clk, .rst_n,
    .run       (vsi_run),
    .load_init (vsi_load_init),
    .init      (vsi_init),
    .sw        (vsi_sw),
    .prm       (vsi_prm),
    .state     (vsi_state),
    .v_ph      (vsi_v_ph),
    .last_sw   (vsi_last_sw),
    .go        (vsi_go),
    .step_done (vsi_step_done)
  );

  loop_rate_meter u_vsi_rate (
    .clk, .rst_n, .iter (vsi_go),
    .loop_rate (vsi_loop_rate), .rate_valid (vsi_loop_rate_valid)
  );

  dac_output #(.FRAC(F_S32_10), .GAIN0(18'h1_0000), .GAIN1(18'h1_0000)) u_vsi_dac (
    .clk, .rst_n,
    .sample_time (vsi_sample_time),
    .ch0         (vsi_state.i_a),
    .ch1         (vsi_state.i_b),
    .ao0         (vsi_ao0),
    .ao1         (vsi_ao1),
    .ao_strobe   (vsi_ao_strobe)
  );
endmodule

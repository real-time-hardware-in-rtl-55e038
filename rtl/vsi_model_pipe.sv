// vsi_model_pipe: one forward-Euler step of the three-phase voltage source
// inverter feeding a star-connected RL load.
//
// The upper-switch commands s = {s1, s2, s3} select one of the eight
// voltage vectors. Each leg puts sx*VDC on its phase against the negative
// DC rail N, and the load neutral sits at the common-mode voltage
// (s1+s2+s3)*VDC/3, so the voltage across phase x is
//   v_xn = (3*sx - (s1+s2+s3)) * VDC/3     (one of 0, +-VDC/3, +-2VDC/3)
// With the phase load voltage v_X = Rx*i_x the step is
//   i_x(k+1) = i_x + h/Lx * (v_xn - Rx*i_x)
// for the three phases in parallel. The switches are ideal and the inductor
// resistance is neglected, as in the published model.
//
// Pipeline (this design's split): cycle 0 forms VDC/3, the switch count and
// the three Rx*i_x products; cycle 1 the phase voltages and the inductor
// voltages; cycle 2 the h/L products; cycle 3 adds them to the currents
// combinationally. out_valid comes 3 clocks after in_valid, so a caller can
// start a step every 4 clocks or slower; a new input may be given every
// clock. Currents and voltages are <+/-,32,10>, h/L <+,32,2>, Rx <+,32,8>
// (this design's formats; truncation and saturation as in hil_fxp_pkg).
module vsi_model_pipe
  import hil_fxp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  vsi_state_t in_state,   // i_a, i_b, i_c at step k
  input  logic [2:0] sw,         // {s3, s2, s1}: 1 = upper switch on
  input  vsi_param_t prm,
  output logic       out_valid,
  output vsi_state_t out_state,  // currents at step k+1
  output s32_10_t    v_ph [3]    // v_an, v_bn, v_cn used for this step
);
  // ---------------- cycle 0 ----------------------------------------------
  s32_10_t i0 [3];
  s32_10_t vr0 [3];
  s32_10_t vdc3_0;
  logic [1:0] n0;

  assign i0[0] = in_state.i_a;
  assign i0[1] = in_state.i_b;
  assign i0[2] = in_state.i_c;
  assign n0    = 2'(sw[0]) + 2'(sw[1]) + 2'(sw[2]);
  assign vdc3_0 = s32_10_t'(fx_fit(wide_t'(prm.v_dc) * wide_t'(ONE_THIRD_U32_0),
                                   F_S32_10 + 32, 32, F_S32_10, 1'b1));
  for (genvar x = 0; x < 3; x++) begin : g_vr
    assign vr0[x] = s32_10_t'(fx_fit(wide_t'(prm.r_load) * wide_t'(i0[x]),
                                     F_U32_8 + F_S32_10, 32, F_S32_10, 1'b1));
  end

  logic       v1, v2, v3;
  s32_10_t    vdc3_1;
  logic [1:0] n1;
  logic [2:0] sw1;
  s32_10_t    i1 [3], vr1 [3];
  s32_10_t    i2 [3], e2 [3], vx2 [3];
  s32_10_t    i3 [3], di3 [3], vx3 [3];

  // ---------------- cycle 1: phase voltage and inductor voltage ---------
  s32_10_t vx1 [3], e1 [3];
  for (genvar x = 0; x < 3; x++) begin : g_v
    logic signed [3:0] mul;
    assign mul    = 4'(sw1[x] ? 3 : 0) - 4'(n1);
    assign vx1[x] = s32_10_t'(fx_fit(wide_t'(mul) * wide_t'(vdc3_1),
                                     F_S32_10, 32, F_S32_10, 1'b1));
    assign e1[x]  = s32_10_t'(fx_fit(wide_t'(vx1[x]) - wide_t'(vr1[x]),
                                     F_S32_10, 32, F_S32_10, 1'b1));
  end

  // ---------------- cycle 2: h/L * inductor voltage ----------------------
  s32_10_t di2 [3];
  for (genvar x = 0; x < 3; x++) begin : g_di
    assign di2[x] = s32_10_t'(fx_fit(wide_t'(prm.h_over_l) * wide_t'(e2[x]),
                                     F_U32_2 + F_S32_10, 32, F_S32_10, 1'b1));
  end

  // ---------------- cycle 3: integrate -----------------------------------
  s32_10_t inext [3];
  for (genvar x = 0; x < 3; x++) begin : g_int
    assign inext[x] = s32_10_t'(fx_fit(wide_t'(i3[x]) + wide_t'(di3[x]),
                                       F_S32_10, 32, F_S32_10, 1'b1));
    assign v_ph[x]  = vx3[x];
  end
  assign out_state.i_a = inext[0];
  assign out_state.i_b = inext[1];
  assign out_state.i_c = inext[2];
  assign out_valid     = v3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3} <= '0;
    else        {v1, v2, v3} <= {in_valid, v1, v2};
  end

  always_ff @(posedge clk) begin
    vdc3_1 <= vdc3_0;
    n1     <= n0;
    sw1    <= sw;
    i1     <= i0;
    vr1    <= vr0;
    i2     <= i1;
    e2     <= e1;
    vx2    <= vx1;
    i3     <= i2;
    di3    <= di2;
    vx3    <= vx2;
  end
endmodule

// buck_model_pipe: one forward-Euler step of the buck converter, pipelined.
//
// From the present inductor current iL(k), capacitor voltage vC(k), the switch
// command PWM and the converter constants it computes
//   iL(k+1) = iL + h/L * (Vsel - iL*Rsel - vo)
//   vC(k+1) = vC + h/C * (iL - vo/R)
//   vo(k)   = R/(R+ESR) * (iL*ESR + vC)
// where Vsel = Vs and Rsel = RL + RDS(on) while the switch is on (Eq. 12) and
// Vsel = -Vd, Rsel = RL while it is off (Eq. 13). The inductor current is
// clamped at zero before it is used, so with the switch off and no current
// left the step reduces to the discontinuous-conduction state (Eq. 14): no
// current builds up in the reverse direction and the capacitor discharges
// into the load. iL(k+1) itself is passed on unclamped; the next step clamps
// it again.
//
// The operator chain, its order and the fixed-point format of every operator
// result follow the published dataflow graph; see hil_fxp_pkg for the format
// convention. The split into stages is this design's: five pipeline
// registers, with the last multiply-add (h/C product plus vC) in the sixth
// cycle and left combinational so that the state register of the caller
// closes the loop. A caller that iterates the model can therefore start a
// new step every 6 clocks, 150 ns at 40 MHz.
//
// Timing: the inputs are sampled in the cycle in_valid is high; out_valid and
// the outputs appear 5 clocks later and hold for that one cycle.
// A new input may be given every clock (full throughput). The converter
// constants in prm are read in several stages and must be held while a step
// is in flight. Truncation and saturation are this design's rounding rule.
module buck_model_pipe
  import hil_fxp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  buck_state_t in_state,   // iL(k), vC(k)
  input  logic        pwm,        // switch command S
  input  buck_param_t prm,
  output logic        out_valid,
  output buck_out_t   out,
  output buck_mode_t  out_mode    // switching state used for this step
);

  // ---------------- cycle 0: clamp, select, series drop, ESR drop --------
  s33_7_t i_lc0;
  u32_3_t r_sum0, r_sel0;
  s32_6_t v_sel0, p_r0, a0;
  u32_5_t p_esr0;

  always_comb begin
    i_lc0  = (in_state.i_l <= 0) ? '0 : s33_7_t'(in_state.i_l);
    r_sum0 = u32_3_t'(fx_fit(wide_t'(prm.r_l) + wide_t'(prm.r_ds_on),
                             F_U32_3, 32, F_U32_3, 1'b0));
    r_sel0 = pwm ? r_sum0 : prm.r_l;
    v_sel0 = pwm ? prm.v_s : prm.neg_v_d;
    p_r0   = s32_6_t'(fx_fit(wide_t'(i_lc0) * wide_t'(r_sel0),
                             F_S33_7 + F_U32_3, 32, F_S32_6, 1'b1));
    a0     = s32_6_t'(fx_fit(wide_t'(v_sel0) - wide_t'(p_r0),
                             F_S32_6, 32, F_S32_6, 1'b1));
    p_esr0 = u32_5_t'(fx_fit(wide_t'(i_lc0) * wide_t'(prm.esr),
                             F_S33_7 + F_U32_3, 32, F_U32_5, 1'b0));
  end

  // Pipeline registers. Fields a stage no longer needs are not carried.
  logic       v1, v2, v3, v4, v5;
  buck_mode_t m1, m2, m3, m4, m5;
  s33_7_t     i_lc1, i_lc2, i_lc3, i_lc4, i_lc5;
  u32_6_t     v_c1, v_c2, v_c3, v_c4, v_c5;
  s32_6_t     a1, a2, a3;
  u32_5_t     p_esr1;
  s32_6_t     v_sum2;
  u32_5_t     v_o3, v_o4, v_o5;
  s32_6_t     d4;
  u32_5_t     i_o4, i_o5;
  s32_6_t     d_il5, i_c5;

  buck_mode_t m0;
  assign m0 = pwm ? BUCK_ON : ((in_state.i_l <= 0) ? BUCK_DCM : BUCK_DIODE);

  // ---------------- cycle 1: iL*ESR + vC ---------------------------------
  s32_6_t v_sum1;
  assign v_sum1 = s32_6_t'(fx_fit((wide_t'(p_esr1)) + (wide_t'(v_c1) <<< 1),
                                  F_U32_5, 32, F_S32_6, 1'b1));

  // ---------------- cycle 2: vo = R/(R+ESR) * (...) ----------------------
  u32_5_t v_o2;
  assign v_o2 = u32_5_t'(fx_fit(wide_t'(prm.k_vo) * wide_t'(v_sum2),
                                F_U32_5 + F_S32_6, 32, F_U32_5, 1'b0));

  // ---------------- cycle 3: io = vo/R, inductor voltage -----------------
  u32_5_t i_o3;
  s32_6_t d3;
  assign i_o3 = u32_5_t'(fx_fit(wide_t'(prm.inv_r) * wide_t'(v_o3),
                                F_U32_6 + F_U32_5, 32, F_U32_5, 1'b0));
  assign d3   = s32_6_t'(fx_fit((wide_t'(a3) <<< 1) - wide_t'(v_o3),
                                F_U32_5, 32, F_S32_6, 1'b1));

  // ---------------- cycle 4: ic = iL - io, h/L * inductor voltage --------
  s32_6_t i_c4, d_il4;
  assign i_c4  = s32_6_t'(fx_fit((wide_t'(i_lc4) <<< 1) - wide_t'(i_o4),
                                 F_U32_5, 32, F_S32_6, 1'b1));
  assign d_il4 = s32_6_t'(fx_fit(wide_t'(d4) * wide_t'(prm.h_over_l),
                                 F_S32_6 + F_U32_6, 32, F_S32_6, 1'b1));

  // ---------------- cycle 5: state update --------------------------------
  s32_6_t d_vc5;
  always_comb begin
    d_vc5        = s32_6_t'(fx_fit(wide_t'(i_c5) * wide_t'(prm.h_over_c),
                                   F_S32_6 + F_U32_5, 32, F_S32_6, 1'b1));
    out.i_l_next = s32_6_t'(fx_fit(wide_t'(d_il5) + wide_t'(i_lc5),
                                   F_S32_6, 32, F_S32_6, 1'b1));
    out.v_c_next = u32_6_t'(fx_fit(wide_t'(v_c5) + wide_t'(d_vc5),
                                   F_U32_6, 32, F_U32_6, 1'b0));
    out.v_o      = v_o5;
    out.i_o      = i_o5;
    out.i_c      = i_c5;
  end
  assign out_valid = v5;
  assign out_mode  = m5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5} <= '0;
    end else begin
      {v1, v2, v3, v4, v5} <= {in_valid, v1, v2, v3, v4};
    end
  end

  always_ff @(posedge clk) begin
    // stage 1
    m1 <= m0;  i_lc1 <= i_lc0;  v_c1 <= in_state.v_c;  a1 <= a0;  p_esr1 <= p_esr0;
    // stage 2
    m2 <= m1;  i_lc2 <= i_lc1;  v_c2 <= v_c1;  a2 <= a1;  v_sum2 <= v_sum1;
    // stage 3
    m3 <= m2;  i_lc3 <= i_lc2;  v_c3 <= v_c2;  a3 <= a2;  v_o3 <= v_o2;
    // stage 4
    m4 <= m3;  i_lc4 <= i_lc3;  v_c4 <= v_c3;  d4 <= d3;  i_o4 <= i_o3;  v_o4 <= v_o3;
    // stage 5
    m5 <= m4;  i_lc5 <= i_lc4;  v_c5 <= v_c4;  d_il5 <= d_il4;  i_c5 <= i_c4;
    i_o5 <= i_o4;  v_o5 <= v_o4;
  end

endmodule

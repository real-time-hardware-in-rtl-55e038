// tb_hil_top: end-to-end run of the whole simulator at its default sizes.
//
// Buck converter: starts from rest with the on-chip 40 kHz, 50 % PWM and the
// measured converter constants (10.5 ohm load) until steady state, then
// switches the model to an external 25 % PWM entering through the
// synchronizer and a 200 ohm load, which drives it into discontinuous
// conduction. Three-phase VSI, at the same time: sinusoidal PWM on the three
// external switch inputs, modulation index 0.5 and then 0.9.
//
// Checks and mechanism counts: every buck and VSI write-back against a
// double-precision Euler step; loop rates of 6 and 30 clocks; average buck
// output voltage against the averaged circuit equations; the three buck
// switching states; on-time share of the external PWM seen by the model;
// DAC outputs (0.5 gain on vo) and their 1 us spacing; VSI fundamental
// current amplitude against the phasor solution and all eight vectors.
`timescale 1ns/1ps
module tb_hil_top;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  localparam int  CLK_HZ  = 40_000_000;
  localparam int  PER1    = CLK_HZ / 60;      // one 60 Hz period in clocks
  localparam int  CARRIER = 4000;             // 10 kHz
  localparam real PI      = 3.14159265358979;

  logic        clk = 0, rst_n = 0;
  buck_param_t buck_prm;
  buck_state_t buck_init = '0;
  logic        buck_load_init = 0, buck_run = 0;
  logic        pwm_load = 0;
  logic [15:0] pwm_counter_init = '0, pwm_duty = 16'd500, pwm_period = 16'd1000;
  logic        pwm_src_ext = 0, pwm_ext_async = 0;
  logic [31:0] buck_sample_time = 32'd1;
  logic        pwm_out;
  buck_state_t buck_state;
  buck_out_t   buck_res;
  buck_mode_t  buck_mode;
  logic        buck_step_done;
  logic [31:0] buck_loop_rate;
  logic        buck_loop_rate_valid;
  s32_6_t      buck_ao0, buck_ao1;
  logic        buck_ao_strobe;
  vsi_param_t  vsi_prm;
  vsi_state_t  vsi_init = '0;
  logic        vsi_load_init = 0, vsi_run = 0;
  logic [2:0]  vsi_sw_async = '0;
  logic [31:0] vsi_sample_time = 32'd1;
  vsi_state_t  vsi_state;
  s32_10_t     vsi_v_ph [3];
  logic [2:0]  vsi_last_sw;
  logic        vsi_step_done;
  logic [31:0] vsi_loop_rate;
  logic        vsi_loop_rate_valid;
  s32_10_t     vsi_ao0, vsi_ao1;
  logic        vsi_ao_strobe;

  int checks = 0, failures = 0;

  hil_top dut (.*);
  always #12.5 clk = ~clk;

  task automatic chk(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (rabs(got - exp_v) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  // ---------------- stimulus: external PWM and VSI sinusoidal PWM -------
  int  cycle = 0;
  real m = 0.5;
  always @(posedge clk) begin
    real carrier, ref_x;
    int  ph;
    cycle <= cycle + 1;
    pwm_ext_async <= ((cycle % 1000) < 250);
    ph = cycle % CARRIER;
    carrier = (ph < CARRIER / 2) ? (-1.0 + 4.0 * real'(ph) / real'(CARRIER))
                                 : (3.0 - 4.0 * real'(ph) / real'(CARRIER));
    for (int x = 0; x < 3; x++) begin
      ref_x = m * $sin(2.0 * PI * 60.0 * real'(cycle) / real'(CLK_HZ) - real'(x) * 2.0 * PI / 3.0);
      vsi_sw_async[x] <= (ref_x > carrier);
    end
  end

  // ---------------- buck monitor ----------------------------------------
  buck_c_t c;
  real il_p = 0.0, vc_p = 0.0;      // state before the step just finished
  int  mode_cnt [3] = '{0, 0, 0};
  int  buck_steps = 0, ext_steps = 0, ext_on = 0;
  int  buck_rate_ok = 0;
  bit  avg_on = 0;
  real vo_acc = 0.0;
  int  vo_n = 0;
  buck_out_t res_prev;
  int  dac_strobes = 0, dac_last = -1;
  int  since_run = 0;

  always @(posedge clk) begin
    if (rst_n && buck_step_done) begin
      buck_r_t r;
      r = buck_step(c, il_p, vc_p, buck_mode == BUCK_ON);
      chk("buck iL", fx2r(33'(buck_state.i_l), 32, F_S32_6, 1), r.il_next, 2.0e-6);
      chk("buck vC", fx2r(33'(buck_state.v_c), 32, F_U32_6, 0), r.vc_next, 2.0e-6);
      chk("buck vo", fx2r(33'(buck_res.v_o),   32, F_U32_5, 0), r.vo, 2.0e-6);
      chk("buck io", fx2r(33'(buck_res.i_o),   32, F_U32_5, 0), r.io, 2.0e-6);
      checks++;
      if (int'(buck_mode) != r.mode) failures++;
      mode_cnt[r.mode]++;
      il_p = fx2r(33'(buck_state.i_l), 32, F_S32_6, 1);
      vc_p = fx2r(33'(buck_state.v_c), 32, F_U32_6, 0);
      if (avg_on) begin vo_acc += fx2r(33'(buck_res.v_o), 32, F_U32_5, 0); vo_n++; end
      if (pwm_src_ext) begin ext_steps++; if (buck_mode == BUCK_ON) ext_on++; end
      buck_steps++;
    end
    since_run <= buck_run ? since_run + 1 : 0;
    // the first reading after a restart spans the pause; skip it
    if (rst_n && buck_loop_rate_valid && buck_run && since_run > 20) begin
      checks++;
      if (buck_loop_rate != 32'd6) begin failures++; $display("FAIL buck loop rate %0d", buck_loop_rate); end
      else buck_rate_ok++;
    end
    if (rst_n && buck_ao_strobe) begin
      // the DAC took its sample from the results of the previous clock
      chk("DAC vo channel", fx2r(33'(buck_ao0), 32, F_S32_6, 1),
          0.5 * fx2r(33'(res_prev.v_o), 32, F_U32_5, 0), 1.0e-7);
      chk("DAC iL channel", fx2r(33'(buck_ao1), 32, F_S32_6, 1),
          fx2r(33'(res_prev.i_l_next), 32, F_S32_6, 1), 1.0e-7);
      if (dac_last >= 0) begin
        checks++;
        if (cycle - dac_last != 40) failures++;
      end
      dac_last <= cycle;
      dac_strobes++;
    end
    res_prev <= buck_res;
  end

  // ---------------- VSI monitor -----------------------------------------
  real vdc, hl, rl;
  real vi [3] = '{0.0, 0.0, 0.0};
  int  vec_cnt [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  int  vsi_steps = 0, vsi_rate_ok = 0, vsi_dac = 0;
  bit  dft_on = 0;
  real dft_s = 0.0, dft_c = 0.0;
  int  dft_n = 0;
  vsi_state_t vsi_prev;

  always @(posedge clk) begin
    if (rst_n && vsi_step_done) begin
      vsi_r_t r;
      real q [3];
      r = vsi_step(vdc, hl, rl, vsi_last_sw, vi[0], vi[1], vi[2]);
      q[0] = fx2r(33'(vsi_state.i_a), 32, F_S32_10, 1);
      q[1] = fx2r(33'(vsi_state.i_b), 32, F_S32_10, 1);
      q[2] = fx2r(33'(vsi_state.i_c), 32, F_S32_10, 1);
      for (int x = 0; x < 3; x++) begin
        chk("vsi current", q[x], r.i_next[x], 1.0e-5);
        chk("vsi phase voltage", fx2r(33'(vsi_v_ph[x]), 32, F_S32_10, 1), r.v[x], 1.0e-5);
        vi[x] = q[x];
      end
      vec_cnt[vsi_last_sw]++;
      if (dft_on) begin
        real t;
        t = real'(cycle) / real'(CLK_HZ);
        dft_s += q[0] * $sin(2.0 * PI * 60.0 * t);
        dft_c += q[0] * $cos(2.0 * PI * 60.0 * t);
        dft_n++;
      end
      vsi_steps++;
    end
    if (rst_n && vsi_loop_rate_valid && vsi_run) begin
      checks++;
      if (vsi_loop_rate != 32'd30) begin failures++; $display("FAIL vsi loop rate %0d", vsi_loop_rate); end
      else vsi_rate_ok++;
    end
    if (rst_n && vsi_ao_strobe) begin
      checks++;
      if (vsi_ao0 != vsi_prev.i_a || vsi_ao1 != vsi_prev.i_b) begin
        failures++;
        $display("FAIL VSI DAC channels");
      end
      vsi_dac++;
    end
    vsi_prev <= vsi_state;
  end

  task automatic vsi_amplitude(input real mi);
    real amp, z, expv;
    dft_s = 0.0; dft_c = 0.0; dft_n = 0;
    dft_on = 1;
    repeat (PER1) @(posedge clk);
    dft_on = 0;
    amp  = 2.0 / real'(dft_n) * $sqrt(dft_s * dft_s + dft_c * dft_c);
    z    = $sqrt(35.0 * 35.0 + (2.0 * PI * 60.0 * 7.0e-3) ** 2);
    expv = mi * 250.0 / 2.0 / z;
    $display("VSI m = %.1f: fundamental of i_a %f A, phasor solution %f A", mi, amp, expv);
    chk("VSI fundamental amplitude", amp, expv, 0.03 * expv);
  endtask

  // ---------------- sequence --------------------------------------------
  initial begin
    real vo_avg, vo_exp, share;
    buck_prm.r_l      = r2fx(0.75,   F_U32_3);
    buck_prm.r_ds_on  = r2fx(0.04,   F_U32_3);
    buck_prm.esr      = r2fx(2.0,    F_U32_3);
    buck_prm.v_s      = r2fx(24.0,   F_S32_6);
    buck_prm.neg_v_d  = r2fx(-0.1,   F_S32_6);
    buck_prm.h_over_l = r2fx(3.0e-4, F_U32_6);
    buck_prm.h_over_c = r2fx(0.015,  F_U32_5);
    buck_prm.inv_r    = r2fx(0.095,  F_U32_6);
    buck_prm.k_vo     = r2fx((1.0 / 0.095) / ((1.0 / 0.095) + 2.0), F_U32_5);
    c.r_l   = fx2r(33'(buck_prm.r_l),      32, F_U32_3, 0);
    c.r_ds  = fx2r(33'(buck_prm.r_ds_on),  32, F_U32_3, 0);
    c.esr   = fx2r(33'(buck_prm.esr),      32, F_U32_3, 0);
    c.v_s   = fx2r(33'(buck_prm.v_s),      32, F_S32_6, 1);
    c.v_d   = -fx2r(33'(buck_prm.neg_v_d), 32, F_S32_6, 1);
    c.h_l   = fx2r(33'(buck_prm.h_over_l), 32, F_U32_6, 0);
    c.h_c   = fx2r(33'(buck_prm.h_over_c), 32, F_U32_5, 0);
    c.inv_r = fx2r(33'(buck_prm.inv_r),    32, F_U32_6, 0);
    c.k     = fx2r(33'(buck_prm.k_vo),     32, F_U32_5, 0);
    vsi_prm.v_dc     = r2fx(250.0, F_S32_10);
    vsi_prm.h_over_l = r2fx(750.0e-9 / 7.0e-3, F_U32_2);
    vsi_prm.r_load   = r2fx(35.0, F_U32_8);
    vdc = fx2r(33'(vsi_prm.v_dc),     32, F_S32_10, 1);
    hl  = fx2r(33'(vsi_prm.h_over_l), 32, F_U32_2, 0);
    rl  = fx2r(33'(vsi_prm.r_load),   32, F_U32_8, 0);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    buck_load_init = 1; vsi_load_init = 1; pwm_load = 1;
    @(posedge clk); #1;
    buck_load_init = 0; vsi_load_init = 0; pwm_load = 0;
    buck_run = 1; vsi_run = 1;

    // VSI period 1 (settle) with buck settling; period 2 measured, buck
    // output averaged over its last 6000 steps.
    repeat (PER1 - 36000) @(posedge clk);
    avg_on = 1;
    fork
      vsi_amplitude(0.5);
      begin repeat (36000) @(posedge clk); avg_on = 0; end
    join_any
    wait (!avg_on);
    // the fork's first branch may still be running; wait for it
    wait fork;
    vo_avg = vo_acc / real'(vo_n);
    vo_exp = (0.5 * 24.0 - 0.5 * 0.1) / (1.0 + 0.095 * (0.75 + 0.5 * 0.04));
    $display("buck steady state: average vo %f, averaged-model value %f", vo_avg, vo_exp);
    chk("buck average vo", vo_avg, vo_exp, 0.05);

    // Mode switch: external 25 % PWM, light load; VSI index 0.9.
    @(posedge clk); #1;
    buck_run = 0;
    repeat (10) @(posedge clk); #1;
    buck_prm.inv_r = r2fx(0.005, F_U32_6);
    buck_prm.k_vo  = r2fx(200.0 / 202.0, F_U32_5);
    c.inv_r = fx2r(33'(buck_prm.inv_r), 32, F_U32_6, 0);
    c.k     = fx2r(33'(buck_prm.k_vo),  32, F_U32_5, 0);
    pwm_src_ext = 1;
    buck_run = 1;
    m = 0.9;
    repeat (PER1) @(posedge clk);
    vsi_amplitude(0.9);
    buck_run = 0; vsi_run = 0;

    share = real'(ext_on) / real'(ext_steps);
    $display("external PWM: model saw the switch on in %f of %0d steps", share, ext_steps);
    chk("external PWM on-share", share, 0.25, 0.01);
    $display("buck steps %0d (on %0d, diode %0d, discontinuous %0d), loop-rate readings of 6: %0d",
             buck_steps, mode_cnt[0], mode_cnt[1], mode_cnt[2], buck_rate_ok);
    $display("VSI steps %0d, loop-rate readings of 30: %0d, DAC writes buck %0d VSI %0d",
             vsi_steps, vsi_rate_ok, dac_strobes, vsi_dac);
    // every mechanism must have happened
    checks += 8;
    if (mode_cnt[0] == 0 || mode_cnt[1] == 0 || mode_cnt[2] == 0) begin failures++; $display("FAIL a buck switching state never occurred"); end
    if (buck_rate_ok == 0) begin failures++; $display("FAIL no buck loop rate"); end
    if (vsi_rate_ok == 0)  begin failures++; $display("FAIL no VSI loop rate"); end
    if (ext_steps == 0)    begin failures++; $display("FAIL external PWM never used"); end
    if (dac_strobes == 0)  begin failures++; $display("FAIL no buck DAC writes"); end
    if (vsi_dac == 0)      begin failures++; $display("FAIL no VSI DAC writes"); end
    if (buck_steps == 0 || vsi_steps == 0) begin failures++; $display("FAIL no steps"); end
    for (int v = 0; v < 8; v++) if (vec_cnt[v] == 0) begin failures++; $display("FAIL vector V%0d never applied", v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * PER1 + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

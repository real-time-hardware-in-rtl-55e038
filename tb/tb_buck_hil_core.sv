// tb_buck_hil_core: runs the buck converter loop from rest to steady state
// under a 40 kHz, 50 % PWM, then under a light load that drives it into
// discontinuous conduction.
//
// Checks: a step starts every 6 clocks; every write-back equals a
// double-precision Euler step from the state it started from; a free-running
// double-precision model stays close to the RTL over the whole run; the
// average output voltage settles where the averaged circuit equations put
// it; all three switching states occur; load_init restores the initial
// values.
`timescale 1ns/1ps
module tb_buck_hil_core;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  localparam int STEPS1 = 30000;   // heavy load, continuous conduction
  localparam int STEPS2 = 15000;   // light load, discontinuous conduction

  logic        clk = 0, rst_n = 0;
  logic        run = 0, load_init = 0;
  buck_state_t init = '0;
  logic        pwm = 0;
  buck_param_t prm;
  buck_state_t state;
  buck_out_t   res;
  buck_mode_t  res_mode;
  logic        go, step_done;

  int checks = 0, failures = 0;

  buck_hil_core dut (.*);

  always #12.5 clk = ~clk;

  // 40 kHz PWM with 50 % duty, made here independently of pwm_gen.
  int pcnt = 0;
  always @(posedge clk) begin
    pcnt <= (pcnt == 999) ? 0 : pcnt + 1;
    pwm  <= (pcnt < 500);
  end

  buck_c_t c;
  int  cycle = 0, last_go = -1, n_steps = 0;
  bit  pwm_at_go;
  real il_s, vc_s;              // state at the start of the step in flight
  real il_f = 0.0, vc_f = 0.0;  // free-running reference
  real max_dev = 0.0;
  real vo_acc = 0.0;
  int  vo_n = 0;
  int  mode_seen [3] = '{0, 0, 0};
  bit  accumulate = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (rabs(got - exp_v) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  function automatic void set_load(input real inv_r);
    prm.inv_r = r2fx(inv_r, F_U32_6);
    prm.k_vo  = r2fx((1.0 / inv_r) / ((1.0 / inv_r) + 2.0), F_U32_5);
    c.inv_r   = fx2r(33'(prm.inv_r), 32, F_U32_6, 0);
    c.k       = fx2r(33'(prm.k_vo),  32, F_U32_5, 0);
  endfunction

  always @(posedge clk) begin
    if (rst_n && go) begin
      if (last_go >= 0) begin
        checks++;
        if (cycle - last_go != 6) begin
          failures++;
          $display("FAIL step period %0d", cycle - last_go);
        end
      end
      last_go   <= cycle;
      pwm_at_go <= pwm;
      il_s      <= fx2r(33'(state.i_l), 32, F_S32_6, 1);
      vc_s      <= fx2r(33'(state.v_c), 32, F_U32_6, 0);
    end
    if (rst_n && step_done) begin
      buck_r_t r, f;
      real il_q, vc_q;
      r = buck_step(c, il_s, vc_s, pwm_at_go);
      f = buck_step(c, il_f, vc_f, pwm_at_go);
      il_f = f.il_next;
      vc_f = f.vc_next;
      il_q = fx2r(33'(state.i_l), 32, F_S32_6, 1);
      vc_q = fx2r(33'(state.v_c), 32, F_U32_6, 0);
      chk("step iL", il_q, r.il_next, 2.0e-6);
      chk("step vC", vc_q, r.vc_next, 2.0e-6);
      chk("step vo", fx2r(33'(res.v_o), 32, F_U32_5, 0), r.vo, 2.0e-6);
      checks++;
      if (int'(res_mode) != r.mode) failures++;
      mode_seen[r.mode]++;
      if (rabs(il_q - il_f) > max_dev) max_dev = rabs(il_q - il_f);
      if (rabs(vc_q - vc_f) > max_dev) max_dev = rabs(vc_q - vc_f);
      if (accumulate) begin
        vo_acc += fx2r(33'(res.v_o), 32, F_U32_5, 0);
        vo_n++;
      end
      n_steps++;
    end
  end

  initial begin
    real vo_avg, vo_exp, d;
    prm.r_l      = r2fx(0.75,   F_U32_3);
    prm.r_ds_on  = r2fx(0.04,   F_U32_3);
    prm.esr      = r2fx(2.0,    F_U32_3);
    prm.v_s      = r2fx(24.0,   F_S32_6);
    prm.neg_v_d  = r2fx(-0.1,   F_S32_6);
    prm.h_over_l = r2fx(3.0e-4, F_U32_6);
    prm.h_over_c = r2fx(0.015,  F_U32_5);
    c.r_l  = fx2r(33'(prm.r_l),      32, F_U32_3, 0);
    c.r_ds = fx2r(33'(prm.r_ds_on),  32, F_U32_3, 0);
    c.esr  = fx2r(33'(prm.esr),      32, F_U32_3, 0);
    c.v_s  = fx2r(33'(prm.v_s),      32, F_S32_6, 1);
    c.v_d  = -fx2r(33'(prm.neg_v_d), 32, F_S32_6, 1);
    c.h_l  = fx2r(33'(prm.h_over_l), 32, F_U32_6, 0);
    c.h_c  = fx2r(33'(prm.h_over_c), 32, F_U32_5, 0);
    set_load(0.095);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    init.i_l = '0;
    init.v_c = '0;
    load_init = 1;
    @(posedge clk); #1 load_init = 0;
    run = 1;

    // Phase 1: continuous conduction to steady state; average the last
    // 6000 steps (36 switching periods).
    wait (n_steps == STEPS1 - 6000);
    accumulate = 1;
    wait (n_steps == STEPS1);
    accumulate = 0;
    vo_avg = vo_acc / real'(vo_n);
    d      = 0.5;
    // Averaged circuit: vo = R*iL, vo = D*Vs - (1-D)*Vd - iL*(RL + D*RDS)
    vo_exp = (d * 24.0 - (1.0 - d) * 0.1) / (1.0 + 0.095 * (0.75 + d * 0.04));
    $display("steady state: average vo %f, averaged-model value %f", vo_avg, vo_exp);
    chk("average vo", vo_avg, vo_exp, 0.05);

    // Phase 2: light load (R = 200 ohm), discontinuous conduction.
    @(posedge clk); #1 run = 0;
    repeat (10) @(posedge clk);
    #1 set_load(0.005);
    last_go = -1;
    run = 1;
    wait (n_steps == STEPS1 + STEPS2);
    @(posedge clk); #1 run = 0;
    repeat (10) @(posedge clk);

    // load_init restores the initial values.
    #1 init.i_l = r2fx(0.5, F_S32_6);
    init.v_c = r2fx(3.0, F_U32_6);
    load_init = 1;
    @(posedge clk); #1 load_init = 0;
    checks++;
    if (state != init) begin
      failures++;
      $display("FAIL load_init");
    end

    chk("free-running model deviation", max_dev, 0.0, 5.0e-3);
    $display("largest deviation from free-running model %g", max_dev);
    $display("states seen: on %0d diode %0d dcm %0d", mode_seen[0], mode_seen[1], mode_seen[2]);
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL switching state %0d never reached", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (STEPS1 + STEPS2) + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

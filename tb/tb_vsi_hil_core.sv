// tb_vsi_hil_core: drives the VSI loop with sinusoidal PWM (10 kHz triangle
// carrier, 60 Hz references 120 degrees apart) at modulation index 0.5 and
// then 0.9, two fundamental periods each.
//
// Checks: a step starts every 30 clocks (750 ns); every write-back equals a
// double-precision Euler step from the state it started from; a free-running
// double-precision model stays close; the three currents sum to zero; the
// fundamental amplitude of i_a over the second period of each index matches
// the steady-state phasor solution m*VDC/2/|R + jwL|; all eight switch
// vectors occur.
`timescale 1ns/1ps
module tb_vsi_hil_core;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  localparam int  CLK_HZ   = 40_000_000;
  localparam int  CARRIER  = 4000;            // clocks per 10 kHz period
  localparam real F1       = 60.0;
  localparam int  PER1     = CLK_HZ / 60;     // clocks per fundamental period
  localparam real PI       = 3.14159265358979;

  logic       clk = 0, rst_n = 0, run = 0, load_init = 0;
  vsi_state_t init = '0;
  logic [2:0] sw = '0;
  vsi_param_t prm;
  vsi_state_t state;
  s32_10_t    v_ph [3];
  logic [2:0] last_sw;
  logic       go, step_done;
  int checks = 0, failures = 0;

  vsi_hil_core dut (.*);
  always #12.5 clk = ~clk;

  real m = 0.5;
  int  cycle = 0;
  // sinusoidal PWM made in the testbench
  always @(posedge clk) begin
    real carrier, ref_x;
    int  ph;
    cycle <= cycle + 1;
    ph = cycle % CARRIER;
    carrier = (ph < CARRIER / 2) ? (-1.0 + 4.0 * real'(ph) / real'(CARRIER))
                                 : (3.0 - 4.0 * real'(ph) / real'(CARRIER));
    for (int x = 0; x < 3; x++) begin
      ref_x = m * $sin(2.0 * PI * F1 * real'(cycle) / real'(CLK_HZ) - real'(x) * 2.0 * PI / 3.0);
      sw[x] <= (ref_x > carrier);
    end
  end

  real vdc, hl, rl;
  int  last_go = -1, n_steps = 0;
  logic [2:0] sw_at_go;
  real is_ [3];
  real if_ [3] = '{0.0, 0.0, 0.0};
  real max_dev = 0.0, max_sum = 0.0;
  int  vec_seen [8];
  bit  dft_on = 0;
  real dft_s = 0.0, dft_c = 0.0;
  int  dft_n = 0;

  task automatic chk(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (rabs(got - exp_v) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && go) begin
      if (last_go >= 0) begin
        checks++;
        if (cycle - last_go != 30) begin
          failures++;
          $display("FAIL step period %0d", cycle - last_go);
        end
      end
      last_go  <= cycle;
      sw_at_go <= sw;
      is_[0] <= fx2r(33'(state.i_a), 32, F_S32_10, 1);
      is_[1] <= fx2r(33'(state.i_b), 32, F_S32_10, 1);
      is_[2] <= fx2r(33'(state.i_c), 32, F_S32_10, 1);
    end
    if (rst_n && step_done) begin
      vsi_r_t r, f;
      real q [3];
      r = vsi_step(vdc, hl, rl, sw_at_go, is_[0], is_[1], is_[2]);
      f = vsi_step(vdc, hl, rl, sw_at_go, if_[0], if_[1], if_[2]);
      q[0] = fx2r(33'(state.i_a), 32, F_S32_10, 1);
      q[1] = fx2r(33'(state.i_b), 32, F_S32_10, 1);
      q[2] = fx2r(33'(state.i_c), 32, F_S32_10, 1);
      for (int x = 0; x < 3; x++) begin
        if_[x] = f.i_next[x];
        chk("step current", q[x], r.i_next[x], 1.0e-5);
        chk("step phase voltage", fx2r(33'(v_ph[x]), 32, F_S32_10, 1), r.v[x], 1.0e-5);
        if (rabs(q[x] - if_[x]) > max_dev) max_dev = rabs(q[x] - if_[x]);
      end
      checks++;
      if (last_sw != sw_at_go) failures++;
      if (rabs(q[0] + q[1] + q[2]) > max_sum) max_sum = rabs(q[0] + q[1] + q[2]);
      vec_seen[sw_at_go]++;
      if (dft_on) begin
        real t;
        t = real'(cycle) / real'(CLK_HZ);
        dft_s += q[0] * $sin(2.0 * PI * F1 * t);
        dft_c += q[0] * $cos(2.0 * PI * F1 * t);
        dft_n++;
      end
      n_steps++;
    end
  end

  task automatic amplitude_check(input real mi);
    real amp, z, expv;
    dft_s = 0.0; dft_c = 0.0; dft_n = 0;
    repeat (PER1) @(posedge clk);     // settle
    dft_on = 1;
    repeat (PER1) @(posedge clk);     // measure over one full period
    dft_on = 0;
    amp  = 2.0 / real'(dft_n) * $sqrt(dft_s * dft_s + dft_c * dft_c);
    z    = $sqrt(35.0 * 35.0 + (2.0 * PI * F1 * 7.0e-3) ** 2);
    expv = mi * 250.0 / 2.0 / z;
    $display("m = %.1f: fundamental of i_a %f A, phasor solution %f A", mi, amp, expv);
    chk("fundamental amplitude", amp, expv, 0.03 * expv);
  endtask

  initial begin
    prm.v_dc     = r2fx(250.0, F_S32_10);
    prm.h_over_l = r2fx(750.0e-9 / 7.0e-3, F_U32_2);
    prm.r_load   = r2fx(35.0, F_U32_8);
    vdc = fx2r(33'(prm.v_dc),     32, F_S32_10, 1);
    hl  = fx2r(33'(prm.h_over_l), 32, F_U32_2, 0);
    rl  = fx2r(33'(prm.r_load),   32, F_U32_8, 0);
    for (int v = 0; v < 8; v++) vec_seen[v] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load_init = 1;
    @(posedge clk); #1 load_init = 0;
    run = 1;
    amplitude_check(0.5);
    m = 0.9;                          // modulation index step
    amplitude_check(0.9);
    run = 0;
    chk("currents sum to zero", max_sum, 0.0, 1.0e-3);
    chk("free-running model deviation", max_dev, 0.0, 1.0e-3);
    $display("steps %0d, largest deviation %g, largest current sum %g", n_steps, max_dev, max_sum);
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (vec_seen[v] == 0) begin failures++; $display("FAIL vector V%0d never applied", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * PER1 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

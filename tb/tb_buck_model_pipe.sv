// tb_buck_model_pipe: streams random operating points through the buck
// converter datapath, one per clock, and checks every result against a
// double-precision evaluation of the Euler step, its switching state, the
// 5-clock latency and the one-result-per-clock throughput.
//
// Converter constants: RL 0.75, RDS(on) 0.04, ESR 2 ohm, Vs 24 V, Vd 0.1 V,
// h/L 3e-4, h/C 0.015, 1/R 0.095 (the 150 ns step of the measured
// converter). Operating points cover negative inductor current so the
// clamp and the discontinuous state are exercised.
`timescale 1ns/1ps
module tb_buck_model_pipe;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  localparam int N       = 400;
  localparam int LATENCY = 5;
  localparam real TOL    = 2.0e-6;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  buck_state_t in_state = '0;
  logic        pwm = 0;
  buck_param_t prm;
  logic        out_valid;
  buck_out_t   out;
  buck_mode_t  out_mode;

  int checks = 0, failures = 0;

  buck_model_pipe dut (.*);

  always #12.5 clk = ~clk;

  buck_c_t c;
  real     q_il [N], q_vc [N];
  bit      q_pwm [N];
  int      sent_cycle [N];
  int      cycle = 0;
  int      n_out = 0;
  int      mode_seen [3] = '{0, 0, 0};

  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input string what, input real got, input real exp_v);
    checks++;
    if (rabs(got - exp_v) > TOL) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      buck_r_t r;
      r = buck_step(c, q_il[n_out], q_vc[n_out], q_pwm[n_out]);
      chk("iL(k+1)", fx2r(33'(out.i_l_next), 32, F_S32_6, 1), r.il_next);
      chk("vC(k+1)", fx2r(33'(out.v_c_next), 32, F_U32_6, 0), r.vc_next);
      chk("vo(k)",   fx2r(33'(out.v_o),      32, F_U32_5, 0), r.vo);
      chk("io(k)",   fx2r(33'(out.i_o),      32, F_U32_5, 0), r.io);
      chk("ic(k)",   fx2r(33'(out.i_c),      32, F_S32_6, 1), r.ic);
      checks++;
      if (int'(out_mode) != r.mode) begin
        failures++;
        $display("FAIL mode: got %0d expected %0d", out_mode, r.mode);
      end
      mode_seen[r.mode]++;
      checks++;
      if (cycle - sent_cycle[n_out] != LATENCY) begin
        failures++;
        $display("FAIL latency %0d", cycle - sent_cycle[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    prm.r_l      = r2fx(0.75,   F_U32_3);
    prm.r_ds_on  = r2fx(0.04,   F_U32_3);
    prm.esr      = r2fx(2.0,    F_U32_3);
    prm.v_s      = r2fx(24.0,   F_S32_6);
    prm.neg_v_d  = r2fx(-0.1,   F_S32_6);
    prm.h_over_l = r2fx(3.0e-4, F_U32_6);
    prm.h_over_c = r2fx(0.015,  F_U32_5);
    prm.inv_r    = r2fx(0.095,  F_U32_6);
    prm.k_vo     = r2fx((1.0 / 0.095) / ((1.0 / 0.095) + 2.0), F_U32_5);
    c.r_l   = fx2r(33'(prm.r_l),      32, F_U32_3, 0);
    c.r_ds  = fx2r(33'(prm.r_ds_on),  32, F_U32_3, 0);
    c.esr   = fx2r(33'(prm.esr),      32, F_U32_3, 0);
    c.v_s   = fx2r(33'(prm.v_s),      32, F_S32_6, 1);
    c.v_d   = -fx2r(33'(prm.neg_v_d), 32, F_S32_6, 1);
    c.h_l   = fx2r(33'(prm.h_over_l), 32, F_U32_6, 0);
    c.h_c   = fx2r(33'(prm.h_over_c), 32, F_U32_5, 0);
    c.inv_r = fx2r(33'(prm.inv_r),    32, F_U32_6, 0);
    c.k     = fx2r(33'(prm.k_vo),     32, F_U32_5, 0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      real il, vc;
      // a few fixed corner points, then random ones
      case (i)
        0: begin il = 0.0;  vc = 0.0;  end
        1: begin il = -0.3; vc = 5.0;  end
        2: begin il = 1.2;  vc = 11.2; end
        default: begin
          il = (real'($urandom_range(0, 40000)) / 10000.0) - 0.8;
          vc = real'($urandom_range(0, 150000)) / 10000.0;
        end
      endcase
      in_state.i_l = r2fx(il, F_S32_6);
      in_state.v_c = r2fx(vc, F_U32_6);
      q_il[i]  = fx2r(33'(in_state.i_l), 32, F_S32_6, 1);
      q_vc[i]  = fx2r(33'(in_state.v_c), 32, F_U32_6, 0);
      pwm      = (i == 1) ? 1'b0 : 1'($urandom_range(0, 1));
      q_pwm[i] = pwm;
      in_valid = 1;
      sent_cycle[i] = cycle;
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("FAIL got %0d results for %0d inputs", n_out, N);
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL switching state %0d never exercised", m);
      end
    end
    $display("states seen: on %0d diode %0d dcm %0d", mode_seen[0], mode_seen[1], mode_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vsi_model_pipe: streams random phase currents and switch vectors through
// the VSI datapath, one per clock, and checks the phase voltages against the
// vector table (0, +-VDC/3, +-2VDC/3), the next currents against a
// double-precision Euler step, the 3-clock latency and that all eight
// vectors were applied. VDC 250 V, Lx 7 mH, Rx 35 ohm, h 750 ns.
`timescale 1ns/1ps
module tb_vsi_model_pipe;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  localparam int  N       = 400;
  localparam int  LATENCY = 3;
  localparam real TOL     = 1.0e-5;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  vsi_state_t in_state = '0;
  logic [2:0] sw = '0;
  vsi_param_t prm;
  logic       out_valid;
  vsi_state_t out_state;
  s32_10_t    v_ph [3];
  int checks = 0, failures = 0;

  vsi_model_pipe dut (.*);
  always #12.5 clk = ~clk;

  real        vdc, hl, rl;
  real        qi [N][3];
  logic [2:0] qsw [N];
  int         sent [N];
  int         cycle = 0, n_out = 0;
  int         vec_seen [8];
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input string what, input real got, input real exp_v);
    checks++;
    if (rabs(got - exp_v) > TOL) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vsi_r_t r;
      real    tab;
      int     nsw;
      r = vsi_step(vdc, hl, rl, qsw[n_out], qi[n_out][0], qi[n_out][1], qi[n_out][2]);
      chk("i_a", fx2r(33'(out_state.i_a), 32, F_S32_10, 1), r.i_next[0]);
      chk("i_b", fx2r(33'(out_state.i_b), 32, F_S32_10, 1), r.i_next[1]);
      chk("i_c", fx2r(33'(out_state.i_c), 32, F_S32_10, 1), r.i_next[2]);
      nsw = int'(qsw[n_out][0]) + int'(qsw[n_out][1]) + int'(qsw[n_out][2]);
      for (int x = 0; x < 3; x++) begin
        // vector table: v_xN - v_Nn
        tab = (qsw[n_out][x] ? 250.0 : 0.0) - real'(nsw) * 250.0 / 3.0;
        chk("v_xn", fx2r(33'(v_ph[x]), 32, F_S32_10, 1), tab);
      end
      vec_seen[qsw[n_out]]++;
      checks++;
      if (cycle - sent[n_out] != LATENCY) begin
        failures++;
        $display("FAIL latency %0d", cycle - sent[n_out]);
      end
      n_out++;
    end
  end

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
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      in_state.i_a = r2fx((real'($urandom_range(0, 100000)) / 10000.0) - 5.0, F_S32_10);
      in_state.i_b = r2fx((real'($urandom_range(0, 100000)) / 10000.0) - 5.0, F_S32_10);
      in_state.i_c = r2fx((real'($urandom_range(0, 100000)) / 10000.0) - 5.0, F_S32_10);
      qi[i][0] = fx2r(33'(in_state.i_a), 32, F_S32_10, 1);
      qi[i][1] = fx2r(33'(in_state.i_b), 32, F_S32_10, 1);
      qi[i][2] = fx2r(33'(in_state.i_c), 32, F_S32_10, 1);
      sw       = (i < 8) ? 3'(i) : 3'($urandom_range(0, 7));
      qsw[i]   = sw;
      in_valid = 1;
      sent[i]  = cycle;
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d results", n_out); end
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (vec_seen[v] == 0) begin failures++; $display("FAIL vector V%0d never applied", v); end
    end
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

// tb_dac_output: with a 1 us sample time the analog outputs must update
// every 40 clocks; channel 0 carries half the input value (the 0.5 gain),
// channel 1 the input unchanged. Also checks sample time 0 (every clock),
// a longer sample time and saturation of negative values.
`timescale 1ns/1ps
module tb_dac_output;
  import hil_fxp_pkg::*;
  import hil_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] sample_time = 32'd1;
  logic signed [31:0] ch0 = '0, ch1 = '0;
  logic signed [31:0] ao0, ao1;
  logic        ao_strobe;
  int checks = 0, failures = 0;

  dac_output dut (.*);
  always #12.5 clk = ~clk;

  int cycle = 0, last = -1, n_strobe = 0, want_gap = 40;
  real exp0, exp1;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && ao_strobe) begin
      if (last >= 0) begin
        checks++;
        if (cycle - last != want_gap) begin
          failures++;
          $display("FAIL strobe spacing %0d expected %0d", cycle - last, want_gap);
        end
      end
      last <= cycle;
      n_strobe++;
    end
  end

  task automatic check_values(input real v0, input real v1);
    @(posedge ao_strobe);
    @(negedge clk);
    checks += 2;
    if (rabs(fx2r(33'(ao0), 32, F_S32_6, 1) - 0.5 * v0) > 1.0e-7 ||
        rabs(fx2r(33'(ao1), 32, F_S32_6, 1) - v1) > 1.0e-7) begin
      failures++;
      $display("FAIL values: ao0 %f ao1 %f for inputs %f %f",
               fx2r(33'(ao0), 32, F_S32_6, 1), fx2r(33'(ao1), 32, F_S32_6, 1), v0, v1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    ch0 = r2fx(11.2627, F_S32_6);
    ch1 = r2fx(1.19488, F_S32_6);
    repeat (3) check_values(11.2627, 1.19488);
    #1 ch0 = r2fx(-3.5, F_S32_6); ch1 = r2fx(-0.25, F_S32_6);
    @(posedge ao_strobe);
    check_values(-3.5, -0.25);
    // sample time 3 us
    @(negedge clk); want_gap = 120; last = -1; sample_time = 32'd3;
    repeat (3) check_values(-3.5, -0.25);
    // sample time 0: every clock
    @(negedge clk); want_gap = 1; last = -1; sample_time = 32'd0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_strobe < 25) begin failures++; $display("FAIL too few strobes %0d", n_strobe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

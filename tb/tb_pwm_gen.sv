// tb_pwm_gen: checks the PWM generator's period and on-time for the 40 kHz,
// 50 % setting (period 1000, duty 500 clocks) and for other settings,
// including 0 % and 100 % duty, and that load sets the carrier phase.
`timescale 1ns/1ps
module tb_pwm_gen;
  logic        clk = 0, rst_n = 0, load = 0;
  logic [15:0] counter_init = '0, duty = '0, period = '0;
  logic        pwm;
  logic [15:0] count;
  int checks = 0, failures = 0;

  pwm_gen dut (.*);
  always #12.5 clk = ~clk;

  // Measure on-clocks and rising-edge spacing over several periods.
  task automatic measure(input int p, input int d);
    int on_cnt, rises, first_rise, last_rise, n;
    logic prev;
    #1 period = 16'(p); duty = 16'(d); load = 1;
    @(posedge clk); #1 load = 0;
    repeat (p + 2) @(posedge clk);   // let one full period pass
    on_cnt = 0; rises = 0; first_rise = -1; last_rise = -1;
    prev = pwm;
    for (n = 0; n < 4 * p; n++) begin
      @(posedge clk); #1;
      if (pwm) on_cnt++;
      if (pwm && !prev) begin
        if (first_rise < 0) first_rise = n;
        last_rise = n;
        rises++;
      end
      prev = pwm;
    end
    checks++;
    if (on_cnt != 4 * ((d > p) ? p : d)) begin
      failures++;
      $display("FAIL period %0d duty %0d: %0d on-clocks in 4 periods", p, d, on_cnt);
    end
    if (d > 0 && d < p) begin
      checks++;
      if (rises < 3 || (last_rise - first_rise) != (rises - 1) * p) begin
        failures++;
        $display("FAIL period %0d: rises %0d span %0d", p, rises, last_rise - first_rise);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    measure(1000, 500);
    measure(1000, 250);
    measure(37, 5);
    measure(20, 0);
    measure(20, 20);
    measure(20, 25);
    // load sets the phase: count follows counter_init
    #1 counter_init = 16'd123; period = 16'd1000; load = 1;
    @(posedge clk); #1 load = 0;
    checks++;
    if (count != 16'd123) begin failures++; $display("FAIL load: count %0d", count); end
    @(posedge clk); #1;
    checks++;
    if (count != 16'd124) begin failures++; $display("FAIL count step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

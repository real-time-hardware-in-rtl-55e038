// tb_loop_rate_meter: gives iteration pulses at random spacings (and at the
// 6-clock spacing of the buck loop) and checks the reported tick count
// against the spacing the testbench used.
`timescale 1ns/1ps
module tb_loop_rate_meter;
  logic        clk = 0, rst_n = 0, iter = 0;
  logic [31:0] loop_rate;
  logic        rate_valid;
  int checks = 0, failures = 0;

  loop_rate_meter dut (.*);
  always #12.5 clk = ~clk;

  task automatic pulse_after(input int gap);
    repeat (gap - 1) @(posedge clk);
    #1 iter = 1;
    @(posedge clk);
    #1 iter = 0;
  endtask

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pulse_after(5);
    checks++;
    if (rate_valid) begin failures++; $display("FAIL valid after one iteration"); end
    for (int i = 0; i < 60; i++) begin
      gap = (i < 20) ? 6 : (i == 20 ? 1 : $urandom_range(1, 200));
      pulse_after(gap);
      checks++;
      if (!rate_valid || loop_rate != 32'(gap)) begin
        failures++;
        $display("FAIL gap %0d reported %0d (valid %0b)", gap, loop_rate, rate_valid);
      end
    end
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

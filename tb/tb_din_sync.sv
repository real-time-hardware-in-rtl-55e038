// tb_din_sync: drives random 3-bit input patterns and checks that each
// appears on the output exactly two clocks later.
`timescale 1ns/1ps
module tb_din_sync;
  logic       clk = 0, rst_n = 0;
  logic [2:0] d_async = '0, d_sync;
  logic [2:0] hist [4];
  int checks = 0, failures = 0;

  din_sync #(.WIDTH(3), .STAGES(2)) dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    for (int i = 0; i < 200; i++) begin
      #1 d_async = 3'($urandom_range(0, 7));
      hist[0] = d_async;
      @(posedge clk); #1;
      // hist[1] was applied one clock before hist[0], hist[2] two before.
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      if (i >= 2) begin
        checks++;
        if (d_sync != hist[2]) begin
          failures++;
          $display("FAIL step %0d: got %b expected %b", i, d_sync, hist[2]);
        end
      end
    end
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

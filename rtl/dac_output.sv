// dac_output: writes two model variables to the analog outputs at a fixed
// sample time.
//
// Every sample_time time units (TICKS_PER_UNIT clocks each) it samples ch0
// and ch1, multiplies each by its gain and presents the results on ao0/ao1
// with a one-cycle ao_strobe for the analog-output module. For the buck
// converter ch0 is the output voltage with GAIN0 = 0.5, which keeps a 12 V
// output inside the converter's full-scale range (1 V shown per 2 V
// simulated), and ch1 the inductor current with gain 1. A sample_time of 0
// writes every clock.
//
// Values are signed 32-bit words with FRAC fractional bits (<+/-,32,6> by
// default, see hil_fxp_pkg); gains are unsigned with 16 fractional bits. The loop structure (wait, then write) and the 0.5 gain
// follow the published program; the time unit of sample_time (1 us by
// default) and the gain format are this design's choices. Results saturate.
// The first write happens one full sample time after reset.
module dac_output
  import hil_fxp_pkg::*;
#(
  parameter int unsigned TICKS_PER_UNIT = 40,          // 1 us at 40 MHz
  parameter int unsigned FRAC           = F_S32_6,     // fraction bits of ch/ao
  parameter logic [17:0] GAIN0          = 18'h0_8000,  // 0.5
  parameter logic [17:0] GAIN1          = 18'h1_0000   // 1.0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] sample_time,
  input  logic signed [31:0] ch0,
  input  logic signed [31:0] ch1,
  output logic signed [31:0] ao0,
  output logic signed [31:0] ao1,
  output logic        ao_strobe
);
  localparam int unsigned GAIN_FRAC = 16;

  logic [63:0] wait_ticks;
  logic [63:0] cnt;
  assign wait_ticks = 64'(sample_time) * 64'(TICKS_PER_UNIT);

  logic signed [31:0] sc0, sc1;
  assign sc0 = 32'(fx_fit(wide_t'(ch0) * wide_t'(GAIN0),
                          FRAC + GAIN_FRAC, 32, FRAC, 1'b1));
  assign sc1 = 32'(fx_fit(wide_t'(ch1) * wide_t'(GAIN1),
                          FRAC + GAIN_FRAC, 32, FRAC, 1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 64'd1;
      ao0       <= '0;
      ao1       <= '0;
      ao_strobe <= 1'b0;
    end else begin
      ao_strobe <= 1'b0;
      if (cnt >= wait_ticks) begin
        cnt       <= 64'd1;
        ao0       <= sc0;
        ao1       <= sc1;
        ao_strobe <= 1'b1;
      end else begin
        cnt <= cnt + 64'd1;
      end
    end
  end
endmodule

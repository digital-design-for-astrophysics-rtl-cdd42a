// Sawtooth test source, selectable in place of the ADC.
//
// For bench tests without a light signal the firmware can replace the ADC
// data with a ramp. In test mode every adc_clk cycle produces one rising and
// one falling 32-bit word whose eight 8-bit samples all carry the same ramp
// value; the value then advances by STEP and wraps from 255 to 0, giving a
// sawtooth that spans the full 8-bit range. With test mode off the captured
// ADC words pass through unchanged. test_mode comes from a register in the
// processing clock domain and is synchronised here; the ramp restarts at 0
// whenever test mode is off. Output is registered: one clock of latency.
//
// Following the original firmware description: a firmware sawtooth source feeding the peak finder, the
// 0..255 ramp, and equal bytes across the bus in the logic-analyser capture.
// This design's choices: one ramp step per ADC clock, and the mode switch.
module sawtooth_gen
  import daq_pkg::*;
#(
  parameter int unsigned BUS_W = ADC_BUS_W,
  parameter int unsigned SW    = SAMPLE_W,
  parameter int unsigned STEP  = 1
) (
  input  logic             adc_clk,
  input  logic             rst,
  input  logic             test_mode,     // asynchronous level
  input  logic [BUS_W-1:0] adc_rise,
  input  logic [BUS_W-1:0] adc_fall,
  input  logic             adc_valid,
  output logic [BUS_W-1:0] out_rise,
  output logic [BUS_W-1:0] out_fall,
  output logic             out_valid
);

  logic          mode;
  logic [SW-1:0] ramp;

  sync_2ff #(.W(1)) u_sync (.clk(adc_clk), .rst, .d(test_mode), .q(mode));

  always_ff @(posedge adc_clk) begin
    if (rst) begin
      ramp      <= '0;
      out_rise  <= '0;
      out_fall  <= '0;
      out_valid <= 1'b0;
    end else if (mode) begin
      ramp      <= ramp + SW'(STEP);
      out_rise  <= {(BUS_W/SW){ramp}};
      out_fall  <= {(BUS_W/SW){ramp}};
      out_valid <= 1'b1;
    end else begin
      ramp      <= '0;
      out_rise  <= adc_rise;
      out_fall  <= adc_fall;
      out_valid <= adc_valid;
    end
  end

endmodule

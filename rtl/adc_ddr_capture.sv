// Capture of the ADC's double-data-rate bus.
//
// The ADC sends four 8-bit samples on every rising and every falling edge of
// its 375 MHz clock over a 32-bit bus. The word on the bus at a rising edge is
// registered on that edge, the word at the following falling edge on that
// edge, and on the next rising edge both are presented together on
// rise_word / fall_word, with rise_word the earlier in time. word_valid goes
// high one cycle after reset and stays high, as the ADC streams continuously.
// Latency: a rising-edge word reaches rise_word one clock after capture.
//
// Following the original firmware description: the bus width, four samples per edge, both clock edges.
// This design's choices: sample 0 of a bus word in bits [7:0], and the
// rising-edge word taken as the earlier half of each clock period. On an FPGA
// the two capture flops would sit in the input pad's DDR register.
module adc_ddr_capture #(
  parameter int unsigned BUS_W = 32
) (
  input  logic             adc_clk,
  input  logic             rst,
  input  logic [BUS_W-1:0] adc_data,
  output logic [BUS_W-1:0] rise_word,
  output logic [BUS_W-1:0] fall_word,
  output logic             word_valid
);

  logic [BUS_W-1:0] q_rise, q_fall;

  always_ff @(posedge adc_clk) q_rise <= adc_data;
  always_ff @(negedge adc_clk) q_fall <= adc_data;

  always_ff @(posedge adc_clk) begin
    if (rst) begin
      rise_word  <= '0;
      fall_word  <= '0;
      word_valid <= 1'b0;
    end else begin
      rise_word  <= q_rise;
      fall_word  <= q_fall;
      word_valid <= 1'b1;
    end
  end

endmodule

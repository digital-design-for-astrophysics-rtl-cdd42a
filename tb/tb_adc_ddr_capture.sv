// Self-checking testbench of adc_ddr_capture.
//
// Drives a new random word onto the bus for every clock edge, a quarter
// period after the edge before it, and checks that each rising-edge word and
// the falling-edge word after it come out together one clock later.
`timescale 1ps/1ps
module tb_adc_ddr_capture;
  localparam int W = 32;
  logic         clk = 0, rst = 1;
  logic [W-1:0] bus = '0, rise_word, fall_word;
  logic         word_valid;

  adc_ddr_capture #(.BUS_W(W)) dut (
    .adc_clk(clk), .rst, .adc_data(bus), .rise_word, .fall_word, .word_valid
  );

  localparam int HALF = 1333;
  always #HALF clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] at_rise[$], at_fall[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new bus word a quarter period after each edge, recorded for the next edge
  always @(posedge clk) begin
    #(HALF/2) bus = $urandom;
    at_fall.push_back(bus);
  end
  always @(negedge clk) begin
    #(HALF/2) bus = $urandom;
    at_rise.push_back(bus);
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(!word_valid, "no valid word in reset");
    @(negedge clk) rst = 0;
    // drop the words queued before the first captured rising edge
    at_rise.delete(); at_fall.delete();
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk); #1;
      check(word_valid, "valid after reset");
      if (at_rise.size() > 0 && at_fall.size() > 0) begin
        check(rise_word == at_rise.pop_front(), "rising-edge word");
        check(fall_word == at_fall.pop_front(), "falling-edge word");
      end else begin
        check(0, "word queue empty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

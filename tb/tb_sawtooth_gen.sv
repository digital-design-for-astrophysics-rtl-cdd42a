// Self-checking testbench of sawtooth_gen.
//
// With test mode off, random ADC words must pass through with one clock of
// latency. With test mode on, every output sample of a cycle must carry the
// same ramp value, the value must rise by STEP per clock starting from 0 and
// wrap from 255 to 0. Switches the mode several times.
`timescale 1ps/1ps
module tb_sawtooth_gen;
  logic        clk = 0, rst = 1, test_mode = 0, in_valid = 0;
  logic [31:0] in_r = '0, in_f = '0, out_r, out_f;
  logic        out_valid;

  sawtooth_gen #(.STEP(1)) dut (
    .adc_clk(clk), .rst, .test_mode, .adc_rise(in_r), .adc_fall(in_f), .adc_valid(in_valid),
    .out_rise(out_r), .out_fall(out_f), .out_valid
  );

  always #1333 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0, switches = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pr, pf;
    logic        pv;
    logic [7:0]  expect_v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int round = 0; round < 4; round++) begin
      // pass-through
      test_mode = 0;
      repeat (4) @(negedge clk);   // synchroniser latency
      for (int n = 0; n < 200; n++) begin
        pr = $urandom; pf = $urandom; pv = 1'($urandom);
        in_r = pr; in_f = pf; in_valid = pv;
        @(posedge clk); #1;
        check(out_r == pr && out_f == pf && out_valid == pv, "pass-through");
        @(negedge clk);
      end
      // ramp
      test_mode = 1; switches++;
      // wait for the first ramp value 0 after the mode change
      do begin @(posedge clk); #1; end
      while (!(out_valid && out_r == 32'h0));
      expect_v = 8'd0;
      for (int n = 0; n < 300 + 37 * round; n++) begin
        in_r = $urandom; in_f = $urandom;
        check(out_valid, "ramp valid");
        check(out_r == {4{expect_v}} && out_f == {4{expect_v}}, "ramp value, equal bytes");
        if (expect_v == 8'hff) wraps++;
        expect_v = expect_v + 8'd1;
        @(posedge clk); #1;
      end
    end
    check(wraps >= 4 && switches == 4, "ramp wrapped and mode switched");
    $display("wraps=%0d switches=%0d", wraps, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

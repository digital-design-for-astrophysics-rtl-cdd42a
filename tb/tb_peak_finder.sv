// Self-checking testbench of peak_finder.
//
// Drives random 256-bit words of low samples with occasional spikes, with
// data_valid gaps, and compares every forwarded word and its cycle against a
// reference that counts the words still owed after each hit: a hit owes
// ceil(read_size / 32) further words. Checks the one-cycle latency, the
// window length for read sizes on and off word boundaries, retriggers inside
// a window, the in_enable read strobe and reset.
`timescale 1ns/1ps
module tb_peak_finder;
  localparam int NS = 32;
  localparam int SW = 8;

  logic            clk = 0, reset = 1, empty = 0, data_valid = 0;
  logic [NS*SW-1:0] data_in = '0, data_out;
  logic [7:0]      thr = 8'd100;
  logic [15:0]     rsize = 16'd64;
  logic            out_enable, in_enable, trigger, retrigger;

  peak_finder dut (
    .clk, .reset, .empty, .data_in, .signal_threshold(thr), .data_valid,
    .user_samples_after_trig(rsize), .data_out, .out_enable, .in_enable,
    .trigger, .retrigger
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hits = 0, n_retrig = 0, n_sent = 0, n_gap = 0;
  int owed = 0;                  // words still owed by the reference
  logic             exp_en = 0;  // reference: out_enable expected this cycle
  logic [NS*SW-1:0] exp_word = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [NS*SW-1:0] rand_word(input bit spike);
    logic [NS*SW-1:0] w;
    for (int i = 0; i < NS; i++) w[i*SW +: SW] = 8'($urandom_range(0, 100));
    if (spike) w[$urandom_range(0, NS-1)*SW +: SW] = 8'($urandom_range(101, 255));
    return w;
  endfunction

  function automatic int words_after(input int rs);
    return (rs + NS - 1) / NS;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes[8] = '{0, 1, 31, 32, 33, 64, 100, 300};
    repeat (3) @(posedge clk);
    // in reset: no reads, no output
    #1;
    check(!in_enable && !out_enable, "quiet in reset");
    @(negedge clk) reset = 0;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit hit, spike;
      @(negedge clk);
      // compare what the DUT produced for the previous cycle
      check(out_enable == exp_en, "out_enable timing");
      if (exp_en) check(data_out == exp_word, "forwarded word");
      if (out_enable) n_sent++;
      // change the read size only while no window is open
      if (owed == 0 && $urandom_range(0, 19) == 0) rsize = 16'(sizes[$urandom_range(0, 7)]);
      empty      = $urandom_range(0, 9) != 0;
      data_valid = $urandom_range(0, 3) != 0;
      if (!data_valid) n_gap++;
      spike      = $urandom_range(0, 29) == 0;
      data_in    = rand_word(spike);
      #1;
      check(in_enable == empty, "in_enable follows data availability");
      hit = data_valid && spike;
      check(trigger == hit, "trigger flag");
      check(retrigger == (hit && owed > 0), "retrigger flag");
      if (hit) begin
        n_hits++;
        if (owed > 0) n_retrig++;
        exp_en = 1; exp_word = data_in;
        owed = words_after(int'(rsize));
      end else if (data_valid && owed > 0) begin
        exp_en = 1; exp_word = data_in;
        owed--;
      end else begin
        exp_en = 0;
      end
    end
    // reset in the middle of a window clears it
    @(negedge clk); data_valid = 1; data_in = rand_word(1); rsize = 16'd1000;
    @(negedge clk); data_valid = 1; data_in = rand_word(0); reset = 1;
    @(negedge clk); reset = 0; data_valid = 1; data_in = rand_word(0);
    @(negedge clk);
    check(!out_enable, "window closed by reset");

    $display("hits=%0d retriggers=%0d words_sent=%0d valid_gaps=%0d", n_hits, n_retrig, n_sent, n_gap);
    check(n_hits > 100 && n_retrig > 10 && n_gap > 100, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

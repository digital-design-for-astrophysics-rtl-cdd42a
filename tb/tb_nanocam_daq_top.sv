// End-to-end testbench of nanocam_daq_top at its default sizes.
//
// An ADC model drives the 32-bit DDR bus at 375 MHz with low noise samples
// and occasional spikes and records every sample in time order. The host is
// modelled by register writes on the 100 MHz clock and the network side by a
// reader on a 125 MHz clock. Phases:
//   A  several bursts of spikes, each with its own read size set while the
//      input is quiet; every word leaving the Ethernet FIFO is compared with
//      a reference peak finder run on the recorded samples (word alignment
//      is found from the first output word). Trigger and retrigger counts
//      are compared too.
//   B  sawtooth test source: the output words must be ramp segments (eight
//      equal samples per ADC clock, rising by one) that cross the threshold.
//   C  the reader stops while every word is a hit: the Ethernet FIFO must
//      overflow, report it in the status register and then hold exactly
//      ETH_FIFO_DEPTH words.
// It counts how often each mechanism happened and fails for any that never
// did.
`timescale 1ps/1ps
module tb_nanocam_daq_top;
  import daq_pkg::*;

  localparam int ETH_DEPTH = 512;   // the top's default Ethernet FIFO depth
  localparam int NS = 32;

  logic         reset = 1;
  logic         adc_clk = 0, master_clk = 0, eth_clk = 0;
  logic [31:0]  adc_data = '0;
  logic         reg_wr = 0;
  logic [3:0]   reg_addr = '0;
  logic [31:0]  reg_wdata = '0, reg_rdata;
  logic         send_enable, peak_trigger, peak_retrigger;
  logic         eth_rd_en = 0;
  logic [255:0] eth_dout;
  logic         eth_dout_valid, eth_empty, eth_fifo_overflow;

  nanocam_daq_top dut (
    .reset, .adc_clk, .adc_data, .master_clk, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .send_enable, .peak_trigger, .peak_retrigger,
    .eth_clk, .eth_rd_en, .eth_dout, .eth_dout_valid, .eth_empty, .eth_fifo_overflow
  );

  localparam int ADC_HALF = 1333;   // 375 MHz
  always #ADC_HALF adc_clk = ~adc_clk;
  always #5000 master_clk = ~master_clk;
  always #4000 eth_clk = ~eth_clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC model ----------------
  byte unsigned smp[$];        // every driven sample, in time order
  int           smp_rs[$];     // read size in force when the sample was driven
  int           cur_rs = 32;
  int           spike_pct = 0;  // chance per bus word of one spike, in percent
  bit           all_high = 0;   // every sample above any threshold below 128

  function automatic logic [31:0] adc_word();
    logic [31:0] w;
    for (int i = 0; i < 4; i++) w[i*8 +: 8] = all_high ? 8'($urandom_range(128, 255))
                                                       : 8'($urandom_range(0, 60));
    if (!all_high && $urandom_range(0, 99) < spike_pct)
      w[$urandom_range(0, 3)*8 +: 8] = 8'($urandom_range(120, 255));
    return w;
  endfunction

  bit recording = 0;   // start with a rising-edge word
  task automatic drive_word(input bit for_rise);
    logic [31:0] w;
    w = adc_word();
    adc_data = w;
    if (for_rise) recording = 1;
    if (!recording) return;
    for (int i = 0; i < 4; i++) begin
      smp.push_back(w[i*8 +: 8]);
      smp_rs.push_back(cur_rs);
    end
  endtask

  // a new bus word a quarter period after every edge, so each edge sees its own
  always @(posedge adc_clk) begin #(ADC_HALF/2); drive_word(1'b0); end
  always @(negedge adc_clk) begin #(ADC_HALF/2); drive_word(1'b1); end

  // ---------------- host registers ----------------
  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge master_clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge master_clk); reg_wr = 0;
  endtask
  task automatic reg_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge master_clk); reg_addr = a;
    @(negedge master_clk); @(negedge master_clk); d = reg_rdata;
  endtask

  // ---------------- network side reader ----------------
  bit           drain = 1;
  logic [255:0] got[$];
  always @(negedge eth_clk) eth_rd_en <= drain && !reset;
  always @(posedge eth_clk) if (eth_dout_valid) got.push_back(eth_dout);

  // ---------------- mechanism counters ----------------
  int n_trig = 0, n_retrig = 0, n_ovf = 0, n_saw_words = 0, n_mode_switch = 0;
  int n_rs_values = 0, n_window_words = 0;
  always @(posedge master_clk) begin
    if (!reset) begin
      if (peak_trigger) n_trig++;
      if (peak_retrigger) n_retrig++;
      if (eth_fifo_overflow) n_ovf++;
    end
  end

  task automatic wait_adc(input int n);
    repeat (n) @(posedge adc_clk);
  endtask

  // ---------------- reference peak finder ----------------
  task automatic reference(input int off, input int thr, output logic [255:0] exp_q[$],
                           output int hits, output int rehits, output int tail);
    int owed = 0;
    hits = 0; rehits = 0; tail = 0;
    exp_q.delete();
    for (int base = off; base + NS <= smp.size(); base += NS) begin
      logic [255:0] w;
      bit hit;
      hit = 0;
      for (int i = 0; i < NS; i++) begin
        w[i*8 +: 8] = smp[base + i];
        if (int'(smp[base + i]) > thr) hit = 1;
      end
      if (hit) begin
        hits++;
        if (owed > 0) rehits++;
        exp_q.push_back(w);
        owed = (smp_rs[base] + NS - 1) / NS;
      end else if (owed > 0) begin
        exp_q.push_back(w);
        tail++;
        owed--;
      end
    end
  endtask

  initial begin
    logic [31:0]  d;
    logic [255:0] exp_q[$];
    static int rs_list[6] = '{0, 1, 32, 33, 100, 300};
    int off, hits, rehits, tail, n_a, trig_a, retrig_a;

    #30000;
    reset = 0;
    repeat (10) @(posedge master_clk);
    reg_read(4'h0, d);
    check(d == 32'hff, "threshold reset value");
    reg_write(4'h0, 32'd100);              // threshold
    reg_write(4'h2, 32'h1);                // send enable, ADC source
    check(send_enable, "send_enable set");
    reg_read(4'h0, d);
    check(d == 32'd100, "threshold read back");

    // ---------- phase A: bursts with different read sizes ----------
    wait_adc(300);
    foreach (rs_list[k]) begin
      cur_rs = rs_list[k];
      reg_write(4'h1, 32'(cur_rs));
      n_rs_values++;
      wait_adc(100);
      spike_pct = (k % 2 == 0) ? 2 : 8;
      wait_adc(1500);
      spike_pct = 0;
      wait_adc(400);                       // quiet: longer than any window
    end
    repeat (200) @(posedge eth_clk);
    trig_a = n_trig; retrig_a = n_retrig;
    n_a = got.size();
    check(n_a > 0, "phase A produced output");
    // find the word alignment from the first output word
    off = -1;
    if (n_a > 0) begin
      for (int p = 0; p + NS <= smp.size() && off < 0; p++) begin
        bit m;
        m = 1;
        for (int i = 0; i < NS && m; i++) if (smp[p + i] != got[0][i*8 +: 8]) m = 0;
        if (m) off = p % NS;
      end
    end
    check(off >= 0, "first output word found in the ADC stream");
    check(off % 8 == 0, "word boundary on an ADC clock");
    if (off >= 0) begin
      reference(off, 100, exp_q, hits, rehits, tail);
      n_window_words = tail;
      check(exp_q.size() == n_a, $sformatf("word count %0d expected %0d", n_a, exp_q.size()));
      for (int i = 0; i < n_a && i < exp_q.size(); i++)
        check(got[i] == exp_q[i], $sformatf("output word %0d", i));
      check(hits == trig_a, $sformatf("triggers %0d expected %0d", trig_a, hits));
      check(rehits == retrig_a, $sformatf("retriggers %0d expected %0d", retrig_a, rehits));
    end
    reg_read(4'h3, d);
    check(d == 32'd0, "no overflow in phase A");
    got.delete();

    // ---------- phase B: sawtooth test source ----------
    reg_write(4'h1, 32'd0);
    reg_write(4'h0, 32'd250);
    reg_write(4'h2, 32'h3);
    n_mode_switch++;
    wait_adc(3000);
    reg_write(4'h2, 32'h1);
    n_mode_switch++;
    wait_adc(300);
    repeat (100) @(posedge eth_clk);
    check(got.size() >= 8, "sawtooth words selected");
    foreach (got[k]) begin
      bit ramp_ok, above;
      ramp_ok = 1; above = 0;
      for (int i = 0; i < NS; i++) begin
        byte unsigned v, v0;
        v  = got[k][i*8 +: 8];
        v0 = got[k][(i/8)*64 +: 8];
        if (v != v0) ramp_ok = 0;
        if (i >= 8 && v0 != 8'(got[k][(i/8 - 1)*64 +: 8] + 8'd1)) ramp_ok = 0;
        if (v > 8'd250) above = 1;
      end
      check(ramp_ok && above, $sformatf("sawtooth word %0d", k));
      if (ramp_ok) n_saw_words++;
    end
    got.delete();

    // ---------- phase C: Ethernet FIFO overflow ----------
    drain = 0;
    reg_write(4'h0, 32'd100);
    all_high = 1;
    wait_adc(2500);                        // > 512 words of 32 samples
    all_high = 0;
    wait_adc(200);
    reg_read(4'h3, d);
    check(d[0] == 1'b1 && d[2:1] == 2'b00, "status: Ethernet FIFO overflow only");
    check(n_ovf > 0, "overflow pulses seen");
    drain = 1;
    repeat (ETH_DEPTH + 100) @(posedge eth_clk);
    check(got.size() == ETH_DEPTH, $sformatf("FIFO held %0d words", got.size()));
    foreach (got[k]) begin
      bit high;
      high = 1;
      for (int i = 0; i < NS; i++) if (got[k][i*8 +: 8] < 8'd128) high = 0;
      if (k >= 2 && k < 16) check(high, "overflow phase words are hit words");
    end

    $display("triggers=%0d retriggers=%0d window_words=%0d read_sizes=%0d sawtooth_words=%0d mode_switches=%0d overflow_pulses=%0d",
             n_trig, n_retrig, n_window_words, n_rs_values, n_saw_words, n_mode_switch, n_ovf);
    check(n_trig > 0,         "mechanism: trigger");
    check(n_retrig > 0,       "mechanism: retrigger");
    check(n_window_words > 0, "mechanism: post-trigger window");
    check(n_saw_words > 0,    "mechanism: sawtooth source");
    check(n_mode_switch == 2, "mechanism: source switch");
    check(n_ovf > 0,          "mechanism: Ethernet FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

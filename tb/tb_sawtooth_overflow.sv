// Workload testbench: the bench test with the sawtooth source and a slow
// network side, at the top's default sizes.
//
// The sawtooth source feeds the peak finder with a low threshold, so most
// words are selected, while the network reader takes only one word in four
// of its clocks. The Ethernet FIFO must overflow. The checks are:
//   * every word that reaches the network is an intact ramp segment: eight
//     equal samples per ADC clock, rising by one from group to group;
//   * words written = words received + words dropped, with the written count
//     taken from the peak finder's monitor outputs and the dropped count
//     from the overflow pulses;
//   * the received ramp has gaps where words were dropped, and is continuous
//     elsewhere;
//   * the status register reports the Ethernet FIFO overflow and no ADC FIFO
//     overflow.
`timescale 1ps/1ps
module tb_sawtooth_overflow;
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

  always #1333 adc_clk = ~adc_clk;
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

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge master_clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge master_clk); reg_wr = 0;
  endtask
  task automatic reg_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge master_clk); reg_addr = a;
    @(negedge master_clk); @(negedge master_clk); d = reg_rdata;
  endtask

  // with a read size of 0 every hit writes exactly one word into the
  // Ethernet FIFO, so the trigger monitor counts the words written
  int  n_written = 0, n_dropped = 0, n_received = 0, n_gaps = 0, n_cont = 0;
  bit  counting = 0;

  always @(posedge master_clk) begin
    if (counting && eth_fifo_overflow) n_dropped++;
  end

  // network side: one read every fourth clock while slow, every clock after
  bit slow = 1, drain = 0;
  int phase = 0;
  always @(negedge eth_clk) begin
    phase = (phase + 1) % 4;
    eth_rd_en <= drain && (!slow || phase == 0);
  end

  logic [7:0] last_end;
  bit         have_last = 0;
  always @(posedge eth_clk) begin
    if (eth_dout_valid && counting) begin
      bit ok;
      logic [7:0] g0;
      ok = 1;
      g0 = eth_dout[7:0];
      for (int i = 0; i < NS; i++) begin
        if (eth_dout[i*8 +: 8] != 8'(g0 + 8'(i / 8))) ok = 0;
      end
      check(ok, $sformatf("received word %0d is a ramp segment", n_received));
      if (have_last) begin
        if (g0 == 8'(last_end + 8'd1)) n_cont++;
        else n_gaps++;
      end
      last_end  = 8'(g0 + 8'd3);
      have_last = 1;
      n_received++;
    end
  end

  initial begin
    logic [31:0] d;
    int wr_before;
    #30000;
    reset = 0;
    repeat (10) @(posedge master_clk);
    reg_write(4'h1, 32'd0);        // read size 0: only hit words
    reg_write(4'h2, 32'h3);        // sawtooth source, sender on
    // let the ramp start with nothing selected, then count from an empty FIFO
    repeat (50) @(posedge master_clk);
    check(eth_empty, "nothing selected at threshold 255");
    @(negedge master_clk);
    counting = 1; drain = 1;
    n_written = 0;
    reg_write(4'h0, 32'd3);        // low threshold: nearly every word is a hit
    fork
      begin
        // count written words over the measurement period
        while (counting) begin
          @(posedge master_clk);
          if (peak_trigger) n_written++;   // read size 0: one word per hit
        end
      end
      begin
        repeat (4000) @(posedge master_clk);
        reg_write(4'h0, 32'd255);   // stop selecting
        repeat (20) @(posedge master_clk);
        slow = 0;                   // drain the rest at full speed
        repeat (1200) @(posedge eth_clk);
        counting = 0;
      end
    join
    reg_read(4'h3, d);
    check(d[0], "status: Ethernet FIFO overflowed");
    check(d[2:1] == 2'b00, "status: no ADC FIFO overflow");
    $display("written=%0d received=%0d dropped=%0d gaps=%0d continuous=%0d",
             n_written, n_received, n_dropped, n_gaps, n_cont);
    check(n_written == n_received + n_dropped, "written = received + dropped");
    check(n_dropped > 0, "overflow happened");
    check(n_gaps > 0 && n_cont > 0, "ramp shows both gaps and continuous stretches");
    check(eth_empty, "FIFO drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

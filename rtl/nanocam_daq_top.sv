// Top of the photon-counter data acquisition firmware.
//
// Data path, one clock domain per stage:
//   adc_clk (375 MHz): adc_ddr_capture registers the 32-bit DDR bus on both
//     edges; sawtooth_gen either passes the two words on or replaces them with
//     a test ramp; adc_fifo_r takes the rising-edge words, adc_fifo_f the
//     falling-edge words, each packing four 32-bit words into 128 bits.
//   master_clk (100 MHz): when neither ADC FIFO is empty (the OR of the two
//     empty flags, inverted, as in the peak finder's schematic) the peak
//     finder pops both; the two 128-bit halves are interleaved back into
//     time order, rise0 fall0 rise1 fall1 ..., as one 256-bit word of 32
//     samples. Words the peak finder selects go into the Ethernet FIFO.
//     user_regs holds the host's settings.
//   eth_clk: the network interface pops selected words from the Ethernet FIFO.
// The network interface itself (packet building, the host's register access,
// the data sender switched by send_enable) is outside this design; its
// signals are the ports below. reset is asynchronous, active high, and is
// released in each domain through a reset_sync.
//
// Throughput: 375 MHz x 8 samples = 3 Gsample/s in, 100 MHz x 32 samples =
// 3.2 Gsample/s processed, so the ADC FIFOs never fill. The Ethernet FIFO
// fills when selected words arrive faster than the network drains them;
// words are then dropped and eth_fifo_overflow pulses.
//
// Following the original firmware description: the clock rates, the bus
// format, the two edge FIFOs whose OR-ed, inverted empty flags drive the peak
// finder, the 256-bit path into an Ethernet FIFO and the register-set
// threshold and read size. This design's choices: the FIFO depths, the time
// order of the interleave, the register bus and the reset scheme.
module nanocam_daq_top
  import daq_pkg::*;
#(
  parameter int unsigned ADC_FIFO_DEPTH = 128,  // 128-bit entries per edge FIFO
  parameter int unsigned ETH_FIFO_DEPTH = 512   // 256-bit entries
) (
  input  logic                  reset,

  input  logic                  adc_clk,
  input  logic [ADC_BUS_W-1:0]  adc_data,

  input  logic                  master_clk,
  input  logic                  reg_wr,
  input  logic [REG_ADDR_W-1:0] reg_addr,
  input  logic [REG_DATA_W-1:0] reg_wdata,
  output logic [REG_DATA_W-1:0] reg_rdata,
  output logic                  send_enable,
  output logic                  peak_trigger,     // monitor: a word crossed the threshold
  output logic                  peak_retrigger,   // monitor: a hit inside an open window

  input  logic                  eth_clk,
  input  logic                  eth_rd_en,
  output logic [WORD_W-1:0]     eth_dout,
  output logic                  eth_dout_valid,
  output logic                  eth_empty,
  output logic                  eth_fifo_overflow
);

  // ---------------- resets ----------------
  logic rst_adc, rst_mst, rst_eth;
  reset_sync u_rst_adc (.clk(adc_clk),    .rst_in(reset), .rst_out(rst_adc));
  reset_sync u_rst_mst (.clk(master_clk), .rst_in(reset), .rst_out(rst_mst));
  reset_sync u_rst_eth (.clk(eth_clk),    .rst_in(reset), .rst_out(rst_eth));

  // ---------------- registers ----------------
  logic [THRESH_W-1:0]    threshold;
  logic [READ_SIZE_W-1:0] read_size;
  logic                   test_mode;
  logic [2:0]             status;
  logic                   adc_r_ovf_seen, adc_f_ovf_seen, eth_ovf_seen;
  logic [1:0]             adc_ovf_sync;

  sync_2ff #(.W(2)) u_ovf_sync (
    .clk(master_clk), .rst(rst_mst),
    .d({adc_f_ovf_seen, adc_r_ovf_seen}), .q(adc_ovf_sync)
  );
  assign status = {adc_ovf_sync, eth_ovf_seen};

  user_regs u_regs (
    .clk(master_clk), .rst(rst_mst),
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .status, .threshold, .read_size, .send_enable, .test_mode
  );

  // ---------------- ADC domain ----------------
  logic [ADC_BUS_W-1:0] cap_rise, cap_fall, src_rise, src_fall;
  logic                 cap_valid, src_valid;

  adc_ddr_capture #(.BUS_W(ADC_BUS_W)) u_capture (
    .adc_clk, .rst(rst_adc), .adc_data,
    .rise_word(cap_rise), .fall_word(cap_fall), .word_valid(cap_valid)
  );

  sawtooth_gen u_sawtooth (
    .adc_clk, .rst(rst_adc), .test_mode,
    .adc_rise(cap_rise), .adc_fall(cap_fall), .adc_valid(cap_valid),
    .out_rise(src_rise), .out_fall(src_fall), .out_valid(src_valid)
  );

  logic [HALF_W-1:0] r_dout, f_dout;
  logic              r_valid, f_valid, r_empty, f_empty;
  logic              pulse_finder_in_en;

  adc_fifo #(.IN_W(ADC_BUS_W), .RATIO(EDGE_WORDS), .DEPTH(ADC_FIFO_DEPTH)) adc_fifo_r (
    .wr_clk(adc_clk), .wr_rst(rst_adc), .wr_en(src_valid), .din(src_rise),
    .overflow(), .overflow_seen(adc_r_ovf_seen),
    .rd_clk(master_clk), .rd_rst(rst_mst), .rd_en(pulse_finder_in_en),
    .dout(r_dout), .dout_valid(r_valid), .empty(r_empty)
  );

  adc_fifo #(.IN_W(ADC_BUS_W), .RATIO(EDGE_WORDS), .DEPTH(ADC_FIFO_DEPTH)) adc_fifo_f (
    .wr_clk(adc_clk), .wr_rst(rst_adc), .wr_en(src_valid), .din(src_fall),
    .overflow(), .overflow_seen(adc_f_ovf_seen),
    .rd_clk(master_clk), .rd_rst(rst_mst), .rd_en(pulse_finder_in_en),
    .dout(f_dout), .dout_valid(f_valid), .empty(f_empty)
  );

  // ---------------- processing domain ----------------
  logic [WORD_W-1:0] peak_finder_din, ethernet_fifo_din;
  logic              ethernet_fifo_in_en;
  logic              adc_data_avail;

  assign adc_data_avail = ~(r_empty | f_empty);

  always_comb begin
    for (int i = 0; i < int'(EDGE_WORDS); i++) begin
      peak_finder_din[(2*i)*ADC_BUS_W   +: ADC_BUS_W] = r_dout[i*ADC_BUS_W +: ADC_BUS_W];
      peak_finder_din[(2*i+1)*ADC_BUS_W +: ADC_BUS_W] = f_dout[i*ADC_BUS_W +: ADC_BUS_W];
    end
  end

  peak_finder u_peak_finder (
    .clk(master_clk), .reset(rst_mst),
    .empty(adc_data_avail),
    .data_in(peak_finder_din),
    .signal_threshold(threshold),
    .data_valid(r_valid && f_valid),
    .user_samples_after_trig(read_size),
    .data_out(ethernet_fifo_din),
    .out_enable(ethernet_fifo_in_en),
    .in_enable(pulse_finder_in_en),
    .trigger(peak_trigger),
    .retrigger(peak_retrigger)
  );

  async_fifo #(.DW(WORD_W), .DEPTH(ETH_FIFO_DEPTH)) ethernet_fifo (
    .wr_clk(master_clk), .wr_rst(rst_mst), .wr_en(ethernet_fifo_in_en), .din(ethernet_fifo_din),
    .full(), .overflow(eth_fifo_overflow), .overflow_seen(eth_ovf_seen),
    .rd_clk(eth_clk), .rd_rst(rst_eth), .rd_en(eth_rd_en),
    .dout(eth_dout), .dout_valid(eth_dout_valid), .empty(eth_empty)
  );

  // Both edge FIFOs are written and read together, so they stay in step.
  assert property (@(posedge master_clk) disable iff (rst_mst) r_valid == f_valid);

endmodule

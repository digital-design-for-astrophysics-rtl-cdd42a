// Peak finder: selects the parts of the sample stream that contain a pulse.
//
// Every valid 256-bit input word carries 32 consecutive 8-bit samples,
// sample 0 (the oldest) in bits [7:0]. If any sample of a word is above
// signal_threshold the word is a hit: it is forwarded, and the following words
// are forwarded too until at least user_samples_after_trig samples after the
// hit word have been sent. A hit inside that window restarts the count
// (retrigger), so every peak is followed by at least the requested number of
// samples. Samples are counted 32 per word, so the window ends on a word
// boundary: ceil(user_samples_after_trig / 32) words follow the last hit.
//
// Interface (names as in the block's schematic):
//   empty         high when both ADC FIFOs hold data. The schematic drives
//                 this pin with the inverted OR of the two FIFO empty flags,
//                 so despite its name it means "data available".
//   in_enable     read enable of the two ADC FIFOs, high whenever data is
//                 available and the block is out of reset.
//   data_valid    data_in holds a word read from the FIFOs.
//   data_out / out_enable   forwarded word and its write strobe into the
//                 Ethernet FIFO.
// Timing: a word on data_in with data_valid appears on data_out with
// out_enable one clock later. One word per clock, no back-pressure: the
// Ethernet FIFO drops words when full. reset is synchronous, active high.
//
// Following the original firmware description: the port list, 32 samples of 8 bits per 100 MHz cycle,
// the threshold compare, the 16-bit post-trigger sample count. This design's
// choices: a hit is a sample strictly greater than the threshold, the count
// is in samples (32 per word), retrigger restarts the count.
module peak_finder
  import daq_pkg::*;
#(
  parameter int unsigned NSAMP   = SAMPLES_PER_WORD,
  parameter int unsigned SW      = SAMPLE_W,
  parameter int unsigned THR_W   = THRESH_W,
  parameter int unsigned CNT_W   = READ_SIZE_W
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                empty,
  input  logic [NSAMP*SW-1:0] data_in,
  input  logic [THR_W-1:0]    signal_threshold,
  input  logic                data_valid,
  input  logic [CNT_W-1:0]    user_samples_after_trig,
  output logic [NSAMP*SW-1:0] data_out,
  output logic                out_enable,
  output logic                in_enable,
  output logic                trigger,     // data_in word is a hit (for monitoring)
  output logic                retrigger    // hit while a window was open
);

  // One bit wider than the user count so that adding a word cannot wrap.
  localparam int unsigned SCNT_W = CNT_W + 1;

  logic              active;          // post-trigger window open
  logic [SCNT_W-1:0] samples_sent;    // samples sent since the last hit word
  logic [NSAMP-1:0]  above;
  logic              hit;
  logic [SCNT_W-1:0] sent_next;

  always_comb begin
    for (int i = 0; i < NSAMP; i++)
      above[i] = data_in[i*SW +: SW] > SW'(signal_threshold);
  end

  assign hit       = data_valid && (|above);
  assign trigger   = hit;
  assign retrigger = hit && active;
  assign sent_next = samples_sent + SCNT_W'(NSAMP);
  assign in_enable = empty && !reset;

  always_ff @(posedge clk) begin
    if (reset) begin
      active       <= 1'b0;
      samples_sent <= '0;
      out_enable   <= 1'b0;
      data_out     <= '0;
    end else begin
      out_enable <= 1'b0;
      if (hit) begin
        data_out     <= data_in;
        out_enable   <= 1'b1;
        samples_sent <= '0;
        active       <= (user_samples_after_trig != '0);
      end else if (data_valid && active) begin
        data_out     <= data_in;
        out_enable   <= 1'b1;
        samples_sent <= sent_next;
        if (sent_next >= SCNT_W'(user_samples_after_trig))
          active <= 1'b0;
      end
    end
  end

endmodule

// Shared constants of the photon-counter data acquisition firmware.
//
// The ADC delivers 8-bit samples over a 32-bit double-data-rate bus: four
// samples on every rising and every falling edge of its 375 MHz clock. The
// processing clock runs at 100 MHz and handles 32 samples (256 bits) per
// cycle. These numbers come from the description of the system; the register
// map below is this design's own choice.
package daq_pkg;

  localparam int unsigned SAMPLE_W         = 8;   // bits per ADC sample
  localparam int unsigned SAMPLES_PER_EDGE = 4;   // samples per DDR edge
  localparam int unsigned ADC_BUS_W        = SAMPLE_W * SAMPLES_PER_EDGE; // 32
  localparam int unsigned SAMPLES_PER_WORD = 32;  // samples per 100 MHz cycle
  localparam int unsigned WORD_W           = SAMPLE_W * SAMPLES_PER_WORD; // 256
  // Each edge FIFO supplies half of a processing word.
  localparam int unsigned EDGE_WORDS       = SAMPLES_PER_WORD / (2 * SAMPLES_PER_EDGE); // 4
  localparam int unsigned HALF_W           = ADC_BUS_W * EDGE_WORDS; // 128

  localparam int unsigned THRESH_W    = 8;   // signal_threshold width
  localparam int unsigned READ_SIZE_W = 16;  // user_samples_after_trig width

  // Register map (word addresses) written by the host over the network link.
  localparam int unsigned REG_ADDR_W = 4;
  localparam int unsigned REG_DATA_W = 32;
  typedef enum logic [REG_ADDR_W-1:0] {
    REG_THRESHOLD = 4'h0,  // [7:0]  peak threshold
    REG_READ_SIZE = 4'h1,  // [15:0] samples to send after a peak
    REG_CONTROL   = 4'h2,  // [0] send_enable, [1] sawtooth test source
    REG_STATUS    = 4'h3   // read only: [0] Ethernet FIFO overflowed,
                           // [1] rising ADC FIFO overflowed, [2] falling ADC FIFO overflowed
  } reg_addr_e;

  localparam logic [THRESH_W-1:0]    THRESHOLD_RESET = '1;  // nothing triggers after reset
  localparam logic [READ_SIZE_W-1:0] READ_SIZE_RESET = 16'd32;

endpackage

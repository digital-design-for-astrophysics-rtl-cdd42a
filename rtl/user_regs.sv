// User registers set by the host computer.
//
// The network interface hands each register write to this block as a
// one-cycle reg_wr strobe with an address and 32-bit data. The registers set
// the peak-finder threshold, the number of samples sent after a peak, the
// enable of the data sender and the choice of the sawtooth test source.
// A status word reports, read only, which FIFOs have overflowed since reset.
// reg_rdata is the registered value at reg_addr, one clock after the address.
// Reset (synchronous, active high) loads a threshold of 255, so nothing
// triggers until the host sets one, a read size of 32 samples, and clears
// the control bits.
//
// Following the original firmware description: host-written registers for the threshold and the
// post-peak sample count, and one that turns on the data sender. This
// design's choices: the address map (see daq_pkg), the reset values, the
// test-source bit and the status word.
module user_regs
  import daq_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   reg_wr,
  input  logic [REG_ADDR_W-1:0]  reg_addr,
  input  logic [REG_DATA_W-1:0]  reg_wdata,
  output logic [REG_DATA_W-1:0]  reg_rdata,
  input  logic [2:0]             status,       // overflow flags, already in clk domain
  output logic [THRESH_W-1:0]    threshold,
  output logic [READ_SIZE_W-1:0] read_size,
  output logic                   send_enable,
  output logic                   test_mode
);

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold   <= THRESHOLD_RESET;
      read_size   <= READ_SIZE_RESET;
      send_enable <= 1'b0;
      test_mode   <= 1'b0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        REG_THRESHOLD: threshold <= reg_wdata[THRESH_W-1:0];
        REG_READ_SIZE: read_size <= reg_wdata[READ_SIZE_W-1:0];
        REG_CONTROL: begin
          send_enable <= reg_wdata[0];
          test_mode   <= reg_wdata[1];
        end
        default: ;   // status and unused addresses are not writable
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
    end else begin
      unique case (reg_addr)
        REG_THRESHOLD: reg_rdata <= REG_DATA_W'(threshold);
        REG_READ_SIZE: reg_rdata <= REG_DATA_W'(read_size);
        REG_CONTROL:   reg_rdata <= REG_DATA_W'({test_mode, send_enable});
        REG_STATUS:    reg_rdata <= REG_DATA_W'(status);
        default:       reg_rdata <= '0;
      endcase
    end
  end

endmodule

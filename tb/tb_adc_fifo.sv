// Self-checking testbench of adc_fifo.
//
// Streams 32-bit words at 375 MHz into the FIFO, continuously and with gaps,
// and reads 128-bit entries at 100 MHz. Every entry must hold four
// consecutive input words, the oldest in bits [31:0]. A second phase stops
// the reader until the FIFO overflows and checks the overflow flags.
`timescale 1ps/1ps
module tb_adc_fifo;
  localparam int W = 32;
  localparam int R = 4;
  localparam int DEPTH = 8;

  logic             wclk = 0, rclk = 0, rst = 1;
  logic             wr_en = 0, rd_en = 0;
  logic [W-1:0]     din = '0;
  logic [W*R-1:0]   dout;
  logic             overflow, overflow_seen, dout_valid, empty;

  adc_fifo #(.IN_W(W), .RATIO(R), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst(rst), .wr_en, .din, .overflow, .overflow_seen,
    .rd_clk(rclk), .rd_rst(rst), .rd_en, .dout, .dout_valid, .empty
  );

  always #1333 wclk = ~wclk;
  always #5000 rclk = ~rclk;

  int checks = 0, failures = 0, entries = 0;
  logic [W-1:0] q[$];
  bit gaps = 0, rd_stop = 0, wr_stop = 0;

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

  always @(posedge wclk) if (!rst && wr_en) q.push_back(din);
  always @(negedge wclk) begin
    wr_en <= !rst && !wr_stop && (!gaps || $urandom_range(0, 2) != 0);
    din   <= $urandom;
  end
  always @(negedge rclk) rd_en <= !rst && !rd_stop;
  always @(posedge rclk) begin
    if (!rst && dout_valid && !rd_stop) begin
      entries++;
      for (int i = 0; i < R; i++) begin
        logic [W-1:0] e;
        e = q.size() > 0 ? q.pop_front() : '0;
        check(dout[i*W +: W] == e, $sformatf("entry word %0d", i));
      end
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    rst = 0;
    repeat (2000) @(posedge rclk);
    check(!overflow_seen, "continuous stream at full rate does not overflow");
    gaps = 1;
    repeat (2000) @(posedge rclk);
    check(entries > 1500, "entries flowed");
    check(!overflow_seen, "no overflow with gaps");
    // stop the reader: the FIFO must overflow
    rd_stop = 1;
    repeat (40) @(posedge rclk);
    check(overflow_seen, "overflow once the reader stops");
    $display("entries=%0d", entries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

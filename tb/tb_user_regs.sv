// Self-checking testbench of user_regs.
//
// Checks the reset values, writes random data to every address and reads
// each register back, checks that the outputs follow the written fields, that
// the status word is read only and reflects its inputs, and that writes to
// unused addresses change nothing.
`timescale 1ns/1ps
module tb_user_regs;
  import daq_pkg::*;
  logic        clk = 0, rst = 1, reg_wr = 0;
  logic [3:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [2:0]  status = '0;
  logic [7:0]  threshold;
  logic [15:0] read_size;
  logic        send_enable, test_mode;

  user_regs dut (.clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .status,
                 .threshold, .read_size, .send_enable, .test_mode);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]  m_thr = 8'hff;
  logic [15:0] m_rs = 16'd32;
  logic [1:0]  m_ctl = 2'b00;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a;
    @(negedge clk); d = reg_rdata;
  endtask

  function automatic logic [31:0] model(input logic [3:0] a);
    case (a)
      4'h0: return {24'd0, m_thr};
      4'h1: return {16'd0, m_rs};
      4'h2: return {30'd0, m_ctl};
      4'h3: return {29'd0, status};
      default: return 32'd0;
    endcase
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(threshold == 8'hff && read_size == 16'd32 && !send_enable && !test_mode, "reset values");
    for (int n = 0; n < 400; n++) begin
      logic [3:0]  a;
      logic [31:0] v;
      a = 4'($urandom_range(0, 5));
      v = $urandom;
      status = 3'($urandom);
      wr(a, v);
      case (a)
        4'h0: m_thr = v[7:0];
        4'h1: m_rs = v[15:0];
        4'h2: m_ctl = v[1:0];
        default: ;
      endcase
      check(threshold == m_thr && read_size == m_rs &&
            send_enable == m_ctl[0] && test_mode == m_ctl[1], "register outputs");
      a = 4'($urandom_range(0, 5));
      rd(a, d);
      check(d == model(a), $sformatf("read back address %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

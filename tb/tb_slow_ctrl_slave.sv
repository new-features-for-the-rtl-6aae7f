// tb_slow_ctrl_slave -- self-checking test of a channel's slow-control end.
//
// A PC model sends request packets. Checked: writes to the control,
// threshold and general-purpose bytes appear on the outputs and are echoed;
// reads of the counter, baseline and phase-status bytes return the status
// inputs; writes to read-only bytes change nothing; the reply carries a
// correct CRC; a request with a bad CRC or another channel's address gets
// no reply (the bad CRC is flagged); a partial packet followed by silence
// does not spoil the next packet.
module tb_slow_ctrl_slave;
  import daq_pkg::*;
  localparam int CPB = 16;
  localparam logic [5:0] ME = 6'd13;

  logic clk = 0, rst_n = 0;
  logic pc_tx, ch_tx;
  ch_status_t status;
  logic [7:0] ctrl;
  logic [23:0] threshold;
  logic crc_error;
  int checks = 0, failures = 0, ncrcerr = 0;

  slow_ctrl_slave #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .my_addr(ME), .rxd(pc_tx), .txd(ch_tx),
                                             .status, .ctrl, .threshold, .crc_error);
  sc_pc_model #(.CLKS_PER_BIT(CPB)) pc (.clk, .txd(pc_tx), .rxd(ch_tx));

  always #5 clk = ~clk;
  always @(posedge clk) if (crc_error) ncrcerr++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transaction; expect a reply with `exp_data`, or no reply
  task automatic xact(input byte unsigned addr, cmd, data, input bit expect_reply,
                      input byte unsigned exp_data, input string what, input bit bad_crc = 0);
    pc.rxq.delete();
    pc.send_packet(addr, cmd, data, bad_crc);
    repeat (CPB * 50) @(posedge clk);
    if (!expect_reply) begin
      check(pc.rxq.size() == 0, {what, ": no reply"});
    end else begin
      check(pc.rxq.size() == 4, {what, ": reply length"});
      if (pc.rxq.size() == 4) begin
        check(pc.rxq[0] == addr && pc.rxq[1] == cmd, {what, ": reply header"});
        check(pc.rxq[2] == exp_data, $sformatf("%s: data %h expected %h", what, pc.rxq[2], exp_data));
        check(pc.rxq[3] == pc.crc_of(pc.rxq[0], pc.rxq[1], pc.rxq[2]), {what, ": reply CRC"});
      end
    end
  endtask

  initial begin
    status = '{count: 24'hA1B2C3, baseline: 14'h2345, locked: 1'b1, up: 1'b0, down: 1'b1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(ctrl == 0 && threshold == 0, "registers clear after reset");
    xact(ME, 8'h80 | REG_CTRL, 8'h03, 1, 8'h03, "write ctrl");
    check(ctrl == 8'h03, "ctrl output");
    xact(ME, 8'h80 | REG_THR0, 8'h11, 1, 8'h11, "write thr0");
    xact(ME, 8'h80 | REG_THR1, 8'h22, 1, 8'h22, "write thr1");
    xact(ME, 8'h80 | REG_THR2, 8'h33, 1, 8'h33, "write thr2");
    check(threshold == 24'h332211, "threshold output");
    xact(ME, 8'h80 | 8'd12, 8'h5A, 1, 8'h5A, "write gp12");
    xact(ME, 8'd12, 8'h00, 1, 8'h5A, "read gp12");
    xact(ME, REG_THR1, 8'h00, 1, 8'h22, "read thr1");
    xact(ME, REG_CNT0, 8'h00, 1, 8'hC3, "read cnt0");
    xact(ME, REG_CNT1, 8'h00, 1, 8'hB2, "read cnt1");
    xact(ME, REG_CNT2, 8'h00, 1, 8'hA1, "read cnt2");
    xact(ME, REG_BASE0, 8'h00, 1, 8'h45, "read base0");
    xact(ME, REG_BASE1, 8'h00, 1, 8'h23, "read base1");
    xact(ME, REG_PHASE, 8'h00, 1, 8'h05, "read phase");
    xact(ME, 8'h80 | REG_CNT1, 8'hFF, 1, 8'hB2, "write to read-only byte");
    xact(ME, 8'h80 | REG_CTRL, 8'h07, 0, 8'h00, "bad CRC", 1);
    check(ctrl == 8'h03, "bad CRC wrote nothing");
    check(ncrcerr == 1, "bad CRC flagged");
    xact(ME + 1, 8'h80 | REG_CTRL, 8'h07, 0, 8'h00, "other channel");
    check(ctrl == 8'h03, "other channel's write ignored");
    // partial packet, silence, then a good one
    pc.send_byte(ME);
    pc.send_byte(8'h80);
    repeat (CPB * 30) @(posedge clk);
    xact(ME, 8'h80 | REG_CTRL, 8'h01, 1, 8'h01, "after resync");
    check(ctrl == 8'h01, "ctrl after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

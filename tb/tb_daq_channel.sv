// tb_daq_channel -- self-checking test of one complete DAQ channel.
//
// A detector/ADC model and a clock-manager model drive the channel; a PC
// model talks to it over the serial link (shortened to 16 clocks per bit).
// The sequence: the readout clock aligns itself; the PC reads the phase
// status, sets a threshold of 2^18 and enables trigger and counter; pulses
// arrive; the PC stops the counter and reads the three count bytes, which
// must equal the number of large pulses (small ones stay below threshold);
// pulses with the counter stopped must not count; clearing gives zero; the
// baseline estimate read back must be within 4 LSB of the true baseline.
module tb_daq_channel;
  import daq_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int CPB = 16;
  localparam int BASE = 300;
  localparam logic [5:0] ME = 6'd2;

  logic clk = 0, rst_n = 0;
  logic clk_0, clk_90, clk_270, psen, psincdec, psdone;
  logic [13:0] adc_d, sample, baseline;
  logic pc_tx, ch_tx, trig, trig_pulse, crc_error;
  logic pulses_on = 0;
  int n_big, n_small, ntrig = 0, nshift = 0;
  int checks = 0, failures = 0;

  daq_channel #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .clk_0, .clk_90, .clk_270, .adc_d, .psen, .psincdec, .psdone,
    .my_addr(ME), .rxd(pc_tx), .txd(ch_tx), .sample, .trig, .trig_pulse, .baseline, .crc_error);
  dcm_model #(.INIT_PHASE_NS(7.0)) u_dcm (.psclk(clk), .psen, .psincdec, .psdone, .clk_0, .clk_90, .clk_270);
  adc_model #(.BASE(BASE)) u_adc (.clk, .pulses_on, .d(adc_d), .n_big, .n_small);
  sc_pc_model #(.CLKS_PER_BIT(CPB)) pc (.clk, .txd(pc_tx), .rxd(ch_tx));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (trig_pulse) ntrig++;
    if (psen) nshift++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input byte unsigned cmd, data, output byte unsigned rd);
    pc.rxq.delete();
    pc.send_packet(8'(ME), cmd, data);
    repeat (CPB * 50) @(posedge clk);
    check(pc.rxq.size() == 4, $sformatf("reply to %h", cmd));
    rd = (pc.rxq.size() == 4) ? pc.rxq[2] : 8'hxx;
  endtask

  task automatic read_count(output int c);
    byte unsigned b0, b1, b2;
    access(8'(REG_CNT0), 0, b0);
    access(8'(REG_CNT1), 0, b1);
    access(8'(REG_CNT2), 0, b2);
    c = {b2, b1, b0};
  endtask

  initial begin
    byte unsigned rd, b0, b1;
    int cnt, cnt1, big0, big1, trig0;
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (150_000) @(posedge clk);          // readout clock alignment
    access(8'(REG_PHASE), 0, rd);
    check(rd[0] == 1'b1, "phase locked");
    check(nshift > 0, "phase was shifted");
    access(8'h80 | 8'(REG_THR2), 8'h04, rd);
    access(8'h80 | 8'(REG_CTRL), 8'h03, rd);   // trigger and counter on
    repeat (2000) @(posedge clk);
    big0 = n_big; trig0 = ntrig;
    pulses_on = 1;
    repeat (300_000) @(posedge clk);
    pulses_on = 0;
    repeat (2000) @(posedge clk);
    check(ntrig - trig0 == n_big - big0, $sformatf("one trigger per large pulse: %0d vs %0d", ntrig - trig0, n_big - big0));
    check(n_small > 0 && n_big > 10, "both pulse sizes seen");
    access(8'h80 | 8'(REG_CTRL), 8'h01, rd);   // counter off
    read_count(cnt);
    check(cnt == n_big - big0, $sformatf("count %0d, large pulses %0d", cnt, n_big - big0));
    cnt1 = cnt;
    big1 = n_big;
    pulses_on = 1;
    repeat (50_000) @(posedge clk);
    pulses_on = 0;
    repeat (2000) @(posedge clk);
    read_count(cnt);
    check(n_big > big1, "large pulses while the counter is stopped");
    check(cnt == cnt1, "stopped counter does not count");
    check(ntrig - trig0 == n_big - big0, "triggers continue while the counter is stopped");
    access(8'h80 | 8'(REG_CTRL), 8'h05, rd);   // clear
    read_count(cnt);
    check(cnt == 0, "counter cleared");
    access(8'(REG_BASE0), 0, b0);
    access(8'(REG_BASE1), 0, b1);
    check($signed(14'({b1, b0})) >= BASE - 4 && $signed(14'({b1, b0})) <= BASE + 4,
          $sformatf("baseline %0d", $signed(14'({b1, b0}))));
    check(baseline >= BASE - 4 && baseline <= BASE + 4, "baseline output");
    $display("shifts %0d, large pulses %0d, triggers %0d", nshift, n_big, ntrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gerda_daq_full -- one complete operation of the whole system with every
// parameter at its default: 24 channels, 38400 bit/s slow-control link,
// 1 us trigger peaking time, baseline estimator at 1 MSamples/s.
//
// The readout clocks of all channels align themselves; the PC sets a trigger
// threshold on channel 0 and enables its trigger and counter; pulses arrive
// on every channel; the PC stops the counter and reads its three bytes,
// which must equal the number of large pulses on channel 0. The single
// trigger output must rise once per such pulse (only channel 0 is enabled).
module tb_gerda_daq_full;
  import daq_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int N = 24;
  localparam int CPB = int'(BIT_CLKS);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] clk_0, clk_90, clk_270, psen, psincdec, psdone, crc_error, defective;
  logic [N-1:0][13:0] adc_d, sample, baseline;
  logic pc_rxd, pc_txd, trig_out;
  logic [N-1:0] pulses_on = '0;
  int n_big [N], n_small [N];
  logic [N-1:0] locked_v;
  int checks = 0, failures = 0;

  gerda_daq_top dut (.clk, .rst_n, .clk_0, .clk_90, .clk_270, .adc_d, .psen, .psincdec, .psdone,
                     .pc_rxd, .pc_txd, .sample, .trig_out, .defective, .baseline, .crc_error);
  sc_pc_model #(.CLKS_PER_BIT(CPB)) pc (.clk, .txd(pc_rxd), .rxd(pc_txd));

  for (genvar i = 0; i < N; i++) begin : g_env
    dcm_model #(.INIT_PHASE_NS(4.0 + 0.41 * i)) u_dcm (
      .psclk(clk), .psen(psen[i]), .psincdec(psincdec[i]), .psdone(psdone[i]),
      .clk_0(clk_0[i]), .clk_90(clk_90[i]), .clk_270(clk_270[i]));
    adc_model #(.BASE(200 + 13 * i), .SEED(i + 1)) u_adc (
      .clk, .pulses_on(pulses_on[i]), .d(adc_d[i]), .n_big(n_big[i]), .n_small(n_small[i]));
    assign locked_v[i] = dut.g_ch[i].u_ch.u_align.locked;
  end

  always #5 clk = ~clk;

  int m_shift = 0, m_trig_out = 0;
  logic trig_out_d = 0;
  always @(posedge clk) if (rst_n) begin
    m_shift += $countones(psen);
    if (trig_out && !trig_out_d) m_trig_out++;
    trig_out_d <= trig_out;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(40_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input int ch, input byte unsigned cmd, data, output byte unsigned rd);
    pc.rxq.delete();
    pc.send_packet(8'(ch), cmd, data);
    repeat (CPB * 45) @(posedge clk);
    check(pc.rxq.size() == 4, $sformatf("reply from channel %0d to %h", ch, cmd));
    if (pc.rxq.size() == 4)
      check(pc.rxq[3] == pc.crc_of(pc.rxq[0], pc.rxq[1], pc.rxq[2]), "reply CRC");
    rd = (pc.rxq.size() == 4) ? pc.rxq[2] : 8'h00;
  endtask

  initial begin
    byte unsigned rd, b0, b1, b2;
    int big0, tout0, cnt;
    repeat (20) @(posedge clk);
    rst_n = 1;
    access(0, 8'h80 | 8'(REG_THR2), 8'h04, rd);   // alignment runs meanwhile
    access(0, 8'h80 | 8'(REG_CTRL), 8'h03, rd);
    check(locked_v == '1, "all channels locked");
    check(m_shift > 0, "readout clocks were shifted");
    big0 = n_big[0];
    tout0 = m_trig_out;
    pulses_on = '1;
    repeat (300_000) @(posedge clk);
    pulses_on = '0;
    repeat (2000) @(posedge clk);
    check(m_trig_out - tout0 == n_big[0] - big0, $sformatf("single trigger: %0d edges, %0d large pulses",
          m_trig_out - tout0, n_big[0] - big0));
    access(0, 8'h80 | 8'(REG_CTRL), 8'h01, rd);
    access(0, 8'(REG_CNT0), 0, b0);
    access(0, 8'(REG_CNT1), 0, b1);
    access(0, 8'(REG_CNT2), 0, b2);
    cnt = {b2, b1, b0};
    check(cnt == n_big[0] - big0 && cnt > 0, $sformatf("count %0d, large pulses %0d", cnt, n_big[0] - big0));
    $display("phase steps %0d, large pulses on channel 0: %0d, counted %0d", m_shift, n_big[0] - big0, cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

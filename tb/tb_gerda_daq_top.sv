// tb_gerda_daq_top -- end-to-end test of the whole system at full size.
//
// 24 channels with their detector/ADC and clock-manager models, and a PC
// model on the serial link, at the design's default parameters except for the
// bit time of the serial link, shortened to 64 clocks.
// Readout clocks start at phases spread over a whole period, so some
// channels must shift a long way and some not at all. The PC then
//   * reads a channel's phase status,
//   * sets a threshold and enables trigger and counter on channels 0 and 23,
//   * lets pulses arrive on all channels, stops channel 0's counter and reads
//     its three count bytes (= large pulses on channel 0),
//   * clears that counter, reads a baseline estimate, writes and reads a
//     general-purpose byte,
//   * sends a packet with a bad CRC (no answer, CRC error flagged),
//   * talks to a channel whose answer line is cut (flagged defective), then
//     to the same channel repaired (flag cleared).
// Each enabled channel must trigger once per large pulse, and the single
// trigger to the PCI receiver must follow the OR of the channel triggers. Each mechanism is counted and must occur.
module tb_gerda_daq_top;
  import daq_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int N = 24;
  localparam int CPB = 64;     // serial link shortened from 2604 clocks per bit

  logic clk = 0, rst_n = 0;
  logic [N-1:0] clk_0, clk_90, clk_270, psen, psincdec, psdone, crc_error, defective;
  logic [N-1:0][13:0] adc_d, sample, baseline;
  logic pc_rxd, pc_txd, trig_out;
  logic [N-1:0] pulses_on = '0;
  int n_big [N], n_small [N];
  logic [N-1:0] up_v, down_v, locked_v, trig_v;   // observed inside the channels
  int checks = 0, failures = 0;

  gerda_daq_top #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .clk_0, .clk_90, .clk_270, .adc_d, .psen, .psincdec, .psdone,
                     .pc_rxd, .pc_txd, .sample, .trig_out, .defective, .baseline, .crc_error);
  sc_pc_model #(.CLKS_PER_BIT(CPB)) pc (.clk, .txd(pc_rxd), .rxd(pc_txd));

  for (genvar i = 0; i < N; i++) begin : g_env
    dcm_model #(.INIT_PHASE_NS(4.0 + 0.41 * i)) u_dcm (
      .psclk(clk), .psen(psen[i]), .psincdec(psincdec[i]), .psdone(psdone[i]),
      .clk_0(clk_0[i]), .clk_90(clk_90[i]), .clk_270(clk_270[i]));
    adc_model #(.BASE(200 + 13 * i), .SEED(i + 1)) u_adc (
      .clk, .pulses_on(pulses_on[i]), .d(adc_d[i]), .n_big(n_big[i]), .n_small(n_small[i]));
    assign up_v[i]     = dut.g_ch[i].u_ch.up;
    assign down_v[i]   = dut.g_ch[i].u_ch.down;
    assign locked_v[i] = dut.g_ch[i].u_ch.u_align.locked;
    assign trig_v[i]   = dut.g_ch[i].u_ch.trig;
  end

  always #5 clk = ~clk;

  // mechanism counters
  int m_trig23 = 0, m_shift = 0, m_up = 0, m_down = 0, m_trig = 0, m_trig_out = 0, m_crc = 0, m_bl = 0;
  logic trig_out_d = 0, or_d = 0;
  int m_or = 0;            // rising edges of the OR of all channel triggers
  always @(posedge clk) if (rst_n) begin
    m_shift += $countones(psen);
    m_crc   += $countones(crc_error);
    if (dut.g_ch[0].u_ch.u_base.valid) m_bl++;
    if (dut.g_ch[0].u_ch.trig_pulse) m_trig++;
    if (dut.g_ch[23].u_ch.trig_pulse) m_trig23++;
    m_up   += $countones(up_v);
    m_down += $countones(down_v);
    if (trig_out && !trig_out_d) m_trig_out++;
    trig_out_d <= trig_out;
    if (|trig_v && !or_d) m_or++;
    or_d <= |trig_v;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(80_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_reply = 0, m_noreply = 0;
  task automatic access(input int ch, input byte unsigned cmd, data, input bit expect_reply,
                        output byte unsigned rd, input bit bad_crc = 0);
    pc.rxq.delete();
    pc.send_packet(8'(ch), cmd, data, bad_crc);
    repeat (CPB * 45) @(posedge clk);
    if (expect_reply) begin
      check(pc.rxq.size() == 4, $sformatf("reply from channel %0d to %h", ch, cmd));
      if (pc.rxq.size() == 4) begin
        check(pc.rxq[0] == 8'(ch) && pc.rxq[1] == cmd, "reply header");
        check(pc.rxq[3] == pc.crc_of(pc.rxq[0], pc.rxq[1], pc.rxq[2]), "reply CRC");
        m_reply++;
      end
    end else begin
      check(pc.rxq.size() == 0, $sformatf("no reply from channel %0d", ch));
      if (pc.rxq.size() == 0) m_noreply++;
    end
    rd = (pc.rxq.size() == 4) ? pc.rxq[2] : 8'h00;
  endtask

  initial begin
    byte unsigned rd, b0, b1, b2;
    int big0, tout0, cnt, crc0, bl;
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (120_000) @(posedge clk);            // readout clock alignment
    for (int i = 0; i < N; i++) check(locked_v[i], $sformatf("channel %0d locked", i));
    access(7, 8'(REG_PHASE), 0, 1, rd);
    check(rd[0], "phase status read as locked");
    check(trig_v == '0, "triggers off after reset");
    for (int c = 0; c < N; c += N - 1) begin
      access(c, 8'h80 | 8'(REG_THR2), 8'h04, 1, rd);
      access(c, 8'h80 | 8'(REG_CTRL), 8'h03, 1, rd);
    end
    repeat (2000) @(posedge clk);
    big0 = n_big[0];
    tout0 = m_trig_out;
    begin
      int b23, t0, t23, or0;
      b23 = n_big[23];
      t0 = m_trig;
      t23 = m_trig23;
      or0 = m_or;
      pulses_on = '1;
      repeat (400_000) @(posedge clk);
      pulses_on = '0;
      repeat (2000) @(posedge clk);
      check(m_trig - t0 == n_big[0] - big0, "channel 0: one trigger per large pulse");
      check(m_trig23 - t23 == n_big[23] - b23, "channel 23: one trigger per large pulse");
      check(m_trig_out - tout0 == m_or - or0 && m_or - or0 > 0,
            $sformatf("single trigger: %0d edges, OR of channel triggers %0d", m_trig_out - tout0, m_or - or0));
    end
    access(0, 8'h80 | 8'(REG_CTRL), 8'h01, 1, rd);   // stop counter
    access(0, 8'(REG_CNT0), 0, 1, b0);
    access(0, 8'(REG_CNT1), 0, 1, b1);
    access(0, 8'(REG_CNT2), 0, 1, b2);
    cnt = {b2, b1, b0};
    check(cnt == n_big[0] - big0 && cnt > 0, $sformatf("count %0d, large pulses %0d", cnt, n_big[0] - big0));
    access(0, 8'h80 | 8'(REG_CTRL), 8'h05, 1, rd);   // clear
    access(0, 8'(REG_CNT0), 0, 1, b0);
    check(b0 == 0, "counter cleared");
    access(11, 8'(REG_BASE0), 0, 1, b0);
    access(11, 8'(REG_BASE1), 0, 1, b1);
    bl = $signed(14'({b1, b0}));
    check(bl >= 200 + 13 * 11 - 4 && bl <= 200 + 13 * 11 + 4, $sformatf("baseline %0d", bl));
    access(16, 8'h80 | 8'd12, 8'h5A, 1, rd);
    access(16, 8'd12, 8'h00, 1, rd);
    check(rd == 8'h5A, "general-purpose byte read back");
    crc0 = m_crc;
    access(3, 8'h80 | 8'(REG_CTRL), 8'h03, 0, rd, 1);
    check(m_crc == crc0 + N, "bad CRC flagged by every channel");
    check(!dut.g_ch[3].u_ch.trig && dut.g_ch[3].u_ch.u_sc.ctrl == 0, "bad CRC changed nothing");
    force dut.ch_txd[5] = 1'b1;                       // cut answer line
    access(5, 8'(REG_PHASE), 0, 0, rd);
    check(defective == 24'(1 << 5), "channel 5 flagged defective");
    release dut.ch_txd[5];
    access(5, 8'(REG_PHASE), 0, 1, rd);
    check(defective == '0, "channel 5 good again");
    // mechanisms
    $display("mechanisms: phase steps %0d, up %0d, down %0d, triggers %0d, single-trigger edges %0d,",
             m_shift, m_up, m_down, m_trig, m_trig_out);
    $display("            baseline updates %0d, CRC errors %0d, replies %0d, missing replies %0d",
             m_bl, m_crc, m_reply, m_noreply);
    check(m_shift > 0, "phase shift happened");
    check(m_up > 0, "UP reported");
    check(m_down > 0, "DOWN reported");
    check(m_trig > 0, "trigger fired");
    check(m_trig_out > 0, "single trigger fired");
    check(m_bl > 0, "baseline updated");
    check(m_crc > 0, "CRC error happened");
    check(m_noreply > 0, "missing reply happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

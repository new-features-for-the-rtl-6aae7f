// tb_expansion_board -- self-checking test of the expansion board.
//
// Four channels: 0..2 are real slow-control endpoints, channel 3 never
// answers. A PC model sends requests. Checked: every channel sees the PC
// line; the addressed channel's answer reaches the PC intact; channel 3 is
// marked defective and the others are not; a request to a channel number
// the board does not have leaves the flags alone; the trigger output is the
// OR of the channel triggers one clock later.
module tb_expansion_board;
  import daq_pkg::*;
  localparam int CPB = 16;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic pc_rxd, pc_txd, trig_out;
  logic [N-1:0] ch_rxd, ch_txd, ch_trig = '0, defective;
  int checks = 0, failures = 0, ntrig = 0;

  expansion_board #(.N_CH(N), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .pc_rxd, .pc_txd, .ch_rxd, .ch_txd, .ch_trig, .trig_out, .defective);
  sc_pc_model #(.CLKS_PER_BIT(CPB)) pc (.clk, .txd(pc_rxd), .rxd(pc_txd));

  for (genvar i = 0; i < 3; i++) begin : g_ch
    ch_status_t st;
    assign st = '{count: 24'(i * 1000 + 7), baseline: 14'(100 + i), locked: 1'b1, up: 1'b0, down: 1'b0};
    slow_ctrl_slave #(.CLKS_PER_BIT(CPB)) u_sc (.clk, .rst_n, .my_addr(6'(i)), .rxd(ch_rxd[i]),
      .txd(ch_txd[i]), .status(st), .ctrl(), .threshold(), .crc_error());
  end
  assign ch_txd[3] = 1'b1;   // dead channel

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // broadcast of the PC line
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ch_rxd != {N{pc_rxd}}) failures++;
  end

  task automatic read_cnt0(input int ch, input bit expect_reply);
    pc.rxq.delete();
    pc.send_packet(8'(ch), 8'(REG_CNT0), 8'h00);
    repeat (CPB * 60) @(posedge clk);
    if (expect_reply) begin
      check(pc.rxq.size() == 4, $sformatf("reply from channel %0d", ch));
      if (pc.rxq.size() == 4) begin
        check(pc.rxq[0] == 8'(ch) && pc.rxq[2] == 8'(ch * 1000 + 7), "reply contents");
        check(pc.rxq[3] == pc.crc_of(pc.rxq[0], pc.rxq[1], pc.rxq[2]), "reply CRC");
      end
    end else begin
      check(pc.rxq.size() == 0, $sformatf("no reply from channel %0d", ch));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(defective == '0, "no channel defective after reset");
    read_cnt0(0, 1);
    read_cnt0(1, 1);
    read_cnt0(3, 0);
    check(defective == 4'b1000, "channel 3 flagged");
    read_cnt0(2, 1);
    check(defective == 4'b1000, "channel 2 good");
    read_cnt0(9, 0);
    check(defective == 4'b1000, "non-existent channel changes no flag");
    read_cnt0(1, 1);
    // trigger OR
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] t;
      @(negedge clk);
      t = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      ch_trig = t;
      @(posedge clk);
      #1;
      check(trig_out == |t, "trigger OR");
      if (trig_out) ntrig++;
    end
    check(ntrig > 100, "triggers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

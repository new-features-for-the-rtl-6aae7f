// tb_uart -- self-checking test of the serial transmitter and receiver.
//
// The transmitter's line is checked bit by bit against the expected 8N1
// waveform, sampled in the middle of each bit cell, including the bit time
// (CLKS_PER_BIT clocks). The receiver gets the transmitter's line and must
// return each byte once; a frame with a low stop bit, bit-banged by the
// testbench, must be flagged and dropped.
module tb_uart;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, txd;
  logic [7:0] tdata = 0, rdata;
  logic rvalid, rferr;
  logic rxd_mux, bang = 0, bang_line = 1;
  int checks = 0, failures = 0;
  int nrx = 0, nferr = 0;
  logic [7:0] last_rx;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .start, .data(tdata), .busy, .txd);
  assign rxd_mux = bang ? bang_line : txd;
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd(rxd_mux), .data(rdata), .valid(rvalid), .frame_err(rferr));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (rvalid) begin nrx++; last_rx = rdata; end
    if (rferr) nferr++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] frame;
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(txd == 1'b1, "idle line high");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int nrx0;
      b = 8'($urandom);
      nrx0 = nrx;
      @(negedge clk);
      tdata = b; start = 1;
      @(negedge clk);
      start = 0;
      frame = {1'b1, b, 1'b0};
      // mid-bit of bit k lies CPB*k + CPB/2 clocks after the start edge
      for (int k = 0; k < 10; k++) begin
        repeat ((k == 0) ? CPB/2 - 1 : CPB) @(negedge clk);
        check(txd == frame[k], $sformatf("tx bit %0d of byte %0d", k, n));
      end
      t0 = $time;
      wait (!busy);
      t1 = $time;
      check((t1 - t0) <= CPB * 10 / 2 + 10, "busy ends after the stop bit");
      repeat (CPB) @(posedge clk);
      check(nrx == nrx0 + 1 && last_rx == b, $sformatf("rx byte %0d", n));
    end
    // frame error: stop bit low
    bang = 1;
    frame = {1'b0, 8'hA5, 1'b0};
    for (int k = 0; k < 10; k++) begin
      bang_line = frame[k];
      repeat (CPB) @(posedge clk);
    end
    bang_line = 1;
    repeat (4 * CPB) @(posedge clk);
    check(nferr == 1, $sformatf("frame error flagged (%0d, rx %0d)", nferr, nrx));
    check(nrx == 40, "bad frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

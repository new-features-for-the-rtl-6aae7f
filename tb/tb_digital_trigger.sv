// tb_digital_trigger -- self-checking test of the triangular trigger filter.
//
// The filter runs at its default size (K = 100, 1 us peaking time at
// 100 MSamples/s). The reference is the direct convolution of the input with
// the triangle h[j] = j+1 (j < K), 2K-1-j (K <= j < 2K), delayed by the four
// pipeline clocks, computed from a history of the input kept here. Checked
// every clock: the filter output, the trigger level (enabled and above the
// threshold) and the one-clock trigger pulse on its rising edge. Explicit
// checks: an isolated impulse of height A peaks at A*K exactly K+3 clocks
// after it enters, and a constant input gives K^2 times itself. A second
// filter with K = 1000 (10 us peaking time) gets the same impulse test.
module tb_digital_trigger;
  localparam int K = 100;
  localparam int IN_W = 14;
  localparam int Y_W = IN_W + 2 + 2 * $clog2(K);
  localparam int LAT = 4;
  localparam int HL = 2 * K + LAT + 2;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] x = 0;
  logic en = 0;
  logic [23:0] thr = 24'd50000;
  logic signed [Y_W-1:0] y;
  logic trig, trig_pulse;
  int checks = 0, failures = 0, npulses = 0;
  longint hist [HL];          // hist[0] = sample driven in the last clock

  digital_trigger dut (.clk, .rst_n, .x, .enable(en), .threshold(thr), .y, .trig, .trig_pulse);

  // the longest peaking time in use: 10 us = 1000 samples
  localparam int K10 = 1000;
  localparam int Y10_W = IN_W + 2 + 2 * $clog2(K10);
  logic signed [Y10_W-1:0] y10;
  longint y10max = 0;
  int t10 = -1, n10 = 0;
  digital_trigger #(.K(K10)) dut10 (.clk, .rst_n, .x, .enable(1'b0), .threshold(24'd0), .y(y10),
                                    .trig(), .trig_pulse());

  always #5 clk = ~clk;

  function automatic longint h(input int j);
    if (j < 0 || j >= 2 * K) return 0;
    return (j < K) ? j + 1 : 2 * K - 1 - j;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: y=%0d", what, $time, y);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one sample per clock, then compare after the edge
  task automatic step(input longint v, input bit do_check);
    longint yref;
    bit above;
    @(negedge clk);
    x = IN_W'(v);
    above = en && (y > $signed({1'b0, thr}));   // what the comparator sees
    @(posedge clk);
    for (int i = HL - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    #1;
    yref = 0;
    for (int j = 0; j < 2 * K; j++) yref += h(j) * hist[j + LAT];
    if (do_check) begin
      check(y == Y_W'(yref), $sformatf("y ref=%0d", yref));
      check(trig == above, "trig level");
      check(trig_pulse == (above && !trig_prev), "trig pulse");
      trig_prev = above;
      if (trig_pulse) npulses++;
    end
  endtask
  bit trig_prev = 0;

  initial begin
    int t_imp, t_peak;
    longint ymax;
    for (int i = 0; i < HL; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // isolated impulse: peak value and time
    step(0, 1);
    step(1000, 1);
    ymax = 0; t_peak = -1;
    for (int n = 1; n < 3 * K; n++) begin
      step(0, 1);
      if (y > ymax) begin ymax = y; t_peak = n; end
    end
    check(ymax == 1000 * K, "impulse peak height A*K");
    check(t_peak == K + LAT - 1, $sformatf("impulse peak time %0d", t_peak));
    // same impulse seen by the 10 us filter: peak A*K10 at K10+3 clocks
    for (int n = 3 * K; n < 3 * K10; n++) begin
      step(0, 0);
    end
    step(1000, 0);
    for (int n = 1; n < 3 * K10; n++) begin
      step(0, 0);
      if (y10 > y10max) begin y10max = y10; t10 = n; end
    end
    check(y10max == 1000 * K10, "10 us filter: peak height A*K");
    check(t10 == K10 + LAT - 1, $sformatf("10 us filter: peak time %0d", t10));
    check(y10 == 0, "10 us filter: back to zero");
    // random pulses on noise, trigger enabled, with some threshold changes
    en = 1;
    for (int n = 0; n < 8000; n++) begin
      longint v;
      v = longint'($urandom_range(0, 40)) - 20;
      if ($urandom_range(0, 150) == 0) v += longint'($urandom_range(50, 3000));
      if (n == 4000) thr = 24'd150000;
      if (n == 6000) en = 0;
      step(v, 1);
    end
    // constant input: DC gain K^2
    en = 1;
    for (int n = 0; n < 3 * K; n++) step(7, 1);
    check(y == 7 * K * K, "DC gain K^2");
    check(npulses > 10, $sformatf("trigger pulses seen: %0d", npulses));
    $display("trigger pulses: %0d", npulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

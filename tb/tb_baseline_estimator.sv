// tb_baseline_estimator -- self-checking test of the baseline estimator.
//
// The input is a baseline of 500 LSB with +-10 LSB uniform noise, plus
// exponentially decaying pulses (50 us decay, random heights up to 3000 LSB)
// arriving at about 200 per second, at 100 MSamples/s. Checked:
//   * every output against a reference model of the stage equations kept
//     here, fed with the same decimated samples;
//   * the output period (DECIM clocks) and the latency (N_STAGES clocks after
//     the sample is taken);
//   * after settling, the estimate stays within 4 LSB of 500 although pulses
//     keep arriving.
module tb_baseline_estimator;
  localparam int IN_W = 14, NS = 3, DECIM = 100, SHIFT = 12;
  localparam int LIMIT0 = 256, LIMIT_SHR = 4;
  localparam int BASE = 500;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] x = BASE;
  logic signed [IN_W-1:0] bl;
  logic valid;
  int checks = 0, failures = 0, npulses = 0, nvalid = 0;

  baseline_estimator dut (.clk, .rst_n, .x, .baseline(bl), .valid);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: bl=%0d", what, $time, bl);
    end
  endtask

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint acc [NS];
  bit primed = 0;
  longint model_out;
  longint x_taken;
  int maxbl = 0, minbl = 100000;

  function automatic longint floor_shr(input longint v, input int s);
    return v >>> s;   // arithmetic shift = floor division
  endfunction

  task automatic model(input longint xin);
    longint xs, m, d, lim;
    xs = xin;
    for (int s = 0; s < NS; s++) begin
      if (!primed) acc[s] = xs <<< SHIFT;
      else acc[s] = acc[s] + xs - floor_shr(acc[s], SHIFT);
      m = floor_shr(acc[s], SHIFT);
      d = xs - m;
      lim = LIMIT0 >> (LIMIT_SHR * s);
      if (d > lim) d = lim;
      if (d < -lim) d = -lim;
      xs = m + d;
    end
    primed = 1;
    model_out = xs;
  endtask

  initial begin
    longint e;
    real pulse;
    int last_valid;
    pulse = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    e = 0;
    last_valid = -1;
    for (int n = 0; n < 6_000_000; n++) begin
      // sample for the next edge
      if ($urandom_range(0, 499_999) == 0) begin
        pulse += real'($urandom_range(100, 3000));
        npulses++;
      end
      x = IN_W'(BASE + int'($urandom_range(0, 20)) - 10 + int'(pulse));
      pulse = pulse * 0.9998;      // 50 us decay at 100 MSamples/s
      @(posedge clk);
      if (e % DECIM == 0) x_taken = x;
      #1;
      if (e % DECIM == NS - 1) begin
        model(x_taken);
        check(valid, "valid at slot N_STAGES-1");
        check(bl == IN_W'(model_out), $sformatf("model %0d", model_out));
        if (last_valid >= 0) check(n - last_valid == DECIM, "output period");
        last_valid = n;
        nvalid++;
        if (n > 3_000_000)
          begin check(bl >= BASE - 4 && bl <= BASE + 4, "estimate near the baseline"); if (bl > maxbl) maxbl = bl; if (bl < minbl) minbl = bl; end
      end else begin
        check(!valid, "no valid outside slot N_STAGES-1");
      end
      e++;
      @(negedge clk);
    end
    check(npulses >= 3, "pulses were applied");
    $display("pulses %0d, outputs %0d, estimate range %0d..%0d", npulses, nvalid, minbl, maxbl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// digital_trigger -- real-time digital trigger of one DAQ channel.
//
// A triangular shaping filter followed by a threshold comparator. The filter
// is the cascade drawn for this trigger: the second difference
//     d[n] = x[n] - 2 x[n-K] + x[n-2K]
// taken with two K-sample delay lines, followed by two accumulators. Its
// impulse response is a triangle that rises 1, 2, ..., K over K samples and
// falls back to zero over the next K, so the peaking time is K samples
// (K = 100 gives the 1 us peaking time at 100 MSamples/s). The delay lines
// are dual-port memories (block RAM in an FPGA), so the cost does not grow
// with K except in memory; K can be raised to about 1000 (10 us).
//
// The accumulators wrap modulo 2^Y_W. Because the filter as a whole is an
// FIR with gain at most K^2, Y_W is chosen wide enough for the true output
// and the wrap never shows. Until the delay lines have been filled once after
// reset, their outputs are taken as zero, as if they had been cleared.
//
// Timing: one sample per clock. An input sample x[t] first reaches `y` four
// clocks later with weight 1; `y` peaks K-1 clocks after that.
// trig is high while enabled and y > threshold (threshold unsigned);
// trig_pulse is a one-clock pulse on each rising edge of trig.
//
// The filter structure, the peaking time and the per-channel threshold and
// enable follow the system description; the input being signed, the word
// widths, the register stages and the comparison rule are this design's.
module digital_trigger #(
  parameter int unsigned IN_W  = 14,     // ADC word
  parameter int unsigned K     = 100,    // delay / peaking time in samples
  parameter int unsigned THR_W = 24,
  parameter int unsigned Y_W   = IN_W + 2 + 2 * $clog2(K)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    enable,
  input  logic        [THR_W-1:0] threshold,
  output logic signed [Y_W-1:0]   y,
  output logic                    trig,
  output logic                    trig_pulse
);
  localparam int PW = (K > 1) ? $clog2(K) : 1;
  localparam int CW = (Y_W > THR_W) ? Y_W + 1 : THR_W + 1;   // compare width

  logic signed [IN_W-1:0] mem1 [K];
  logic signed [IN_W-1:0] mem2 [K];
  logic [PW-1:0]          ptr;
  logic                   filled;
  logic signed [IN_W-1:0] x_r, x_rr, d1_rd, d1_rr, d2_rd;
  logic signed [Y_W-1:0]  diff, acc1;
  logic                   above;

  // delay lines: read the value written K clocks earlier, then overwrite it
  always_ff @(posedge clk) begin
    mem1[ptr] <= x;
    mem2[ptr] <= d1_rd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
      x_r    <= '0;
      x_rr   <= '0;
      d1_rd  <= '0;
      d1_rr  <= '0;
      d2_rd  <= '0;
      diff   <= '0;
      acc1   <= '0;
      y      <= '0;
      trig   <= 1'b0;
      trig_pulse <= 1'b0;
    end else begin
      ptr <= (ptr == PW'(K - 1)) ? '0 : ptr + 1'b1;
      if (ptr == PW'(K - 1)) filled <= 1'b1;
      x_r   <= x;
      d1_rd <= filled ? mem1[ptr] : '0;   // x[n-K]
      d2_rd <= filled ? mem2[ptr] : '0;   // x[n-2K], aligned with x_rr
      x_rr  <= x_r;
      d1_rr <= d1_rd;
      diff  <= Y_W'(x_rr) - (Y_W'(d1_rr) <<< 1) + Y_W'(d2_rd);
      acc1  <= acc1 + diff;
      y     <= y + acc1;
      trig       <= above;
      trig_pulse <= above && !trig;
    end
  end

  assign above = enable && (CW'(y) > $signed(CW'({1'b0, threshold})));
endmodule

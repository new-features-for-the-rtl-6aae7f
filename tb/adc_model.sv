// adc_model -- behavioural model of a detector channel and its ADC.
//
// Not synthesizable. Every system clock edge, TCO_NS later, a new 14-bit
// two's-complement word appears: a constant baseline BASE, +-NOISE LSB of
// uniform noise and, while `pulses_on` is high, randomly arriving pulses
// with a 20-sample exponential decay. Pulses are at least GAP_MIN clocks
// apart, so the trigger filter sees each one alone; half of them are large
// (600..2000 LSB, well above a trigger threshold of 2^18 at K = 100) and half
// small (10..40 LSB, well below it). `n_big` and `n_small` count them.
module adc_model #(
  parameter int  BASE    = 300,
  parameter int  NOISE   = 3,
  parameter real TCO_NS  = 3.003,
  parameter int  GAP_MIN = 1500,
  parameter int  SEED    = 1
) (
  input  logic        clk,
  input  logic        pulses_on,
  output logic [13:0] d,
  output int          n_big,
  output int          n_small
);
  timeunit 1ns;
  timeprecision 1ps;

  real pulse = 0.0;
  int  since = 0;
  function automatic int unsigned next();
    return $urandom;
  endfunction

  initial begin
    void'($urandom(SEED));
    d = 14'(BASE);
    n_big = 0;
    n_small = 0;
  end

  always @(posedge clk) begin
    #(TCO_NS);
    since++;
    if (pulses_on && since > GAP_MIN && next() % 3000 == 0) begin
      since = 0;
      if (next() % 2 == 0) begin
        pulse += real'(600 + next() % 1401);
        n_big++;
      end else begin
        pulse += real'(10 + next() % 31);
        n_small++;
      end
    end
    d = 14'(BASE + int'(next() % (2 * NOISE + 1)) - NOISE + int'(pulse));
    pulse = pulse * 0.95;
  end
endmodule

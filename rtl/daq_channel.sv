// daq_channel -- the FPGA of one DAQ channel.
//
// Takes the 14-bit ADC output through the self-adaptive readout-clock
// alignment, then feeds the aligned samples to
//   * the baseline estimator (decimated, shared arithmetic unit),
//   * the real-time digital trigger, which sees the sample minus the current
//     baseline estimate, and whose threshold and enable come from the user
//     register,
//   * the 24-bit rate meter, counting trigger pulses, with enable and reset
//     bits in the user register,
// and makes all of them reachable through the slow-control endpoint at
// address `my_addr`. The aligned samples also leave the channel on `sample`
// for the serial data link to the PC, which is outside this design.
//
// Timing: `sample` follows the ADC by the capture and SYNC stages plus one
// system-clock register; the trigger adds four clocks plus the peaking time.
//
// The set of functions in a channel follows the system description.
// Subtracting the baseline estimate before the trigger filter is this
// design's choice: the filter drawn for the trigger passes DC with gain K^2,
// so a threshold only makes sense above the baseline.
module daq_channel
  import daq_pkg::*;
#(
  parameter int unsigned K             = 100,
  parameter int unsigned DECIM         = 100,
  parameter int unsigned BL_SHIFT      = 12,
  parameter int unsigned CLKS_PER_BIT  = daq_pkg::BIT_CLKS,
  parameter int unsigned OBS_CYCLES    = 256,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ADC and phase-shifted readout clocks from the DCM
  input  logic                 clk_0,
  input  logic                 clk_90,
  input  logic                 clk_270,
  input  logic [ADC_W-1:0]     adc_d,
  output logic                 psen,
  output logic                 psincdec,
  input  logic                 psdone,
  // slow control
  input  logic [CH_ADDR_W-1:0] my_addr,
  input  logic                 rxd,
  output logic                 txd,
  // results
  output logic [ADC_W-1:0]     sample,
  output logic                 trig,
  output logic                 trig_pulse,
  output logic [ADC_W-1:0]     baseline,
  output logic                 crc_error      // a request to the channel failed its CRC
);
  logic                    up, down, locked;
  logic signed [ADC_W-1:0] bl;
  logic signed [ADC_W:0]   x_trig;
  logic [7:0]              ctrl;
  logic [23:0]             threshold;
  logic [7:0]              cb0, cb1, cb2;
  ch_status_t              status;

  adc_phase_align #(.W(ADC_W), .OBS_CYCLES(OBS_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) u_align (
    .clk, .rst_n, .clk_0, .clk_90, .clk_270, .adc_d,
    .data(sample), .up, .down, .locked, .psen, .psincdec, .psdone
  );

  baseline_estimator #(.IN_W(ADC_W), .DECIM(DECIM), .SHIFT(BL_SHIFT)) u_base (
    .clk, .rst_n, .x(sample), .baseline(bl), .valid()
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) x_trig <= '0;
    else        x_trig <= (ADC_W+1)'($signed(sample)) - (ADC_W+1)'(bl);

  digital_trigger #(.IN_W(ADC_W + 1), .K(K), .THR_W(24)) u_trig (
    .clk, .rst_n, .x(x_trig), .enable(ctrl[CTRL_TRIG_EN]), .threshold,
    .y(), .trig, .trig_pulse
  );

  event_counter #(.W(24)) u_cnt (
    .clk, .rst_n, .event_i(trig_pulse), .enable(ctrl[CTRL_CNT_EN]),
    .clear(ctrl[CTRL_CNT_RST]), .count(),
    .count_b0(cb0), .count_b1(cb1), .count_b2(cb2)
  );

  assign status = '{count: {cb2, cb1, cb0}, baseline: bl,
                    locked: locked, up: up, down: down};

  slow_ctrl_slave #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_sc (
    .clk, .rst_n, .my_addr, .rxd, .txd, .status, .ctrl, .threshold, .crc_error
  );

  assign baseline = bl;
endmodule

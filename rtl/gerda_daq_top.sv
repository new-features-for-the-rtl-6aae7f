// gerda_daq_top -- the digital part of a multi-channel DAQ system.
//
// N_CH DAQ channels (four per NIM module; 24 channels share one PC) and the
// expansion board that links them to the PC. The PC talks to every channel
// over one asynchronous serial line through the expansion board, which also
// ORs the channels' triggers into one trigger for the PCI receiver and keeps
// a bitmap of channels that fail to answer. Channel i has slow-control
// address i.
//
// What is outside the digital design comes in and goes out as ports: the
// ADC words and, per channel, the three phase-shifted readout clocks of the
// clock manager with its phase-shift handshake; the aligned samples go out
// to the serial data link towards the PCI receiver.
//
// Timing: all logic runs on the 100 MHz system clock `clk`, except the
// capture and SYNC stages of each channel, which run on that channel's
// readout clocks.
module gerda_daq_top
  import daq_pkg::*;
#(
  parameter int unsigned N_CH          = 24,
  parameter int unsigned K             = 100,
  parameter int unsigned DECIM         = 100,
  parameter int unsigned BL_SHIFT      = 12,
  parameter int unsigned CLKS_PER_BIT  = daq_pkg::BIT_CLKS,
  parameter int unsigned OBS_CYCLES    = 256,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // per channel: ADC and clock manager
  input  logic [N_CH-1:0]            clk_0,
  input  logic [N_CH-1:0]            clk_90,
  input  logic [N_CH-1:0]            clk_270,
  input  logic [N_CH-1:0][ADC_W-1:0] adc_d,
  output logic [N_CH-1:0]            psen,
  output logic [N_CH-1:0]            psincdec,
  input  logic [N_CH-1:0]            psdone,
  // PC serial link
  input  logic                       pc_rxd,
  output logic                       pc_txd,
  // to the PCI receiver
  output logic [N_CH-1:0][ADC_W-1:0] sample,
  output logic                       trig_out,
  // diagnostics
  output logic [N_CH-1:0]            defective,
  output logic [N_CH-1:0][ADC_W-1:0] baseline,
  output logic [N_CH-1:0]            crc_error
);
  logic [N_CH-1:0] ch_rxd, ch_txd, ch_trig;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    daq_channel #(
      .K(K), .DECIM(DECIM), .BL_SHIFT(BL_SHIFT), .CLKS_PER_BIT(CLKS_PER_BIT),
      .OBS_CYCLES(OBS_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
    ) u_ch (
      .clk, .rst_n,
      .clk_0(clk_0[i]), .clk_90(clk_90[i]), .clk_270(clk_270[i]), .adc_d(adc_d[i]),
      .psen(psen[i]), .psincdec(psincdec[i]), .psdone(psdone[i]),
      .my_addr(CH_ADDR_W'(i)), .rxd(ch_rxd[i]), .txd(ch_txd[i]),
      .sample(sample[i]), .trig(ch_trig[i]), .trig_pulse(),
      .baseline(baseline[i]), .crc_error(crc_error[i])
    );
  end

  expansion_board #(.N_CH(N_CH), .CLKS_PER_BIT(CLKS_PER_BIT)) u_exp (
    .clk, .rst_n, .pc_rxd, .pc_txd, .ch_rxd, .ch_txd, .ch_trig, .trig_out, .defective
  );
endmodule

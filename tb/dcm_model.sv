// dcm_model -- behavioural model of a phase-shifting digital clock manager.
//
// Not synthesizable. Produces three copies of a PERIOD_NS clock at 0, +90 and
// -90 (270) degrees, the 0-degree copy first rising at INIT_PHASE_NS. Each
// one-clock `psen` pulse on `psclk` with `psincdec` high delays all three
// copies by STEP_PS picoseconds (low `psincdec` advances them); `psdone`
// pulses for one psclk cycle PSDONE_LAT cycles later, as on a Xilinx DCM.
// The shift is applied to each copy in its next low phase, so no copy ever
// shows a shortened pulse.
module dcm_model #(
  parameter real PERIOD_NS     = 10.0,
  parameter real INIT_PHASE_NS = 1.0,
  parameter real STEP_PS       = 15.0,
  parameter int  PSDONE_LAT    = 12
) (
  input  logic psclk,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output logic clk_0,
  output logic clk_90,
  output logic clk_270
);
  timeunit 1ns;
  timeprecision 1ps;

  int  pend [3] = '{0, 0, 0};        // steps not yet applied, per copy
  real phase_ns = INIT_PHASE_NS;     // current phase of the 0-degree copy
  int  lat = 0;

  initial psdone = 1'b0;

  always @(posedge psclk) begin
    psdone <= 1'b0;
    if (psen) begin
      for (int i = 0; i < 3; i++) pend[i] += psincdec ? 1 : -1;
      phase_ns += (psincdec ? 1.0 : -1.0) * STEP_PS / 1000.0;
      lat = PSDONE_LAT;
    end else if (lat > 0) begin
      lat--;
      if (lat == 0) psdone <= 1'b1;
    end
  end

  task automatic run(ref logic c, input int idx, input real first);
    c = 1'b0;
    #(first);
    forever begin
      real extra;
      c = 1'b1;
      #(PERIOD_NS / 2.0);
      c = 1'b0;
      extra = real'(pend[idx]) * STEP_PS / 1000.0;
      pend[idx] = 0;
      #(PERIOD_NS / 2.0 + extra);
    end
  endtask

  initial run(clk_0,   0, INIT_PHASE_NS);
  initial run(clk_90,  1, INIT_PHASE_NS + PERIOD_NS / 4.0);
  initial run(clk_270, 2, INIT_PHASE_NS + 3.0 * PERIOD_NS / 4.0);
endmodule

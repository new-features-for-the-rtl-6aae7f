// tb_adc_phase_align -- self-checking test of the readout clock alignment.
//
// An ADC model changes its 14-bit word TCO_NS after each system clock edge;
// the words follow d[n+1] = d[n] + STEP (mod 2^14), so most bits toggle.
// The clock manager model starts with the 0-degree readout clock 1 ns after
// the system clock, which puts the data edge between the 0 and +90 degree
// captures. Checked:
//   * the aligner shifts in 15 ps steps until no data edge lies within a
//     quarter period of the 0-degree clock, then reports `locked` and stops
//     shifting; the number of steps is the one that geometry gives;
//   * both DOWN (edge after the sampling point) and UP (edge before it)
//     were reported on the way;
//   * after locking, consecutive output words differ by STEP, i.e. every
//     word is captured intact and none is lost or repeated.
module tb_adc_phase_align;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  W = 14;
  localparam real TCO_NS = 3.003;
  localparam real INIT_NS = 6.0;      // 1 ns after a system clock edge
  localparam real EDGE_NS = 5.0 + TCO_NS;   // data edge, within the 10 ns period
  localparam int  STEP = 16'h1F3D;

  logic clk = 0, rst_n = 0;
  logic clk_0, clk_90, clk_270;
  logic [W-1:0] adc_d = '0, data;
  logic up, down, locked, psen, psincdec, psdone;
  int checks = 0, failures = 0, nshift = 0, nup = 0, ndown = 0;

  adc_phase_align dut (.clk, .rst_n, .clk_0, .clk_90, .clk_270, .adc_d, .data,
                       .up, .down, .locked, .psen, .psincdec, .psdone);
  dcm_model #(.INIT_PHASE_NS(INIT_NS)) u_dcm (.psclk(clk), .psen, .psincdec, .psdone,
                                            .clk_0, .clk_90, .clk_270);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    #(TCO_NS) adc_d = adc_d + W'(STEP);
  end
  always @(posedge clk) if (rst_n) begin
    if (psen) nshift++;
    if (up && !locked) nup++;
    if (down && !locked) ndown++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_min;
    logic [W-1:0] prev;
    // first phase with the -90 copy after the data edge
    expect_min = int'($ceil((EDGE_NS + 2.5 - INIT_NS) / 0.015));
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (locked);
    @(posedge clk);
    $display("locked after %0d phase steps (geometry: %0d), %0t", nshift, expect_min, $time);
    check(psincdec == 1'b1, "shift direction is later");
    check(nshift >= expect_min && nshift <= expect_min + 2, "number of phase steps");
    check(u_dcm.phase_ns - 2.5 > EDGE_NS, "-90 copy after the data edge");
    check(u_dcm.phase_ns + 2.5 < EDGE_NS + 10.0, "+90 copy before the next data edge");
    check(ndown > 0, "DOWN reported");
    check(nup > 0, "UP reported");
    #1;
    prev = data;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      #1;
      check(data == prev + W'(STEP), "consecutive words");
      check(locked && !psen, "stays locked");
      prev = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

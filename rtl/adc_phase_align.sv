// adc_phase_align -- self-adaptive synchronisation of the ADC readout clock.
//
// Every ADC output bit is captured three times, by flip-flops clocked with
// three copies of the readout clock at -90 (clk_270), 0 (clk_0) and +90
// (clk_90) degrees. A SYNC stage brings the three captures of the same
// sample together in the clk_0 domain: the +90 capture is taken at the next
// clk_0 edge, the -90 capture one clk_0 edge earlier and delayed once more.
// Two XOR banks then compare them bit by bit: UP flags a difference between
// the -90 and 0 captures, DOWN one between the 0 and +90 captures. When all
// three agree, no data edge lies within a quarter period of the sampling
// point and the phase is good.
//
// The control logic, on the system clock, watches the flags for OBS_CYCLES
// clocks. If any difference was seen it asks the phase-shifting clock
// manager (DCM) to move all three clocks one fine step later (psen pulse with
// psincdec = 1, about 15 ps per step on the target device), waits for
// psdone and SETTLE_CYCLES more clocks, and looks again. A clean window sets
// `locked`. Data are delivered as the 0-degree capture, retimed to the
// system clock.
//
// Three captures, the SYNC/XOR/UP/DOWN structure and shifting in one
// direction only until all captures agree follow the system description;
// the window lengths, the retiming and the handshake with the DCM (the
// phase-shift port of a Xilinx DCM) are this design's choices.
module adc_phase_align #(
  parameter int unsigned W             = 14,
  parameter int unsigned OBS_CYCLES    = 256,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic         clk,        // system clock, also phase-shift control clock
  input  logic         rst_n,
  input  logic         clk_0,
  input  logic         clk_90,
  input  logic         clk_270,
  input  logic [W-1:0] adc_d,
  output logic [W-1:0] data,       // 0-degree sample on the system clock
  output logic         up,         // a -90/0 difference seen in the last window
  output logic         down,       // a 0/+90 difference seen in the last window
  output logic         locked,
  output logic         psen,
  output logic         psincdec,
  input  logic         psdone
);
  // ---- capture flip-flops
  logic [W-1:0] ff270, ff0, ff90;
  always_ff @(posedge clk_270) ff270 <= adc_d;
  always_ff @(posedge clk_0)   ff0   <= adc_d;
  always_ff @(posedge clk_90)  ff90  <= adc_d;

  // ---- SYNC: the three captures of one sample, side by side on clk_0
  logic [W-1:0] s270a, s270, s0, s90;
  always_ff @(posedge clk_0) begin
    s270a <= ff270;   // captured a quarter period before this edge
    s270  <= s270a;
    s0    <= ff0;
    s90   <= ff90;    // captured a quarter period after the previous edge
  end

  // ---- XOR banks
  logic up_0, dn_0;
  always_ff @(posedge clk_0) begin
    up_0 <= |(s270 ^ s0);
    dn_0 <= |(s0 ^ s90);
  end

  // ---- onto the system clock
  logic up_s, dn_s;
  always_ff @(posedge clk) begin
    data <= s0;
    up_s <= up_0;
    dn_s <= dn_0;
  end

  // ---- phase control
  typedef enum logic [1:0] {P_OBSERVE, P_SHIFT, P_WAIT, P_SETTLE} pstate_e;
  localparam int CW = $clog2(OBS_CYCLES + SETTLE_CYCLES + 1);

  pstate_e       ps;
  logic [CW-1:0] cnt;
  logic          seen_up, seen_dn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps       <= P_SETTLE;
      cnt      <= CW'(SETTLE_CYCLES);
      seen_up  <= 1'b0;
      seen_dn  <= 1'b0;
      up       <= 1'b0;
      down     <= 1'b0;
      locked   <= 1'b0;
      psen     <= 1'b0;
    end else begin
      psen <= 1'b0;
      unique case (ps)
        P_OBSERVE: begin
          seen_up <= seen_up | up_s;
          seen_dn <= seen_dn | dn_s;
          if (cnt == 0) begin
            up      <= seen_up | up_s;
            down    <= seen_dn | dn_s;
            locked  <= !(seen_up | up_s | seen_dn | dn_s);
            ps      <= (seen_up | up_s | seen_dn | dn_s) ? P_SHIFT : P_OBSERVE;
            cnt     <= CW'(OBS_CYCLES - 1);
            seen_up <= 1'b0;
            seen_dn <= 1'b0;
          end else cnt <= cnt - 1'b1;
        end
        P_SHIFT: begin
          psen <= 1'b1;
          ps   <= P_WAIT;
        end
        P_WAIT: if (psdone) begin
          ps  <= P_SETTLE;
          cnt <= CW'(SETTLE_CYCLES);
        end
        P_SETTLE: if (cnt == 0) begin
          ps      <= P_OBSERVE;
          cnt     <= CW'(OBS_CYCLES - 1);
          seen_up <= 1'b0;
          seen_dn <= 1'b0;
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end

  assign psincdec = 1'b1;   // always shift later ("to the right")

  // the DCM takes one request at a time
  a_one_request: assert property (@(posedge clk)
                                  psen |=> !psen);
endmodule

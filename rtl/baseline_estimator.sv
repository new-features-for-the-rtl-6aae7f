// baseline_estimator -- digital estimator of the signal baseline level.
//
// A cascade of N_STAGES identical stages, each a first-order low-pass IIR
// filter followed by a comparator + limiter. Stage s filters its input,
//     acc_s += x_s - (acc_s >>> SHIFT),   m_s = acc_s >>> SHIFT,
// then compares the input with the filtered value m_s and limits it to a
// band around it:
//     c_s = m_s + clamp(x_s - m_s, -L_s, +L_s).
// c_s is the input of the next stage; c of the last stage is the estimate.
// Pulses riding on the baseline are thus cut down stage by stage, so the
// estimate stays at the baseline with event rates of a few hundred per
// second. The limit shrinks by a factor 2^LIMIT_SHR per stage.
//
// The baseline moves slowly, so one arithmetic unit serves all stages: the
// ADC stream is decimated by DECIM and in each decimation period the unit
// works on stage 0, 1, ... in consecutive clocks, with the filter states in
// a small register file. The first sample after reset preloads every stage,
// so the estimate starts at the signal level instead of creeping up from 0.
//
// Timing: x is taken on the clock where the slot counter is 0, i.e. every
// DECIM clocks; `baseline` and the `valid` pulse follow N_STAGES clocks
// later.
//
// Three stages of low-pass IIR filter + comparator/limiter and the sharing of
// one fast unit among slow signals follow the system description. The filter
// form, SHIFT, the limits, DECIM and the preload are this design's own.
module baseline_estimator #(
  parameter int unsigned IN_W      = 14,
  parameter int unsigned N_STAGES  = 3,
  parameter int unsigned DECIM     = 100,   // 1 MSamples/s at 100 MHz
  parameter int unsigned SHIFT     = 12,    // IIR coefficient 2^-SHIFT
  parameter int unsigned LIMIT0    = 256,   // limit of stage 0, in LSB
  parameter int unsigned LIMIT_SHR = 4      // limits 256, 16, 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] x,
  output logic signed [IN_W-1:0] baseline,
  output logic                   valid
);
  localparam int AW = IN_W + SHIFT + 1;
  localparam int SW = $clog2(DECIM);
  localparam int DW = IN_W + 2;

  logic signed [AW-1:0]   acc [N_STAGES];
  logic [SW-1:0]          slot;
  logic                   primed;
  logic signed [IN_W-1:0] xs;          // input of the stage being worked on

  // shared arithmetic unit
  logic [$clog2(N_STAGES+1)-1:0] st;
  logic signed [IN_W-1:0] x_cur, m_new, c_out;
  logic signed [AW-1:0]   acc_new;
  logic signed [DW-1:0]   d, lim, d_lim;

  assign st    = ($clog2(N_STAGES+1))'(slot);
  assign x_cur = (slot == 0) ? x : xs;

  always_comb begin
    acc_new = acc[st[$clog2(N_STAGES)-1:0]];
    if (!primed) acc_new = AW'(x_cur) <<< SHIFT;
    else         acc_new = acc_new + AW'(x_cur) - (acc_new >>> SHIFT);
    m_new = IN_W'(acc_new >>> SHIFT);
    d     = DW'(x_cur) - DW'(m_new);
    lim   = DW'(LIMIT0 >> (LIMIT_SHR * st));
    if      (d >  lim) d_lim =  lim;
    else if (d < -lim) d_lim = -lim;
    else               d_lim =  d;
    c_out = IN_W'(DW'(m_new) + d_lim);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot     <= '0;
      primed   <= 1'b0;
      xs       <= '0;
      baseline <= '0;
      valid    <= 1'b0;
      for (int i = 0; i < N_STAGES; i++) acc[i] <= '0;
    end else begin
      valid <= 1'b0;
      slot  <= (slot == SW'(DECIM - 1)) ? '0 : slot + 1'b1;
      if (slot < SW'(N_STAGES)) begin
        acc[st[$clog2(N_STAGES)-1:0]] <= acc_new;
        xs <= c_out;
        if (slot == SW'(N_STAGES - 1)) begin
          baseline <= c_out;
          valid    <= 1'b1;
          primed   <= 1'b1;
        end
      end
    end
  end

  initial assert (DECIM >= N_STAGES) else $error("DECIM must cover all stages");
endmodule

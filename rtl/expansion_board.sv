// expansion_board -- hub between the PC and the DAQ channels.
//
// Slow control: the PC's serial line is copied to every channel; each
// channel decodes the address byte and only the addressed one answers. The
// board follows the request stream itself (same 4-byte packets, same gap
// rule and CRC-8 as the channels, see slow_ctrl_slave), remembers the
// addressed channel and connects that channel's answer line back to the PC,
// so a channel that jams its line cannot block the others.
//
// Diagnostics: after a request with a good CRC to an existing channel, the
// board waits up to TIMEOUT_BITS bit times for the start bit of the answer.
// A channel that answers is marked good, one that does not is marked
// defective in the `defective` bitmap (one bit per channel, all clear after
// reset), which the board shows on its outputs.
//
// Trigger: the triggers of all channels are OR-ed into a single trigger for
// the PCI receiver, registered once (one clock of latency).
//
// Sharing one PC link among the channels, addressing each channel through
// this board, the defective-channel diagnostic at board level and the OR of
// all triggers follow the system description. The answer routing by address
// and the timeout rule are this design's own.
module expansion_board
  import daq_pkg::*;
#(
  parameter int unsigned N_CH         = 24,
  parameter int unsigned CLKS_PER_BIT = daq_pkg::BIT_CLKS,
  parameter int unsigned GAP_BITS     = 20,
  parameter int unsigned TIMEOUT_BITS = 20
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pc_rxd,       // from the PC
  output logic            pc_txd,       // to the PC
  output logic [N_CH-1:0] ch_rxd,       // to each channel
  input  logic [N_CH-1:0] ch_txd,       // from each channel
  input  logic [N_CH-1:0] ch_trig,
  output logic            trig_out,
  output logic [N_CH-1:0] defective
);
  localparam int unsigned GAP = GAP_BITS * CLKS_PER_BIT;
  localparam int unsigned TMO = TIMEOUT_BITS * CLKS_PER_BIT;
  localparam int TW = $clog2(((GAP > TMO) ? GAP : TMO) + 1);
  localparam int SELW = $clog2(N_CH);

  assign ch_rxd = {N_CH{pc_rxd}};

  logic [7:0] rx_data;
  logic       rx_valid, rx_ferr;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(pc_rxd), .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  logic [1:0]      idx;
  logic [7:0]      crc;
  logic [7:0]      addr_b;
  logic [TW-1:0]   gap_cnt;
  logic [SELW-1:0] sel;
  logic            sel_ok;
  logic            waiting;
  logic [TW-1:0]   tmo_cnt;
  logic [N_CH-1:0] txd_s;             // channel answer lines, synchronised
  logic [N_CH-1:0] txd_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txd_m <= '1;
      txd_s <= '1;
    end else begin
      txd_m <= ch_txd;
      txd_s <= txd_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      crc       <= '0;
      addr_b    <= '0;
      gap_cnt   <= '0;
      sel       <= '0;
      sel_ok    <= 1'b0;
      waiting   <= 1'b0;
      tmo_cnt   <= '0;
      defective <= '0;
    end else begin
      // packet framing, as in the channels
      if (rx_valid || rx_ferr) gap_cnt <= '0;
      else if (gap_cnt != TW'(GAP)) gap_cnt <= gap_cnt + 1'b1;
      else begin
        idx <= '0;
        crc <= '0;
      end
      if (rx_ferr) begin
        idx <= '0;
        crc <= '0;
      end else if (rx_valid) begin
        if (idx == 2'd0) begin
          addr_b <= rx_data;
          if (rx_data < 8'(N_CH)) begin
            sel    <= SELW'(rx_data);
            sel_ok <= 1'b1;
          end else begin
            sel_ok <= 1'b0;
          end
        end
        if (idx != 2'd3) begin
          crc <= crc8_byte(crc, rx_data);
          idx <= idx + 1'b1;
        end else begin
          idx <= '0;
          crc <= '0;
          if (rx_data == crc && addr_b < 8'(N_CH)) begin
            waiting <= 1'b1;
            tmo_cnt <= TW'(TMO);
          end
        end
      end
      // answer watchdog
      if (waiting) begin
        if (!txd_s[sel]) begin
          waiting        <= 1'b0;
          defective[sel] <= 1'b0;
        end else if (tmo_cnt == 0) begin
          waiting        <= 1'b0;
          defective[sel] <= 1'b1;
        end else begin
          tmo_cnt <= tmo_cnt - 1'b1;
        end
      end
    end
  end

  assign pc_txd = sel_ok ? ch_txd[sel] : 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_out <= 1'b0;
    else        trig_out <= |ch_trig;
endmodule

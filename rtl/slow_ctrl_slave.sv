// slow_ctrl_slave -- slow-control endpoint of one DAQ channel.
//
// Receives request packets from the PC on the serial link, checks them and
// answers with a reply packet. Each channel has a 16-byte user register;
// the control byte, the 24-bit trigger threshold and six general-purpose
// bytes can be written, and the event counter, the baseline estimate and
// the ADC clock phase status are mapped as read-only bytes (see daq_pkg).
//
// Packet (both directions, 4 bytes, 8N1 at 38400 bit/s):
//   byte 0  channel address, bits 5:0 (up to 64 channels)
//   byte 1  command: bit 7 write, bits 3:0 register index, bits 6:4
//           reserved (echoed, otherwise ignored)
//   byte 2  data: value to write / value read back
//   byte 3  CRC-8 (poly 0x07, init 0) over bytes 0..2
// A request whose CRC fails, or whose address is not this channel's, is
// dropped without reply. A silence of GAP_BITS bit times between bytes
// re-aligns the receiver to byte 0. A write is answered with the register's
// new value, so the reply doubles as acknowledgement.
//
// The link speed, the 16-byte register, the per-channel addressing and the
// presence of a CRC follow the system description; the packet format, the
// register map, the gap rule and the CRC polynomial are this design's own.
module slow_ctrl_slave
  import daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = daq_pkg::BIT_CLKS,
  parameter int unsigned GAP_BITS     = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CH_ADDR_W-1:0] my_addr,
  input  logic                 rxd,
  output logic                 txd,
  input  ch_status_t           status,
  output logic [7:0]           ctrl,
  output logic [23:0]          threshold,
  output logic                 crc_error      // pulse: a request failed its CRC
);
  localparam int unsigned GAP = GAP_BITS * CLKS_PER_BIT;
  localparam int GW = $clog2(GAP + 1);

  logic [7:0] regs [NREG];           // writable bytes; read-only ones unused
  logic [7:0] rx_data;
  logic       rx_valid, rx_ferr;
  logic [1:0] idx;
  logic [7:0] pkt [3];
  logic [7:0] crc;
  logic [GW-1:0] gap_cnt;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  // --- register read mux
  function automatic logic [7:0] read_reg(input logic [3:0] a);
    unique case (a)
      REG_CNT0:  return status.count[7:0];
      REG_CNT1:  return status.count[15:8];
      REG_CNT2:  return status.count[23:16];
      REG_BASE0: return status.baseline[7:0];
      REG_BASE1: return 8'(status.baseline[ADC_W-1:8]);
      REG_PHASE: return {5'd0, status.down, status.up, status.locked};
      default:   return regs[a];
    endcase
  endfunction

  function automatic logic writable(input logic [3:0] a);
    return !(a inside {REG_CNT0, REG_CNT1, REG_CNT2, REG_BASE0, REG_BASE1, REG_PHASE});
  endfunction

  // --- reply sequencer
  logic [7:0] reply [4];
  logic [2:0] tx_left;
  logic [1:0] tx_idx;
  logic       tx_start, tx_busy;
  logic       do_reply;
  logic [7:0] rd_val;
  cmd_t       cmd;

  assign cmd = cmd_t'(pkt[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      crc       <= '0;
      gap_cnt   <= '0;
      crc_error <= 1'b0;
      do_reply  <= 1'b0;
      rd_val    <= '0;
      for (int i = 0; i < 3; i++) pkt[i] <= '0;
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      crc_error <= 1'b0;
      do_reply  <= 1'b0;
      if (rx_valid || rx_ferr) begin
        gap_cnt <= '0;
      end else if (gap_cnt != GW'(GAP)) begin
        gap_cnt <= gap_cnt + 1'b1;
      end else begin
        idx <= '0;                     // line silent: next byte is byte 0
        crc <= '0;
      end
      if (rx_ferr) begin
        idx <= '0;
        crc <= '0;
      end else if (rx_valid) begin
        if (idx != 2'd3) begin
          pkt[idx] <= rx_data;
          crc      <= crc8_byte(crc, rx_data);
          idx      <= idx + 1'b1;
        end else begin
          idx <= '0;
          crc <= '0;
          if (rx_data != crc) begin
            crc_error <= 1'b1;
          end else if (pkt[0][CH_ADDR_W-1:0] == my_addr && pkt[0][7:CH_ADDR_W] == '0) begin
            if (cmd.write && writable(cmd.addr)) begin
              regs[cmd.addr] <= pkt[2];
              rd_val         <= pkt[2];
            end else begin
              rd_val         <= read_reg(cmd.addr);
            end
            do_reply <= 1'b1;
          end
        end
      end
    end
  end

  // --- transmit the reply, one byte after the other
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_left  <= '0;
      tx_idx   <= '0;
      tx_start <= 1'b0;
      for (int i = 0; i < 4; i++) reply[i] <= '0;
    end else begin
      tx_start <= 1'b0;
      if (do_reply && tx_left == 0) begin
        reply[0] <= pkt[0];
        reply[1] <= pkt[1];
        reply[2] <= rd_val;
        reply[3] <= crc8_byte(crc8_byte(crc8_byte(8'h00, pkt[0]), pkt[1]), rd_val);
        tx_left  <= 3'd4;
        tx_idx   <= '0;
      end else if (tx_left != 0 && !tx_busy && !tx_start) begin
        tx_start <= 1'b1;
        tx_idx   <= tx_idx + 1'b1;
        tx_left  <= tx_left - 1'b1;
      end
    end
  end

  logic [7:0] tx_byte;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tx_byte <= '0;
    else if (tx_left != 0 && !tx_busy && !tx_start) tx_byte <= reply[tx_idx];

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_byte), .busy(tx_busy), .txd
  );

  assign ctrl      = regs[REG_CTRL];
  assign threshold = {regs[REG_THR2], regs[REG_THR1], regs[REG_THR0]};
endmodule

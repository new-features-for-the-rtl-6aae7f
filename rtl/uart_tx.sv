// uart_tx -- asynchronous serial (RS232 framing) transmitter.
//
// Sends 8N1 characters (start bit, eight data bits LSB first, stop bit) at
// CLKS_PER_BIT clocks per bit. A byte is accepted when `start` is high and
// `busy` is low; `busy` stays high until the stop bit has been on the line
// for a full bit time, so back-to-back bytes are separated by exactly one
// stop bit. The line idles high. The bit rate follows the system
// description; the framing is this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = daq_pkg::BIT_CLKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;     // bit times left, the one on the line included
  logic [8:0]    shreg;    // {stop, data} still to send

  assign busy = (bitn != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '1;
      txd   <= 1'b1;
    end else if (!busy) begin
      if (start) begin
        txd   <= 1'b0;                 // start bit
        shreg <= {1'b1, data};
        bitn  <= 4'd10;
        cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt == 0) begin
      bitn  <= bitn - 1'b1;
      cnt   <= CW'(CLKS_PER_BIT - 1);
      txd   <= (bitn == 4'd1) ? 1'b1 : shreg[0];
      shreg <= {1'b1, shreg[8:1]};
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule

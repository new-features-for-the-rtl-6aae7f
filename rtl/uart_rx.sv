// uart_rx -- asynchronous serial (RS232 framing) receiver.
//
// Receives 8N1 characters: one start bit, eight data bits LSB first, one
// stop bit, at CLKS_PER_BIT clocks per bit (2604 for 38400 bit/s from the
// 100 MHz system clock). The line is first passed through a two-flop
// synchronizer; a falling edge starts a character, the start bit is checked
// again half a bit later, and every data bit is sampled in the middle of its
// bit cell. A character with a low stop bit is dropped and flagged in
// frame_err. `valid` pulses for one clock with the byte on `data`.
// The bit rate follows the system description; the framing (8N1) and the
// mid-bit sampling are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = daq_pkg::BIT_CLKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx) begin
          state <= S_START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        S_START: if (cnt == 0) begin
          if (!rx) begin
            state <= S_DATA;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else begin
            state <= S_IDLE;          // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          shreg <= {rx, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= S_STOP;
          bitn  <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          state <= S_IDLE;
          if (rx) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule

// event_counter -- rate meter of one DAQ channel.
//
// A 24-bit counter of trigger events. It adds one for every clock on which
// `event_i` is high (the trigger's one-clock pulse) while `enable` is high,
// and is held at zero while `clear` is high; `clear` wins over counting.
// Both control inputs come from the channel's counter user register bits.
// The count is offered as three bytes, read one after the other over the
// slow-control link; the link is slow, so software disables counting
// before reading the bytes, which keeps them consistent. The counter
// saturates at all ones rather than wrapping, so a long run never reads as a
// small count.
//
// The width, the byte split and the reset/enable register bits follow the
// system description; saturation is this design's choice.
module event_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         event_i,
  input  logic         enable,
  input  logic         clear,
  output logic [W-1:0] count,
  output logic [7:0]   count_b0,   // bits  7:0
  output logic [7:0]   count_b1,   // bits 15:8
  output logic [7:0]   count_b2    // bits 23:16
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         count <= '0;
    else if (clear)                     count <= '0;
    else if (enable && event_i && count != '1) count <= count + 1'b1;
  end

  logic [23:0] c24;
  assign c24      = 24'(count);
  assign count_b0 = c24[7:0];
  assign count_b1 = c24[15:8];
  assign count_b2 = c24[23:16];
endmodule

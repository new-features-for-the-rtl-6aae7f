// sc_pc_model -- behavioural model of the PC end of the slow-control link.
//
// Not synthesizable. Serialises request packets onto `txd` (8N1, CLKS_PER_BIT
// clocks of `clk` per bit) and decodes whatever arrives on `rxd` into a queue
// of bytes. The CRC-8 (x^8+x^2+x+1) is computed here as the remainder of a
// polynomial division of the whole 3-byte message, independently of the
// byte-serial form used in the design.
module sc_pc_model #(
  parameter int CLKS_PER_BIT = 16
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  byte unsigned rxq [$];

  initial txd = 1'b1;

  function automatic byte unsigned crc_of(input byte unsigned b0, b1, b2);
    logic [31:0] m;
    m = {b0, b1, b2, 8'h00};
    for (int i = 31; i >= 8; i--)
      if (m[i]) m[i -: 9] = m[i -: 9] ^ 9'h107;
    return m[7:0];
  endfunction

  task automatic send_byte(input byte unsigned b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      txd = f[k];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
  endtask

  task automatic send_packet(input byte unsigned addr, cmd, data, input bit bad_crc = 0);
    byte unsigned c;
    c = crc_of(addr, cmd, data);
    if (bad_crc) c = c ^ 8'h01;
    send_byte(addr);
    send_byte(cmd);
    send_byte(data);
    send_byte(c);
  endtask

  // receiver: sample each bit in the middle of its cell
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge rxd);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (rxd) continue;
      for (int k = 0; k < 8; k++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        b[k] = rxd;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      if (rxd) rxq.push_back(b);
    end
  end
endmodule

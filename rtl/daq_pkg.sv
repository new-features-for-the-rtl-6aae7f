// daq_pkg -- constants and types shared by the DAQ channel FPGA and the
// expansion board.
//
// Holds the system clock and serial-link rates, the ADC word width, the
// register map of the 16-byte user register each channel exposes over the
// slow-control link, the packet format of that link and the CRC-8 used to
// protect it. The rates, the ADC width, the 16-byte register and the 24-bit
// rate meter read as three bytes come from the system description; the
// register map, the packet layout and the CRC polynomial are this design's
// own choices, since the description only says the protocol is custom and
// carries a CRC.
package daq_pkg;

  // 100 MHz system clock, 38400 bit/s slow-control link
  localparam int unsigned CLK_HZ        = 100_000_000;
  localparam int unsigned BAUD          = 38_400;
  localparam int unsigned BIT_CLKS      = CLK_HZ / BAUD;   // 2604

  localparam int unsigned ADC_W         = 14;  // AD6645 word
  localparam int unsigned NREG          = 16;  // user register bytes per channel
  localparam int unsigned CH_ADDR_W     = 6;   // up to 64 addressable channels
  localparam int unsigned PKT_BYTES     = 4;   // addr, cmd, data, crc

  // Register map of the 16-byte user register
  typedef enum logic [3:0] {
    REG_CTRL    = 4'd0,   // [0] trigger enable [1] counter enable [2] counter reset
    REG_THR0    = 4'd1,   // trigger threshold bits  7:0
    REG_THR1    = 4'd2,   // trigger threshold bits 15:8
    REG_THR2    = 4'd3,   // trigger threshold bits 23:16
    REG_CNT0    = 4'd4,   // event counter bits  7:0   (read only)
    REG_CNT1    = 4'd5,   // event counter bits 15:8   (read only)
    REG_CNT2    = 4'd6,   // event counter bits 23:16  (read only)
    REG_BASE0   = 4'd7,   // baseline estimate bits 7:0  (read only)
    REG_BASE1   = 4'd8,   // baseline estimate bits 13:8 (read only)
    REG_PHASE   = 4'd9    // [0] locked [1] up [2] down (read only)
  } reg_addr_e;           // 10..15 are general purpose read/write bytes

  localparam int unsigned CTRL_TRIG_EN = 0;
  localparam int unsigned CTRL_CNT_EN  = 1;
  localparam int unsigned CTRL_CNT_RST = 2;

  // Command byte of a request packet
  typedef struct packed {
    logic       write;    // 1: write data byte, 0: read
    logic [2:0] rsvd;
    logic [3:0] addr;     // register index
  } cmd_t;

  // Status read back from a channel's read-only registers
  typedef struct packed {
    logic [23:0]      count;
    logic [ADC_W-1:0] baseline;
    logic             locked;
    logic             up;
    logic             down;
  } ch_status_t;

  // CRC-8, polynomial x^8+x^2+x+1 (0x07), MSB first, initial value 0
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

endpackage

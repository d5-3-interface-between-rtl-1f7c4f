// serena_spi_pkg: register map and shared constants of the BEAM39PA SPI master.
//
// The SPI master is a 16-byte Avalon-MM slave with four 32-bit word
// registers. The word addresses, the control/status bit positions and the
// number of chip selects follow the register block of the SPI master IP;
// the timing constants (CS lead time, SCLK pulses around CS, extra-SCLK burst
// length) are this design's own choice because their values are not given.
package serena_spi_pkg;

  // Word address of each register (Avalon address bits [1:0]).
  typedef enum logic [1:0] {
    ADDR_DATA   = 2'd0,  // W: transmit word, starts a transfer; R: received word
    ADDR_CTRL   = 2'd1,  // W: control bits; R: control and status bits
    ADDR_CS_SEL = 2'd2,  // R/W: chip-select enable mask (bit 0 = CS0, bit 1 = CS1)
    ADDR_RSVD   = 2'd3   // reads as zero, writes ignored
  } spi_addr_e;

  // Bit positions in the control/status register.
  localparam int unsigned CTRL_BUSY         = 0;  // R: transfer or extra-SCLK burst running
  localparam int unsigned CTRL_CS           = 1;  // R: chip select currently asserted
  localparam int unsigned CTRL_CONT         = 2;  // R/W: keep CS asserted after the word
  localparam int unsigned CTRL_EXTRA_SCLK   = 3;  // R/W: start an extra-SCLK burst (self-clearing)
  localparam int unsigned CTRL_OVERWRITE_CS = 4;  // R/W: force CS asserted
  localparam int unsigned CTRL_RESET        = 7;  // R/W: hold the SPI engine in reset

  // Two chip-select lines to the system board.
  localparam int unsigned NUM_CS = 2;

  // Widths of the Avalon-MM slave.
  localparam int unsigned DATA_W = 32;
  localparam int unsigned BE_W   = DATA_W / 8;
  localparam int unsigned ADDR_W = 2;

  // Transfer length in bytes, 1 .. 4.
  typedef logic [2:0] spi_len_t;

endpackage

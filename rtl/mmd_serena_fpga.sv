// mmd_serena_fpga: FPGA top level of the beamforming control interface
// between a massive-MIMO SDR and a 39 GHz beamforming system board.
//
// A soft processor (outside this RTL) receives high-level beamforming
// commands over a UART and turns them into register accesses on the
// BEAM39PA beamformer ICs. This top level holds the logic around it:
//   * spi_master_serena_if - the BEAM39PA SPI master on the processor's
//     Avalon-MM bus, driving SCLK, COPI, CS0_n, CS1_n and reading CIPO;
//   * button_debouncer     - cleans KEY[1] and SW[3:0] before the processor
//     reads them on its key/switch input port;
//   * pin wiring of the processor's parallel ports: TX enable, RX enable and
//     reset of the system board come from the output port, the front-end
//     ready line goes to bit 0 of the input port, and the LEDs show the
//     output LED port, the PLL lock and a constant "on".
// The processor, its parallel ports and the PLL are vendor IP; their
// signals are ports of this module (avs_* for the SPI master's slave port,
// pio_out, pio_led_out, pio_in, key_sw_db, pll_locked).
//
// Timing: one clock domain, main_clk (100 MHz). main_reset_n (KEY[0],
// released = high) is asynchronous; it is synchronised here and drives the
// SPI master's synchronous reset, two clocks after release.
//
// The parts, the CLK_FREQ of the debouncer and the pin names follow the
// original FPGA top level; which parallel-port bit drives TX enable and the
// reset synchroniser are this design's own choices.
module mmd_serena_fpga
  import serena_spi_pkg::*;
#(
  parameter int unsigned CLK_FREQ = 100_000_000
) (
  input  logic              main_clk,
  input  logic              main_reset_n,
  // Avalon-MM slave of the SPI master (from the soft processor)
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [DATA_W-1:0] avs_writedata,
  input  logic [BE_W-1:0]   avs_byteenable,
  output logic [DATA_W-1:0] avs_readdata,
  // BEAM39PA SPI to the system board
  output logic              spi_serena2_sclk,
  output logic              spi_serena2_copi,
  input  logic              spi_serena2_cipo,
  output logic              spi_serena2_cs0_n,
  output logic              spi_serena2_cs1_n,
  output logic              spi_serena2_busy,
  // board key and switches, and their debounced copy for the processor
  input  logic              key1,           // released = high
  input  logic [3:0]        sw,             // on = low
  output logic [4:0]        key_sw_db,      // {SW[3:0], KEY[1]}
  // processor parallel ports
  input  logic [2:0]        pio_out,        // bits 2:0 of the output port
  input  logic [7:2]        pio_led_out,
  output logic [31:0]       pio_in,
  input  logic              pll_locked,
  // system board control lines
  output logic              out_serena_tx_en,
  output logic              out_serena_rx_en,
  output logic              out_serena_reset,
  input  logic              in_serena_fe_ready,
  output logic [7:0]        led
);

  logic [1:0] rst_sync;
  logic       rst;

  always_ff @(posedge main_clk or negedge main_reset_n) begin
    if (!main_reset_n) rst_sync <= 2'b11;
    else               rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst = rst_sync[1];

  spi_master_serena_if u_spi_serena2 (
    .clk            (main_clk),
    .rst            (rst),
    .avs_address    (avs_address),
    .avs_read       (avs_read),
    .avs_write      (avs_write),
    .avs_writedata  (avs_writedata),
    .avs_byteenable (avs_byteenable),
    .avs_readdata   (avs_readdata),
    .cs0_n          (spi_serena2_cs0_n),
    .cs1_n          (spi_serena2_cs1_n),
    .sclk           (spi_serena2_sclk),
    .copi           (spi_serena2_copi),
    .cipo           (spi_serena2_cipo),
    .busy           (spi_serena2_busy)
  );

  button_debouncer #(
    .CLK_FREQ (CLK_FREQ),
    .NBITS    (5)
  ) u_debounce (
    .clk      (main_clk),
    .rst_n    (main_reset_n),
    .data_in  ({sw, key1}),
    .data_out (key_sw_db)
  );

  assign out_serena_tx_en = pio_out[0];
  assign out_serena_rx_en = pio_out[1];
  assign out_serena_reset = pio_out[2];
  assign pio_in           = {30'd0, 1'b0, in_serena_fe_ready};
  assign led              = {pio_led_out[7:2], pll_locked, 1'b1};

endmodule

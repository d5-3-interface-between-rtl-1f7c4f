// spi_master_serena_if: SPI master IP for the BEAM39PA beamformer, with an
// Avalon-MM slave port for the soft processor.
//
// The processor writes a word (1 to 4 bytes, chosen by the byte enables) to
// the DATA register; the engine (serena_spi_master) sends it MSB first while
// reading CIPO, and BUSY stays high until the frame, including its trailing
// SCLK pulses, is over. Longer packets are built from several words with the
// continuous bit set, which keeps CS asserted between them. Two further
// primitives let software build the BEAM39PA's special frames: the
// overwrite-CS bit forces CS asserted on its own, and the extra-SCLK bit
// sends a burst of SCLK pulses with no data (serena_extra_sclk).
//
// Pin logic:
//   cs_int_n = engine CS_N AND NOT overwrite_cs
//   CS0_n    = cs_int_n OR NOT cs_sel[0];  CS1_n = cs_int_n OR NOT cs_sel[1]
//   SCLK     = engine SCLK OR extra SCLK
//   BUSY     = engine busy OR extra-SCLK bit
// All outputs are combinational from flip-flops of one clock domain; SCLK
// runs at half the clock rate. A frame starts two clocks after the Avalon
// write (register pipeline) plus the engine's lead time.
//
// The split into register block, engine and extra-SCLK counter and the pin
// logic above follow the original core's top level. Parameter values are
// this design's own (see the sub-blocks).
module spi_master_serena_if
  import serena_spi_pkg::*;
#(
  parameter int unsigned LEAD_CYCLES  = 2,
  parameter int unsigned PRE_SCLK     = 1,
  parameter int unsigned POST_SCLK    = 1,
  parameter int unsigned EXTRA_PULSES = 8
) (
  input  logic              clk,
  input  logic              rst,            // clock_reset, synchronous, active high
  // Avalon-MM slave
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [DATA_W-1:0] avs_writedata,
  input  logic [BE_W-1:0]   avs_byteenable,
  output logic [DATA_W-1:0] avs_readdata,
  // conduits to the system board
  output logic              cs0_n,
  output logic              cs1_n,
  output logic              sclk,
  output logic              copi,
  input  logic              cipo,
  output logic              busy
);

  logic [DATA_W-1:0] spi_data, spi_read_data;
  spi_len_t          spi_length;
  logic              spi_start, spi_cont, spi_extra_sclk, spi_overwrite_cs, spi_reset;
  logic [NUM_CS-1:0] spi_cs_sel;
  logic              eng_busy, eng_sclk, eng_cs_n, spi_busy, spi_cs;
  logic              extra_sclk, clr_extra_sclk;
  logic              cs_int_n;

  serena_spi_regs u_regs (
    .clk              (clk),
    .rst              (rst),
    .avs_address      (avs_address),
    .avs_read         (avs_read),
    .avs_write        (avs_write),
    .avs_writedata    (avs_writedata),
    .avs_byteenable   (avs_byteenable),
    .avs_readdata     (avs_readdata),
    .spi_busy         (spi_busy),
    .spi_cs           (spi_cs),
    .spi_read_data    (spi_read_data),
    .clr_extra_sclk   (clr_extra_sclk),
    .spi_data         (spi_data),
    .spi_length       (spi_length),
    .spi_start        (spi_start),
    .spi_cont         (spi_cont),
    .spi_extra_sclk   (spi_extra_sclk),
    .spi_overwrite_cs (spi_overwrite_cs),
    .spi_reset        (spi_reset),
    .spi_cs_sel       (spi_cs_sel)
  );

  serena_spi_master #(
    .LEAD_CYCLES (LEAD_CYCLES),
    .PRE_SCLK    (PRE_SCLK),
    .POST_SCLK   (POST_SCLK)
  ) u_engine (
    .clk            (clk),
    .reset          (rst || spi_reset),
    .spi_start      (spi_start),
    .spi_length     (spi_length),
    .spi_write_data (spi_data),
    .spi_cont       (spi_cont),
    .cipo           (cipo),
    .copi           (copi),
    .sclk           (eng_sclk),
    .cs_n           (eng_cs_n),
    .spi_busy       (eng_busy),
    .spi_read_data  (spi_read_data)
  );

  serena_extra_sclk #(
    .PULSES (EXTRA_PULSES)
  ) u_extra (
    .clk            (clk),
    .rst            (rst),
    .spi_reset      (spi_reset),
    .spi_extra_sclk (spi_extra_sclk),
    .extra_sclk     (extra_sclk),
    .clr_extra_sclk (clr_extra_sclk)
  );

  assign cs_int_n = eng_cs_n && !spi_overwrite_cs;
  assign spi_cs   = !cs_int_n;
  assign spi_busy = eng_busy || spi_extra_sclk;
  assign cs0_n    = cs_int_n || !spi_cs_sel[0];
  assign cs1_n    = cs_int_n || !spi_cs_sel[1];
  assign sclk     = eng_sclk || extra_sclk;
  assign busy     = spi_busy;

endmodule

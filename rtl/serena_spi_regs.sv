// serena_spi_regs: Avalon-MM slave and register file of the BEAM39PA SPI master.
//
// Four 32-bit registers (see serena_spi_pkg for the map):
//   0 DATA    write: word to send, starts a transfer; read: last received word
//   1 CTRL    write: cont (2), extra_sclk (3), overwrite_cs (4), reset (7)
//             read : busy (0), cs (1), cont, extra_sclk, overwrite_cs, reset
//   2 CS_SEL  chip-select enable mask, bit 0 = CS0_n, bit 1 = CS1_n
//   3         reads zero
// The byte enables of a DATA write choose the word length: the number of
// enabled bytes is the number of bytes sent, always taken from the top of
// the word, so a single byte is written to bits [31:24].
//
// Pipeline: the Avalon write is registered (stage 1). In the next clock the
// write enables are decoded and the target register is loaded (stage 2); a
// DATA write raises spi_start in that same clock, so the engine sees the
// start pulse two clocks after the Avalon write. Writes to DATA, to the
// cont/extra_sclk/overwrite_cs bits and to CS_SEL are ignored while the
// engine is busy (software polls BUSY); the reset bit can always be written.
// A start pulse is suppressed while the reset bit is set, and a DATA write
// with no byte enabled does not start a transfer. readdata has a fixed read
// latency of one clock; the slave never waits.
//
// The register set, the busy gating of the write enables, the reset bit that
// bypasses that gating, the byte-enable count, and the self-clearing
// extra-SCLK bit follow the original core. The read latency, the rule that a
// start still in the pipeline also counts as busy, and the handling of an
// all-zero byte enable are this design's choices.
module serena_spi_regs
  import serena_spi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,              // bus reset, synchronous, active high
  // Avalon-MM slave
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [DATA_W-1:0] avs_writedata,
  input  logic [BE_W-1:0]   avs_byteenable,
  output logic [DATA_W-1:0] avs_readdata,
  // to and from the SPI engine
  input  logic              spi_busy,         // engine busy or extra-SCLK burst running
  input  logic              spi_cs,           // chip select asserted (status only)
  input  logic [DATA_W-1:0] spi_read_data,
  input  logic              clr_extra_sclk,
  output logic [DATA_W-1:0] spi_data,
  output spi_len_t          spi_length,
  output logic              spi_start,
  output logic              spi_cont,
  output logic              spi_extra_sclk,
  output logic              spi_overwrite_cs,
  output logic              spi_reset,
  output logic [NUM_CS-1:0] spi_cs_sel
);

  // Stage 1: registered bus.
  logic              wr_q;
  spi_addr_e         addr_q;
  logic [DATA_W-1:0] wdata_q;
  logic [BE_W-1:0]   be_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q    <= 1'b0;
      addr_q  <= ADDR_DATA;
      wdata_q <= '0;
      be_q    <= '0;
    end else begin
      wr_q    <= avs_write;
      addr_q  <= spi_addr_e'(avs_address);
      wdata_q <= avs_writedata;
      be_q    <= avs_byteenable;
    end
  end

  // Stage 2: write enables.
  logic     busy_any;
  logic     en_data, en_reset, en_ctrl, en_cs_sel;
  spi_len_t be_count;

  assign busy_any  = spi_busy || spi_start;
  assign en_data   = wr_q && addr_q == ADDR_DATA   && !busy_any;
  assign en_reset  = wr_q && addr_q == ADDR_CTRL;
  assign en_ctrl   = wr_q && addr_q == ADDR_CTRL   && !busy_any;
  assign en_cs_sel = wr_q && addr_q == ADDR_CS_SEL && !busy_any;

  always_comb begin
    be_count = '0;
    for (int i = 0; i < BE_W; i++) be_count = be_count + spi_len_t'(be_q[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      spi_data         <= '0;
      spi_length       <= '0;
      spi_start        <= 1'b0;
      spi_cont         <= 1'b0;
      spi_extra_sclk   <= 1'b0;
      spi_overwrite_cs <= 1'b0;
      spi_reset        <= 1'b0;
      spi_cs_sel       <= '0;
    end else begin
      spi_start <= en_data && be_count != 0 && !spi_reset;
      if (en_data) begin
        spi_data   <= wdata_q;
        spi_length <= be_count;
      end
      if (en_reset) spi_reset <= wdata_q[CTRL_RESET];
      if (en_ctrl) begin
        spi_cont         <= wdata_q[CTRL_CONT];
        spi_overwrite_cs <= wdata_q[CTRL_OVERWRITE_CS];
      end
      // Set by software, cleared by the burst counter (or the soft reset).
      if (clr_extra_sclk)  spi_extra_sclk <= 1'b0;
      else if (en_ctrl)    spi_extra_sclk <= wdata_q[CTRL_EXTRA_SCLK];
      if (spi_reset)       spi_cs_sel <= '0;
      else if (en_cs_sel)  spi_cs_sel <= wdata_q[NUM_CS-1:0];
    end
  end

  // Read side, latency one.
  logic [DATA_W-1:0] ctrl_word;

  always_comb begin
    ctrl_word                    = '0;
    ctrl_word[CTRL_BUSY]         = spi_busy;
    ctrl_word[CTRL_CS]           = spi_cs;
    ctrl_word[CTRL_CONT]         = spi_cont;
    ctrl_word[CTRL_EXTRA_SCLK]   = spi_extra_sclk;
    ctrl_word[CTRL_OVERWRITE_CS] = spi_overwrite_cs;
    ctrl_word[CTRL_RESET]        = spi_reset;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      unique case (spi_addr_e'(avs_address))
        ADDR_DATA:   avs_readdata <= spi_read_data;
        ADDR_CTRL:   avs_readdata <= ctrl_word;
        ADDR_CS_SEL: avs_readdata <= DATA_W'(spi_cs_sel);
        default:     avs_readdata <= '0;
      endcase
    end
  end

  a_rd_wr_excl : assert property (@(posedge clk) disable iff (rst) !(avs_read && avs_write));

endmodule

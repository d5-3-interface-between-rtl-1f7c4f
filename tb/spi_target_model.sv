// spi_target_model: behavioural SPI target standing in for a BEAM39PA in
// simulation. Not synthesizable logic; testbench use only.
//
// It behaves as a plain mode-0 shift register: while cs_n is low it samples
// COPI on every rising SCLK edge into rx_bits (newest bit in bit 0) and
// counts the bits; it presents tx_pattern MSB first on CIPO, the first bit
// when cs_n falls and the next one after every falling SCLK edge. It also
// counts rising SCLK edges seen with cs_n high (pulses outside a frame) and
// the number of cs_n falling edges. The BEAM39PA's own register map is not
// modelled. Testbenches set tx_pattern and clear the counters through
// hierarchical references or clear_counts().
module spi_target_model #(
  parameter int unsigned MAXBITS = 128
) (
  input  logic sclk,
  input  logic cs_n,
  input  logic copi,
  output logic cipo
);

  logic [MAXBITS-1:0] tx_pattern = '0;
  logic [MAXBITS-1:0] rx_bits    = '0;
  int unsigned        rx_count   = 0;
  int unsigned        tx_idx     = 0;
  int unsigned        sclk_outside = 0;
  int unsigned        frames     = 0;

  initial cipo = 1'b0;

  task automatic clear_counts();
    rx_bits      = '0;
    rx_count     = 0;
    sclk_outside = 0;
    frames       = 0;
  endtask

  always @(negedge cs_n) begin
    frames++;
    tx_idx = 0;
    cipo   = tx_pattern[MAXBITS-1];
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      rx_bits = {rx_bits[MAXBITS-2:0], copi};
      rx_count++;
    end else begin
      sclk_outside++;
    end
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      tx_idx++;
      cipo = (tx_idx < MAXBITS) ? tx_pattern[MAXBITS-1-tx_idx] : 1'b0;
    end
  end

endmodule

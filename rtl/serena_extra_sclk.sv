// serena_extra_sclk: burst of extra SCLK pulses for the BEAM39PA.
//
// The BEAM39PA can need SCLK pulses that are not part of a data word (for
// example to bring its serial interface back into step). Software asks for
// them by setting the extra-SCLK bit of the control register. While that bit
// (spi_extra_sclk) is high this block runs a counter whose LSB is the extra
// SCLK, ORed onto the bus SCLK outside this block. When the counter has made
// PULSES full pulses, clr_extra_sclk is raised for one clock and clears the
// control bit; the counter restarts from zero on the next rising edge of the
// bit. spi_reset stops the burst and also requests the bit to be cleared.
//
// Timing: the first SCLK high phase starts two clocks after the bit rises;
// each pulse is one clock high, one clock low. clr_extra_sclk is asserted in
// the clock of the last high phase, so the bit falls together with SCLK.
//
// The counter, the rising-edge restart, the LSB as clock and the clear
// decoder ORed with the reset follow the original core; the number of pulses
// is not given there and is a parameter of this design.
module serena_extra_sclk #(
  parameter int unsigned PULSES = 8   // extra SCLK pulses per command
) (
  input  logic clk,
  input  logic rst,             // bus reset, synchronous
  input  logic spi_reset,       // SPI soft reset from the control register
  input  logic spi_extra_sclk,  // control bit, level
  output logic extra_sclk,
  output logic clr_extra_sclk
);

  localparam logic [7:0] LAST = 8'(2 * PULSES - 1);

  logic       bit_q;
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || spi_reset) begin
      bit_q <= 1'b0;
      cnt   <= '0;
    end else begin
      bit_q <= spi_extra_sclk;
      if (spi_extra_sclk && !bit_q)  cnt <= '0;        // new command
      else if (spi_extra_sclk)       cnt <= cnt + 8'd1;
    end
  end

  // The counter value is only valid once the rising edge has reset it.
  assign extra_sclk     = spi_extra_sclk && bit_q && cnt[0];
  assign clr_extra_sclk = spi_reset || (spi_extra_sclk && bit_q && cnt == LAST);

endmodule

// serena_spi_master: serial engine of the BEAM39PA SPI master.
//
// The BEAM39PA beamformer uses a non-standard SPI framing: besides the data
// bits it expects SCLK pulses while CS is still asserted after the data and
// further SCLK pulses after CS has been released. This engine runs one word
// of 1 to 4 bytes through five phases:
//
//   IDLE -> LEAD (CS asserted, SCLK low, LEAD_CYCLES clocks)
//        -> DATA (8*len bits, MSB first, one SCLK period = 2 clocks per bit)
//        -> PRE  (PRE_SCLK pulses, CS still asserted)   [skipped if spi_cont]
//        -> POST (POST_SCLK pulses, CS released)         [skipped if spi_cont]
//        -> IDLE
//
// With spi_cont set, the engine returns to IDLE straight after the data and
// leaves CS asserted, so that several words form one longer packet (a 15-byte
// packet is sent as 4+4+4+3 bytes, the last word with spi_cont cleared).
// SCLK idles low; COPI changes after the falling SCLK edge and CIPO is
// sampled in the last clock of the high phase (SPI mode 0). The word to send
// is taken from the upper bytes of spi_write_data: a one-byte transfer sends
// bits [31:24]. The received bits are shifted in from the LSB, so after an
// n-byte transfer spi_read_data[8n-1:0] holds them, first bit highest.
//
// Interface: spi_start is a one-clock pulse, accepted only in IDLE.
// spi_busy is high from the clock after spi_start until the engine is back
// in IDLE. reset is synchronous and returns everything to IDLE with CS
// released. SCLK runs at half the clock rate (50 Mbit/s at 100 MHz).
//
// The phase structure, the CS set/clear flip-flop, the continuous-operation
// input and the separate pre/post SCLK counters follow the SPI master block
// of the original core. The SCLK divide ratio, the lead time and the number
// of pre/post pulses are not given there and are parameters of this design.
module serena_spi_master
  import serena_spi_pkg::*;
#(
  parameter int unsigned LEAD_CYCLES = 2,  // clocks between CS falling and first SCLK
  parameter int unsigned PRE_SCLK    = 1,  // SCLK pulses after the data, before CS rises
  parameter int unsigned POST_SCLK   = 1   // SCLK pulses after CS rises
) (
  input  logic              clk,
  input  logic              reset,          // synchronous, active high
  input  logic              spi_start,      // one-clock start pulse
  input  spi_len_t          spi_length,     // 1 .. 4 bytes
  input  logic [DATA_W-1:0] spi_write_data,
  input  logic              spi_cont,       // keep CS asserted after this word
  input  logic              cipo,
  output logic              copi,
  output logic              sclk,
  output logic              cs_n,
  output logic              spi_busy,
  output logic [DATA_W-1:0] spi_read_data
);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_DATA, S_PRE, S_POST} state_e;

  state_e            state;
  logic [7:0]        cnt;        // phase counter (half SCLK periods)
  logic [7:0]        last_cnt;   // last count value of the DATA phase
  logic              cs_active;
  logic              cont_q;
  logic [DATA_W-1:0] tx_sr;
  logic [DATA_W-1:0] rx_sr;

  localparam logic [7:0] LEAD_LAST = 8'(LEAD_CYCLES == 0 ? 0 : LEAD_CYCLES - 1);
  localparam logic [7:0] PRE_LAST  = 8'(2 * PRE_SCLK - 1);
  localparam logic [7:0] POST_LAST = 8'(2 * POST_SCLK - 1);

  // State after the data bits, or after the pre pulses.
  function automatic state_e after_data(input logic cont);
    if (cont)            return S_IDLE;
    else if (PRE_SCLK  != 0) return S_PRE;
    else if (POST_SCLK != 0) return S_POST;
    else                 return S_IDLE;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      cnt       <= '0;
      last_cnt  <= '0;
      cs_active <= 1'b0;
      cont_q    <= 1'b0;
      tx_sr     <= '0;
      rx_sr     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (spi_start) begin
            tx_sr     <= spi_write_data;
            rx_sr     <= '0;
            last_cnt  <= 8'(16 * spi_length - 1);
            cont_q    <= spi_cont;
            cs_active <= 1'b1;
            cnt       <= '0;
            state     <= (LEAD_CYCLES != 0) ? S_LEAD : S_DATA;
          end
        end
        S_LEAD: begin
          if (cnt == LEAD_LAST) begin
            cnt   <= '0;
            state <= S_DATA;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_DATA: begin
          if (cnt[0]) begin
            // End of the SCLK high phase: sample CIPO, present the next bit.
            rx_sr <= {rx_sr[DATA_W-2:0], cipo};
            tx_sr <= {tx_sr[DATA_W-2:0], 1'b0};
          end
          if (cnt == last_cnt) begin
            cnt   <= '0;
            state <= after_data(cont_q);
            if (!cont_q && PRE_SCLK == 0) cs_active <= 1'b0;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_PRE: begin
          if (cnt == PRE_LAST) begin
            cnt       <= '0;
            cs_active <= 1'b0;
            state     <= (POST_SCLK != 0) ? S_POST : S_IDLE;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_POST: begin
          if (cnt == POST_LAST) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign copi          = tx_sr[DATA_W-1];
  assign sclk          = (state == S_DATA || state == S_PRE || state == S_POST) && cnt[0];
  assign cs_n          = !cs_active;
  assign spi_busy      = (state != S_IDLE);
  assign spi_read_data = rx_sr;

  // A start is only meaningful in IDLE, with a length of 1 to 4 bytes.
  a_start_idle : assert property (@(posedge clk) disable iff (reset)
                                  spi_start |-> state == S_IDLE);
  a_start_len  : assert property (@(posedge clk) disable iff (reset)
                                  spi_start |-> spi_length inside {[3'd1:3'd4]});
  // SCLK never pulses while the bus is in its lead phase.
  a_lead_quiet : assert property (@(posedge clk) state == S_LEAD |-> !sclk);

endmodule

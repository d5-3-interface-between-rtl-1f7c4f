// button_debouncer: debounces the board's push button and slide switches.
//
// Each input bit is brought into the clock domain by two flip-flops. A bit's
// output follows its synchronised input only after the input has held the
// new value for STABLE_CYCLES consecutive clocks; any bounce inside that
// window restarts the bit's counter. STABLE_CYCLES is derived from the clock
// frequency and a debounce time of DEBOUNCE_US microseconds.
//
// Interface: rst_n is asynchronous, active low, and sets every output to
// RESET_VALUE (all ones: keys released and switches off both read high on
// the board). Latency from a clean input edge to the output is
// STABLE_CYCLES + 2 clocks.
//
// The block name, the clock-frequency parameter (100 MHz), the active-low
// reset and the data_in/data_out buses come from the FPGA top level of the
// original design; how it debounces, the debounce time and the reset value
// are this design's own choices.
module button_debouncer #(
  parameter int unsigned     CLK_FREQ    = 100_000_000,  // Hz
  parameter int unsigned     DEBOUNCE_US = 10_000,       // required stable time
  parameter int unsigned     NBITS       = 5,
  parameter logic [NBITS-1:0] RESET_VALUE = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NBITS-1:0] data_in,
  output logic [NBITS-1:0] data_out
);

  localparam longint unsigned CYC = longint'(CLK_FREQ) * DEBOUNCE_US / 1_000_000;
  localparam int unsigned STABLE_CYCLES = (CYC < 1) ? 1 : int'(CYC);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [NBITS-1:0] sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= RESET_VALUE;
      sync2 <= RESET_VALUE;
    end else begin
      sync1 <= data_in;
      sync2 <= sync1;
    end
  end

  for (genvar b = 0; b < NBITS; b++) begin : g_bit
    logic [CW-1:0] cnt;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt         <= '0;
        data_out[b] <= RESET_VALUE[b];
      end else if (sync2[b] == data_out[b]) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        cnt         <= '0;
        data_out[b] <= sync2[b];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule

// tb_serena_spi_master_corner: the SPI engine testbench run with corner
// timing parameters: no lead time, no SCLK pulses before CS rises and three
// pulses after it. Same checks as tb_serena_spi_master.
//
// The checks:
// A behavioural SPI target (spi_target_model) is attached to the engine.
// For every word length 1..4 and random data the test checks the bits the
// target received, the word the engine read back from the target, the busy
// time (LEAD + 16*len + 2*PRE + 2*POST clocks), the time CS is asserted
// and the number of SCLK pulses outside the frame. It then checks a
// two-word continuous transfer (CS stays low between the words) and a soft
// reset in the middle of a word.
module tb_serena_spi_master_corner;
  import serena_spi_pkg::*;

  localparam int unsigned LEAD = 0, PRE = 0, POST = 3;

  logic              clk = 1'b0;
  logic              reset;
  logic              spi_start;
  spi_len_t          spi_length;
  logic [DATA_W-1:0] spi_write_data;
  logic              spi_cont;
  logic              cipo, copi, sclk, cs_n, spi_busy;
  logic [DATA_W-1:0] spi_read_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serena_spi_master #(.LEAD_CYCLES(LEAD), .PRE_SCLK(PRE), .POST_SCLK(POST)) dut (.*);

  spi_target_model #(.MAXBITS(128)) target (.sclk(sclk), .cs_n(cs_n), .copi(copi), .cipo(cipo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Counts clocks with busy high and with CS asserted.
  int busy_cycles = 0, cs_cycles = 0, cs_rises = 0;
  logic cs_n_q = 1'b1;
  always @(posedge clk) begin
    if (spi_busy) busy_cycles++;
    if (!cs_n)    cs_cycles++;
    if (cs_n && !cs_n_q) cs_rises++;
    cs_n_q <= cs_n;
  end

  task automatic clear_counts();
    busy_cycles = 0;
    cs_cycles   = 0;
    cs_rises    = 0;
    target.clear_counts();
  endtask

  task automatic start_word(input logic [31:0] data, input int len, input bit cont);
    @(negedge clk);
    spi_write_data = data;
    spi_length     = spi_len_t'(len);
    spi_cont       = cont;
    spi_start      = 1'b1;
    @(negedge clk);
    spi_start      = 1'b0;
  endtask

  task automatic wait_idle();
    while (spi_busy) @(negedge clk);
  endtask

  function automatic logic [31:0] top_bits(input logic [31:0] w, input int len);
    return w >> (32 - 8 * len);
  endfunction

  initial begin
    logic [31:0]  data, resp;
    logic [127:0] pat;
    reset = 1'b1; spi_start = 1'b0; spi_length = '0; spi_write_data = '0; spi_cont = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(cs_n && !spi_busy && !sclk, "idle after reset");

    // One word of each length, twice.
    for (int rep = 0; rep < 2; rep++) begin
      for (int len = 1; len <= 4; len++) begin
        data = $urandom();
        resp = $urandom();
        pat  = {resp, 96'd0};
        target.tx_pattern = pat;
        clear_counts();
        start_word(data, len, 1'b0);
        wait_idle();
        repeat (2) @(negedge clk);
        // Target saw 8*len data bits followed by PRE zero bits.
        check(target.rx_count == 8 * len + PRE,
              $sformatf("len %0d: bits seen by target %0d", len, target.rx_count));
        check(32'(target.rx_bits >> PRE) == top_bits(data, len) || len == 4 && 32'(target.rx_bits >> PRE) == data,
              $sformatf("len %0d: data at target %h, sent %h", len, 32'(target.rx_bits >> PRE), data));
        check(spi_read_data == top_bits(resp, len),
              $sformatf("len %0d: read %h, expected %h", len, spi_read_data, top_bits(resp, len)));
        check(busy_cycles == LEAD + 16 * len + 2 * PRE + 2 * POST,
              $sformatf("len %0d: busy %0d clocks", len, busy_cycles));
        check(cs_cycles == LEAD + 16 * len + 2 * PRE,
              $sformatf("len %0d: CS low %0d clocks", len, cs_cycles));
        check(target.sclk_outside == POST,
              $sformatf("len %0d: %0d SCLK pulses after CS", len, target.sclk_outside));
        check(target.frames == 1 && cs_rises == 1, "one CS frame");
      end
    end

    // Continuous mode: 4 bytes with cont, then 3 bytes without.
    clear_counts();
    data = $urandom();
    resp = $urandom();
    target.tx_pattern = {resp, 96'd0};
    start_word(data, 4, 1'b1);
    wait_idle();
    check(!cs_n, "CS held low after a continuous word");
    check(target.rx_count == 32, "continuous word: no pre pulses");
    check(spi_read_data == resp, "continuous word read back");
    repeat (3) @(negedge clk);
    check(!cs_n, "CS still low while idle in continuous mode");
    start_word(32'hA5C3_F000, 3, 1'b0);
    wait_idle();
    repeat (2) @(negedge clk);
    check(target.frames == 1 && cs_rises == 1, "continuous packet is one CS frame");
    check(target.rx_count == 56 + PRE, "continuous packet bit count");
    check(64'(target.rx_bits >> PRE) == {8'd0, data, 24'hA5C3F0}, "continuous packet data");

    // Soft reset in the middle of a word.
    start_word(32'hFFFF_FFFF, 4, 1'b0);
    repeat (10) @(negedge clk);
    check(spi_busy && !cs_n, "busy during word");
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    check(!spi_busy && cs_n && !sclk, "reset aborts the word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

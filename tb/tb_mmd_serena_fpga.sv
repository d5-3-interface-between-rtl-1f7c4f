// tb_mmd_serena_fpga: end-to-end testbench of the FPGA top level at its
// default parameters (100 MHz clock, 10 ms debounce).
//
// The testbench plays the soft processor: it writes and polls the SPI
// master's registers over Avalon-MM and drives the parallel-port signals.
// Two behavioural SPI targets stand for beamformer ICs on CS0_n and CS1_n.
// One complete control operation is run: reset of the system board through
// the output port, a soft reset of the SPI engine, an extra-SCLK burst, a
// short (2-byte) register access on each chip select, a normal (4-byte)
// word, a long (15-byte) packet in continuous mode, a read-back, an
// overwrite-CS frame, a data write attempted while busy, and a bouncing
// then held key press. Every mechanism is counted and must occur at least
// once.
module tb_mmd_serena_fpga;
  import serena_spi_pkg::*;

  // Default engine timing (see serena_spi_master).
  localparam int unsigned LEAD = 2, PRE = 1, POST = 1, EXTRA = 8;
  localparam int unsigned DEB_CLOCKS = 1_000_000;   // 10 ms at 100 MHz

  logic              main_clk = 1'b0;
  logic              main_reset_n;
  logic [ADDR_W-1:0] avs_address;
  logic              avs_read, avs_write;
  logic [DATA_W-1:0] avs_writedata;
  logic [BE_W-1:0]   avs_byteenable;
  logic [DATA_W-1:0] avs_readdata;
  logic              spi_serena2_sclk, spi_serena2_copi, spi_serena2_cipo;
  logic              spi_serena2_cs0_n, spi_serena2_cs1_n, spi_serena2_busy;
  logic              key1;
  logic [3:0]        sw;
  logic [4:0]        key_sw_db;
  logic [2:0]        pio_out;
  logic [7:2]        pio_led_out;
  logic [31:0]       pio_in;
  logic              pll_locked;
  logic              out_serena_tx_en, out_serena_rx_en, out_serena_reset;
  logic              in_serena_fe_ready;
  logic [7:0]        led;
  logic              cipo0, cipo1;

  int checks = 0, failures = 0, cyc = 0;

  // Mechanism counters.
  int n_short = 0, n_normal = 0, n_long = 0, n_cs0 = 0, n_cs1 = 0, n_cont_hold = 0;
  int n_overwrite = 0, n_extra = 0, n_busy_drop = 0, n_soft_reset = 0;
  int n_bounce_filtered = 0, n_debounced = 0, n_readback = 0;

  always #5 main_clk = ~main_clk;    // 100 MHz
  always @(posedge main_clk) cyc++;

  mmd_serena_fpga dut (.*);

  spi_target_model #(.MAXBITS(160)) t0 (.sclk(spi_serena2_sclk), .cs_n(spi_serena2_cs0_n),
                                        .copi(spi_serena2_copi), .cipo(cipo0));
  spi_target_model #(.MAXBITS(160)) t1 (.sclk(spi_serena2_sclk), .cs_n(spi_serena2_cs1_n),
                                        .copi(spi_serena2_copi), .cipo(cipo1));
  assign spi_serena2_cipo = !spi_serena2_cs0_n ? cipo0 : !spi_serena2_cs1_n ? cipo1 : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge main_clk);
    avs_address = a; avs_writedata = d; avs_byteenable = be; avs_write = 1'b1;
    @(negedge main_clk);
    avs_write = 1'b0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge main_clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge main_clk);
    avs_read = 1'b0;
    d = avs_readdata;
  endtask

  task automatic wait_done();
    logic [31:0] s;
    repeat (3) @(negedge main_clk);
    do rd(ADDR_CTRL, s); while (s[CTRL_BUSY]);
  endtask

  task automatic send_word(input logic [31:0] w, input int n);
    wr(ADDR_DATA, w, 4'(((1 << n) - 1) << (4 - n)));
    wait_done();
  endtask

  task automatic clear_targets();
    t0.clear_counts();
    t1.clear_counts();
  endtask

  initial begin
    logic [31:0]  r, w;
    logic [119:0] long_pkt;
    int           t_start, t_busy;
    main_reset_n = 1'b0;
    avs_address = '0; avs_read = 0; avs_write = 0; avs_writedata = '0; avs_byteenable = '0;
    key1 = 1'b1; sw = 4'hF; pio_out = '0; pio_led_out = '0; pll_locked = 1'b0;
    in_serena_fe_ready = 1'b0;
    repeat (4) @(negedge main_clk);
    main_reset_n = 1'b1;
    pll_locked   = 1'b1;
    repeat (4) @(negedge main_clk);
    check(spi_serena2_cs0_n && spi_serena2_cs1_n && !spi_serena2_busy, "SPI idle after reset");
    check(key_sw_db == 5'h1F, "debounced inputs at reset value");

    // System board reset and TDD enables through the output port; FE ready in.
    pio_out = 3'b100;
    @(negedge main_clk);
    check(out_serena_reset && !out_serena_rx_en && !out_serena_tx_en, "board reset line");
    pio_out = 3'b010;
    in_serena_fe_ready = 1'b1;
    pio_led_out = 6'b101010;
    @(negedge main_clk);
    check(!out_serena_reset && out_serena_rx_en && !out_serena_tx_en, "RX enable line");
    check(pio_in == 32'h1, "front-end ready on input port bit 0");
    check(led == {6'b101010, 1'b1, 1'b1}, "LEDs");
    pio_out = 3'b001;
    @(negedge main_clk);
    check(out_serena_tx_en && !out_serena_rx_en, "TX enable line");

    // Soft reset of the SPI engine, then release.
    wr(ADDR_CTRL, 32'h1 << CTRL_RESET);
    repeat (2) @(negedge main_clk);
    rd(ADDR_CTRL, r);
    if (r[CTRL_RESET]) n_soft_reset++;
    wr(ADDR_CTRL, 32'h0);

    // Extra SCLK pulses with no chip selected.
    clear_targets();
    wr(ADDR_CTRL, 32'h1 << CTRL_EXTRA_SCLK);
    wait_done();
    check(t0.sclk_outside == EXTRA && t0.frames == 0 && t1.frames == 0, "extra SCLK burst");
    if (t0.sclk_outside == EXTRA) n_extra++;

    // Short packets (2 bytes) on each chip select, with read-back.
    for (int cs = 0; cs < 2; cs++) begin
      wr(ADDR_CS_SEL, 32'(1 << cs));
      clear_targets();
      t0.tx_pattern = {16'hA0A0, 144'd0};
      t1.tx_pattern = {16'hB1B1, 144'd0};
      w = $urandom();
      send_word(w, 2);
      rd(ADDR_DATA, r);
      if (cs == 0) begin
        check(t0.frames == 1 && t1.frames == 0, "short packet on CS0 only");
        check(16'(t0.rx_bits >> PRE) == w[31:16], "short packet data at CS0");
        check(r == 32'h0000_A0A0, "short packet read-back CS0");
        if (t0.frames == 1) n_cs0++;
      end else begin
        check(t1.frames == 1 && t0.frames == 0, "short packet on CS1 only");
        check(16'(t1.rx_bits >> PRE) == w[31:16], "short packet data at CS1");
        check(r == 32'h0000_B1B1, "short packet read-back CS1");
        if (t1.frames == 1) n_cs1++;
      end
      n_short++;
      n_readback++;
    end

    // Normal packet (4 bytes) on CS0, timed: busy must be exactly one frame.
    wr(ADDR_CS_SEL, 32'h1);
    clear_targets();
    w = $urandom();
    @(negedge main_clk);
    avs_address = ADDR_DATA; avs_writedata = w; avs_byteenable = 4'hF; avs_write = 1'b1;
    t_start = cyc + 1;
    @(negedge main_clk);
    avs_write = 1'b0;
    // A second write while the first is under way is ignored.
    repeat (6) @(negedge main_clk);
    wr(ADDR_DATA, ~w);
    t_busy = 0;
    while (!spi_serena2_busy) @(negedge main_clk);
    while (spi_serena2_busy) begin
      @(negedge main_clk);
    end
    t_busy = cyc - t_start;
    check(t_busy == 2 + LEAD + 64 + 2 * PRE + 2 * POST,
          $sformatf("write-to-idle %0d clocks", t_busy));
    check(32'(t0.rx_bits >> PRE) == w && t0.frames == 1, "normal packet data");
    if (t0.frames == 1 && 32'(t0.rx_bits >> PRE) == w) begin
      n_normal++;
      n_busy_drop++;
    end
    repeat (5) @(negedge main_clk);
    check(t0.frames == 1 && !spi_serena2_busy, "write during busy did not start a frame");

    // Long packet (15 bytes) on CS1 in continuous mode.
    wr(ADDR_CS_SEL, 32'h2);
    clear_targets();
    long_pkt = {$urandom(), $urandom(), $urandom(), $urandom()};
    wr(ADDR_CTRL, 32'h1 << CTRL_CONT);
    send_word(long_pkt[119:88], 4);
    if (!spi_serena2_cs1_n) n_cont_hold++;
    send_word(long_pkt[87:56], 4);
    send_word(long_pkt[55:24], 4);
    wr(ADDR_CTRL, 32'h0);
    send_word({long_pkt[23:0], 8'h00}, 3);
    check(t1.frames == 1 && t1.rx_count == 120 + PRE, "long packet one frame of 120 bits");
    check(120'(t1.rx_bits >> PRE) == long_pkt, "long packet data");
    if (t1.frames == 1 && 120'(t1.rx_bits >> PRE) == long_pkt) n_long++;

    // Overwrite CS.
    wr(ADDR_CTRL, 32'h1 << CTRL_OVERWRITE_CS);
    repeat (2) @(negedge main_clk);
    check(!spi_serena2_cs1_n && spi_serena2_cs0_n, "overwrite CS asserts CS1");
    if (!spi_serena2_cs1_n) n_overwrite++;
    wr(ADDR_CTRL, 32'h0);
    repeat (2) @(negedge main_clk);
    check(spi_serena2_cs1_n, "overwrite CS released");

    // Key 1: bounces shorter than 10 ms are ignored, a held press gets through.
    for (int k = 0; k < 4; k++) begin
      key1 = ~key1;
      repeat (DEB_CLOCKS / 4) @(negedge main_clk);
    end
    key1 = 1'b1;
    repeat (DEB_CLOCKS / 2) @(negedge main_clk);
    check(key_sw_db[0] == 1'b1, "bouncing key filtered");
    if (key_sw_db[0]) n_bounce_filtered++;
    key1 = 1'b0;
    sw   = 4'b0101;
    repeat (DEB_CLOCKS + 1) @(negedge main_clk);
    check(key_sw_db == 5'b11111, "not yet through one clock before the window ends");
    repeat (2) @(negedge main_clk);
    check(key_sw_db == {4'b0101, 1'b0}, $sformatf("debounced key/switches %b", key_sw_db));
    if (key_sw_db[0] == 1'b0) n_debounced++;

    // Every mechanism must have happened.
    check(n_short > 0,           "mechanism: short packet");
    check(n_normal > 0,          "mechanism: normal packet");
    check(n_long > 0,            "mechanism: long packet");
    check(n_cs0 > 0 && n_cs1 > 0, "mechanism: both chip selects");
    check(n_cont_hold > 0,       "mechanism: continuous CS hold");
    check(n_overwrite > 0,       "mechanism: overwrite CS");
    check(n_extra > 0,           "mechanism: extra SCLK");
    check(n_busy_drop > 0,       "mechanism: write ignored while busy");
    check(n_soft_reset > 0,      "mechanism: soft reset");
    check(n_readback > 0,        "mechanism: read-back");
    check(n_bounce_filtered > 0, "mechanism: bounce filtered");
    check(n_debounced > 0,       "mechanism: debounced press");
    $display("mechanisms: short=%0d normal=%0d long=%0d cs0=%0d cs1=%0d cont=%0d overwrite=%0d extra=%0d busy_drop=%0d soft_reset=%0d readback=%0d bounce=%0d press=%0d",
             n_short, n_normal, n_long, n_cs0, n_cs1, n_cont_hold, n_overwrite, n_extra,
             n_busy_drop, n_soft_reset, n_readback, n_bounce_filtered, n_debounced);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * DEB_CLOCKS) @(posedge main_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

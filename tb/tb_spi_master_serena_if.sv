// tb_spi_master_serena_if: self-checking testbench of the SPI master IP.
//
// The testbench acts as the processor on the Avalon-MM port and polls the
// BUSY bit as firmware would. Two behavioural SPI targets sit on CS0_n and
// CS1_n. Checked: short (2-byte), normal (4-byte) and long (15-byte, sent as
// 4+4+4+3 bytes in continuous mode) packets reach only the selected target
// with the right bits, the received words read back, the start latency and
// busy time of one word, the overwrite-CS bit, the extra-SCLK burst with
// BUSY, and the soft reset.
module tb_spi_master_serena_if;
  import serena_spi_pkg::*;

  localparam int unsigned LEAD = 2, PRE = 1, POST = 1, EXTRA = 8;

  logic              clk = 1'b0;
  logic              rst;
  logic [ADDR_W-1:0] avs_address;
  logic              avs_read, avs_write;
  logic [DATA_W-1:0] avs_writedata;
  logic [BE_W-1:0]   avs_byteenable;
  logic [DATA_W-1:0] avs_readdata;
  logic              cs0_n, cs1_n, sclk, copi, cipo, busy;
  logic              cipo0, cipo1;

  int checks = 0, failures = 0, cyc = 0;
  int busy_cycles = 0, first_busy = -1;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (busy) begin
      busy_cycles++;
      if (first_busy < 0) first_busy = cyc;
    end
  end

  spi_master_serena_if #(
    .LEAD_CYCLES(LEAD), .PRE_SCLK(PRE), .POST_SCLK(POST), .EXTRA_PULSES(EXTRA)
  ) dut (.*);

  spi_target_model #(.MAXBITS(160)) t0 (.sclk(sclk), .cs_n(cs0_n), .copi(copi), .cipo(cipo0));
  spi_target_model #(.MAXBITS(160)) t1 (.sclk(sclk), .cs_n(cs1_n), .copi(copi), .cipo(cipo1));
  assign cipo = !cs0_n ? cipo0 : !cs1_n ? cipo1 : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_byteenable = be; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    d = avs_readdata;
  endtask

  task automatic wait_done();
    logic [31:0] s;
    repeat (3) @(negedge clk);      // let the write reach the engine
    do rd(ADDR_CTRL, s); while (s[CTRL_BUSY]);
  endtask

  task automatic clear_all();
    t0.clear_counts();
    t1.clear_counts();
  endtask

  // Sends n bytes (n <= 4) from the top of w.
  task automatic send_word(input logic [31:0] w, input int n);
    logic [3:0] be;
    be = 4'((1 << n) - 1) << (4 - n);
    wr(ADDR_DATA, w, be);
    wait_done();
  endtask

  initial begin
    logic [31:0]  r, w;
    logic [119:0] long_pkt;
    logic [159:0] pat;
    int           wcyc;
    rst = 1'b1; avs_address = '0; avs_read = 0; avs_write = 0; avs_writedata = '0; avs_byteenable = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(cs0_n && cs1_n && !sclk && !busy, "idle after reset");

    // Short packet (2 bytes) to target 0, read its answer.
    wr(ADDR_CS_SEL, 32'h1);
    pat = {16'hBEEF, 144'd0};
    t0.tx_pattern = pat;
    clear_all();
    send_word(32'h8421_0000, 2);
    check(t0.frames == 1 && t1.frames == 0, "short packet only on CS0");
    check(t0.rx_count == 16 + PRE, "short packet bit count");
    check(16'(t0.rx_bits >> PRE) == 16'h8421, "short packet data");
    check(t0.sclk_outside == POST, "short packet post pulses");
    rd(ADDR_DATA, r);
    check(r == 32'h0000_BEEF, $sformatf("short packet answer %h", r));

    // Normal packet (4 bytes) to target 1; start latency and busy time.
    wr(ADDR_CS_SEL, 32'h2);
    t1.tx_pattern = {32'h0F1E_2D3C, 128'd0};
    clear_all();
    w = $urandom();
    @(negedge clk);
    avs_address = ADDR_DATA; avs_writedata = w; avs_byteenable = 4'hF; avs_write = 1'b1;
    wcyc = cyc + 1;
    busy_cycles = 0; first_busy = -1;
    @(negedge clk);
    avs_write = 1'b0;
    repeat (LEAD + 64 + 2 * PRE + 2 * POST + 10) @(negedge clk);
    check(first_busy == wcyc + 3, $sformatf("BUSY seen %0d clocks after the write", first_busy - wcyc));
    check(busy_cycles == LEAD + 64 + 2 * PRE + 2 * POST, $sformatf("busy %0d clocks", busy_cycles));
    check(t1.frames == 1 && t0.frames == 0, "normal packet only on CS1");
    check(32'(t1.rx_bits >> PRE) == w, "normal packet data");
    rd(ADDR_DATA, r);
    check(r == 32'h0F1E_2D3C, "normal packet answer");

    // Long packet (15 bytes) to target 0: 4+4+4 bytes with cont, then 3.
    wr(ADDR_CS_SEL, 32'h1);
    long_pkt = {$urandom(), $urandom(), $urandom(), $urandom()};
    clear_all();
    wr(ADDR_CTRL, 32'h1 << CTRL_CONT);
    send_word(long_pkt[119:88], 4);
    check(!cs0_n, "CS held between words of a long packet");
    send_word(long_pkt[87:56], 4);
    send_word(long_pkt[55:24], 4);
    wr(ADDR_CTRL, 32'h0);
    send_word({long_pkt[23:0], 8'h00}, 3);
    check(t0.frames == 1 && cs0_n, "long packet is one frame");
    check(t0.rx_count == 120 + PRE, $sformatf("long packet bit count %0d", t0.rx_count));
    check(120'(t0.rx_bits >> PRE) == long_pkt, "long packet data");

    // Overwrite CS: CS asserted with no transfer.
    wr(ADDR_CTRL, 32'h1 << CTRL_OVERWRITE_CS);
    repeat (2) @(negedge clk);
    check(!cs0_n && cs1_n, "overwrite asserts the selected CS");
    rd(ADDR_CTRL, r);
    check(r[CTRL_CS] && r[CTRL_OVERWRITE_CS], "overwrite status");
    wr(ADDR_CTRL, 32'h0);
    repeat (2) @(negedge clk);
    check(cs0_n, "overwrite released");

    // Extra SCLK burst with CS high.
    clear_all();
    busy_cycles = 0;
    wr(ADDR_CTRL, 32'h1 << CTRL_EXTRA_SCLK);
    wait_done();
    check(t0.sclk_outside == EXTRA && t0.frames == 0, $sformatf("extra sclk pulses %0d", t0.sclk_outside));
    check(busy_cycles >= 2 * EXTRA, "busy during extra sclk burst");
    rd(ADDR_CTRL, r);
    check(!r[CTRL_EXTRA_SCLK], "extra sclk bit self-clears");

    // Soft reset in the middle of a word.
    wr(ADDR_DATA, 32'hFFFF_FFFF);
    repeat (12) @(negedge clk);
    check(busy && !cs0_n, "word running");
    wr(ADDR_CTRL, 32'h1 << CTRL_RESET);
    repeat (2) @(negedge clk);      // bit set one clock later, engine reset the next
    check(!busy && cs0_n && cs1_n, "soft reset aborts the word and deselects");
    rd(ADDR_CS_SEL, r);
    check(r == 0, "soft reset clears CS_SEL");
    wr(ADDR_CTRL, 32'h0);

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

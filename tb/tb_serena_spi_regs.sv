// tb_serena_spi_regs: self-checking testbench of the Avalon-MM register file.
//
// The engine side (busy, cs, received word) is driven by the testbench. The
// test checks: the start pulse two clocks after a DATA write, the word and
// the length derived from the byte enables, read-back of every register with
// a read latency of one clock, writes ignored while busy (except the reset
// bit), no start while the reset bit is set or with no byte enabled, the
// extra-SCLK bit cleared by clr_extra_sclk, and CS_SEL cleared by the reset
// bit.
module tb_serena_spi_regs;
  import serena_spi_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic [ADDR_W-1:0] avs_address;
  logic              avs_read, avs_write;
  logic [DATA_W-1:0] avs_writedata;
  logic [BE_W-1:0]   avs_byteenable;
  logic [DATA_W-1:0] avs_readdata;
  logic              spi_busy, spi_cs, clr_extra_sclk;
  logic [DATA_W-1:0] spi_read_data;
  logic [DATA_W-1:0] spi_data;
  spi_len_t          spi_length;
  logic              spi_start, spi_cont, spi_extra_sclk, spi_overwrite_cs, spi_reset;
  logic [NUM_CS-1:0] spi_cs_sel;

  int checks = 0, failures = 0;
  int cyc = 0, starts = 0, last_start_cyc = -1;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (spi_start) begin
      starts++;
      last_start_cyc = cyc;
    end
  end

  serena_spi_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Returns the cycle number of the edge that samples the write.
  task automatic bus_write(input logic [1:0] a, input logic [31:0] d,
                           input logic [3:0] be, output int wcyc);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_byteenable = be; avs_write = 1'b1;
    wcyc = cyc + 1;
    @(negedge clk);
    avs_write = 1'b0; avs_byteenable = '0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    d = avs_readdata;        // valid one clock after the read
  endtask

  function automatic int popcount4(input logic [3:0] be);
    return int'(be[0]) + int'(be[1]) + int'(be[2]) + int'(be[3]);
  endfunction

  initial begin
    int          w;
    logic [31:0] d, r;
    logic [3:0]  be;
    rst = 1'b1; avs_address = '0; avs_read = 0; avs_write = 0; avs_writedata = '0;
    avs_byteenable = '0; spi_busy = 0; spi_cs = 0; clr_extra_sclk = 0; spi_read_data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // DATA writes with every non-empty byte-enable pattern.
    for (int k = 1; k < 16; k++) begin
      be = 4'(k);
      d  = $urandom();
      starts = 0;
      bus_write(ADDR_DATA, d, be, w);
      repeat (3) @(negedge clk);
      check(starts == 1 && last_start_cyc == w + 2,
            $sformatf("be %b: start at +%0d (%0d starts)", be, last_start_cyc - w, starts));
      check(spi_data == d, "data register loaded");
      check(int'(spi_length) == popcount4(be), $sformatf("be %b: length %0d", be, spi_length));
    end

    // No byte enabled: no start.
    starts = 0;
    bus_write(ADDR_DATA, 32'h1234_5678, 4'b0000, w);
    repeat (3) @(negedge clk);
    check(starts == 0, "no start without byte enables");

    // Control and CS_SEL writes and read-back.
    bus_write(ADDR_CTRL, 32'h0000_0014, 4'hF, w);   // cont + overwrite_cs
    bus_write(ADDR_CS_SEL, 32'hFFFF_FFFE, 4'hF, w); // CS1 only
    repeat (2) @(negedge clk);
    check(spi_cont && spi_overwrite_cs && !spi_extra_sclk && !spi_reset, "control bits");
    check(spi_cs_sel == 2'b10, "cs select");
    spi_cs = 1'b1; spi_busy = 1'b0;
    bus_read(ADDR_CTRL, r);
    check(r == 32'h0000_0016, $sformatf("control read %h", r));
    bus_read(ADDR_CS_SEL, r);
    check(r == 32'h0000_0002, $sformatf("cs_sel read %h", r));
    spi_read_data = 32'hCAFE_F00D;
    bus_read(ADDR_DATA, r);
    check(r == 32'hCAFE_F00D, "data read");
    bus_read(ADDR_RSVD, r);
    check(r == 32'h0, "address 3 reads zero");

    // Writes while busy are ignored; the reset bit is not.
    spi_busy = 1'b1;
    starts = 0;
    d = spi_data;
    bus_write(ADDR_DATA, ~d, 4'hF, w);
    bus_write(ADDR_CTRL, 32'h0000_0008, 4'hF, w);
    bus_write(ADDR_CS_SEL, 32'h1, 4'hF, w);
    repeat (3) @(negedge clk);
    check(starts == 0 && spi_data == d, "data write ignored while busy");
    check(spi_cont && spi_overwrite_cs && !spi_extra_sclk, "control write ignored while busy");
    check(spi_cs_sel == 2'b10, "cs_sel write ignored while busy");
    bus_read(ADDR_CTRL, r);
    check(r[CTRL_BUSY], "busy bit reads one");
    bus_write(ADDR_CTRL, 32'h0000_0080, 4'hF, w);
    repeat (2) @(negedge clk);
    check(spi_reset, "reset bit written while busy");
    check(spi_cs_sel == 2'b00, "reset clears cs_sel");
    spi_busy = 1'b0;

    // No start while in reset.
    starts = 0;
    bus_write(ADDR_DATA, 32'h55AA_55AA, 4'hF, w);
    repeat (3) @(negedge clk);
    check(starts == 0, "no start while reset bit set");
    bus_write(ADDR_CTRL, 32'h0, 4'hF, w);
    repeat (2) @(negedge clk);
    check(!spi_reset && !spi_cont && !spi_overwrite_cs, "control cleared");

    // Extra-SCLK bit, cleared by the burst logic.
    bus_write(ADDR_CTRL, 32'h0000_0008, 4'hF, w);
    repeat (2) @(negedge clk);
    check(spi_extra_sclk, "extra sclk bit set");
    clr_extra_sclk = 1'b1;
    @(negedge clk);
    clr_extra_sclk = 1'b0;
    check(!spi_extra_sclk, "extra sclk bit cleared");

    // A second DATA write right behind the first is blocked by the pending start.
    starts = 0;
    @(negedge clk);
    avs_address = ADDR_DATA; avs_writedata = 32'h1111_1111; avs_byteenable = 4'hF; avs_write = 1'b1;
    @(negedge clk);
    avs_writedata = 32'h2222_2222;
    @(negedge clk);
    avs_write = 1'b0;
    spi_busy = 1'b1;                // engine took the first word
    repeat (3) @(negedge clk);
    check(starts == 1 && spi_data == 32'h1111_1111, "back-to-back write: only the first starts");
    spi_busy = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

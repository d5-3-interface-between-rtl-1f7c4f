// tb_serena_extra_sclk: self-checking testbench of the extra-SCLK burst.
//
// The testbench plays the control register: it sets the extra-SCLK bit and
// clears it when clr_extra_sclk is raised. It checks the number of pulses,
// that each pulse is one clock high, the clock at which the burst starts and
// ends, that a second command gives a full burst again, and that the soft
// reset stops a burst at once.
module tb_serena_extra_sclk;

  localparam int unsigned PULSES = 8;

  logic clk = 1'b0;
  logic rst, spi_reset, bit_r;
  logic extra_sclk, clr_extra_sclk;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serena_extra_sclk #(.PULSES(PULSES)) dut (
    .clk(clk), .rst(rst), .spi_reset(spi_reset), .spi_extra_sclk(bit_r),
    .extra_sclk(extra_sclk), .clr_extra_sclk(clr_extra_sclk)
  );

  // Control bit: set by the test, cleared by the block.
  logic set_req = 1'b0;
  always_ff @(posedge clk) begin
    if (rst)                 bit_r <= 1'b0;
    else if (clr_extra_sclk) bit_r <= 1'b0;
    else if (set_req)        bit_r <= 1'b1;
  end

  int pulses = 0, high_clocks = 0, first_high = -1, last_high = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (extra_sclk) begin
      high_clocks++;
      if (first_high < 0) first_high = cyc;
      last_high = cyc;
    end
  end
  always @(posedge extra_sclk) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_burst(output int start_cyc);
    pulses = 0; high_clocks = 0; first_high = -1; last_high = -1;
    @(negedge clk);
    set_req = 1'b1;
    start_cyc = cyc;
    @(negedge clk);
    set_req = 1'b0;
    while (bit_r) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int s;
    rst = 1'b1; spi_reset = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(!extra_sclk && !clr_extra_sclk, "quiet after reset");

    for (int k = 0; k < 2; k++) begin
      run_burst(s);
      check(pulses == PULSES, $sformatf("burst %0d: %0d pulses", k, pulses));
      check(high_clocks == PULSES, $sformatf("burst %0d: %0d high clocks", k, high_clocks));
      // bit rises at edge s+1, SCLK high after edge s+3, seen at edge s+4
      check(first_high == s + 4, $sformatf("burst %0d: first high at +%0d", k, first_high - s));
      check(last_high - first_high == 2 * (PULSES - 1), "burst length in clocks");
      check(!bit_r && !extra_sclk, "bit cleared at the end");
    end

    // Soft reset stops a burst.
    pulses = 0;
    @(negedge clk);
    set_req = 1'b1;
    @(negedge clk);
    set_req = 1'b0;
    repeat (6) @(negedge clk);
    spi_reset = 1'b1;
    @(negedge clk);
    check(!extra_sclk && !bit_r, "soft reset stops the burst");
    spi_reset = 1'b0;
    repeat (10) @(negedge clk);
    check(pulses < PULSES && !extra_sclk, "no pulses after soft reset");

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

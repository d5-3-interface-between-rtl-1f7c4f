// tb_button_debouncer: self-checking testbench of the key/switch debouncer.
//
// Runs with a 1 MHz clock parameter and a 20 us debounce time, so a bit
// must hold for 20 clocks. Checked: outputs at their reset value, a bounce
// train shorter than the window leaves the output unchanged, a clean edge
// reaches the output exactly STABLE + 2 clocks later (two
// synchroniser stages, then STABLE clocks of count), bits are debounced
// independently, and a late bounce restarts the window.
module tb_button_debouncer;

  localparam int unsigned CLK_FREQ = 1_000_000, DEB_US = 20, NB = 5;
  localparam int unsigned STABLE = CLK_FREQ / 1_000_000 * DEB_US;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [NB-1:0] data_in, data_out;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  button_debouncer #(.CLK_FREQ(CLK_FREQ), .DEBOUNCE_US(DEB_US), .NBITS(NB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Clocks from now until data_out[b] equals v (limit 200).
  task automatic clocks_until(input int b, input logic v, output int n);
    n = 0;
    while (data_out[b] !== v && n < 200) begin
      @(negedge clk);
      n++;
    end
  endtask

  initial begin
    int n;
    rst_n = 1'b0; data_in = '1;
    repeat (3) @(negedge clk);
    check(data_out == '1, "reset value");
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // Bounce on bit 0, each level held shorter than the window.
    for (int k = 0; k < 6; k++) begin
      data_in[0] = ~data_in[0];
      repeat (STABLE / 2) @(negedge clk);
    end
    data_in[0] = 1'b1;
    repeat (STABLE + 5) @(negedge clk);
    check(data_out[0] == 1'b1, "short bounces filtered");

    // Clean press of bit 0.
    data_in[0] = 1'b0;
    clocks_until(0, 1'b0, n);
    check(n == STABLE + 2, $sformatf("press latency %0d clocks", n));
    check(data_out[4:1] == '1, "other bits unchanged");

    // Two switches at once, one bouncing late.
    data_in[2] = 1'b0;
    data_in[3] = 1'b0;
    repeat (STABLE - 5) @(negedge clk);
    data_in[3] = 1'b1;            // bounce restarts bit 3's window
    @(negedge clk);
    data_in[3] = 1'b0;
    clocks_until(2, 1'b0, n);
    check(n == STABLE + 2 - (STABLE - 5) - 1, $sformatf("bit 2 latency %0d after bounce point", n));
    check(data_out[3] == 1'b1, "bit 3 still waiting after its bounce");
    clocks_until(3, 1'b0, n);
    check(n == STABLE + 2 - 6, $sformatf("bit 3 remaining %0d", n));
    check(data_out == 5'b10010, $sformatf("final %b", data_out));

    // Release.
    data_in = '1;
    repeat (STABLE + 4) @(negedge clk);
    check(data_out == '1, "all released");

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

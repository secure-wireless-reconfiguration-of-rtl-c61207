// tb_baud_gen: self-checking testbench of the baud-rate generator.
// Runs two instances: a small divisor (1.6 MHz clock, 10 kbit/s: divisor 10)
// and the default 50 MHz / 9600 bit/s (divisor 326). Checks that tick16_o is
// a single-cycle pulse every divisor cycles, and that baud_clk_o has a period
// of 16 ticks with 8 ticks high and 8 low.
module tb_baud_gen;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic tick_a, bclk_a, tick_b, bclk_b;

  baud_gen #(.CLK_FREQ_HZ(1_600_000), .BAUD(10_000)) dut_a (
    .clk_i(clk), .rst_i(rst), .tick16_o(tick_a), .baud_clk_o(bclk_a));
  baud_gen dut_b (.clk_i(clk), .rst_i(rst), .tick16_o(tick_b), .baud_clk_o(bclk_b));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // measures tick spacing and baud-clock edges for one instance
  task automatic measure(input int div, input int n_ticks, input bit which);
    int last_tick, last_edge, c;
    logic prev_b, t, b;
    last_tick = -1; last_edge = -1; c = 0;
    prev_b = which ? bclk_b : bclk_a;
    while (n_ticks > 0) begin
      @(posedge clk);
      c++;
      t = which ? tick_b : tick_a;
      b = which ? bclk_b : bclk_a;
      if (t) begin
        if (last_tick >= 0) check(c - last_tick == div, $sformatf("tick spacing %0d, expected %0d", c - last_tick, div));
        last_tick = c;
        n_ticks--;
      end
      if (b != prev_b) begin
        if (last_edge >= 0) check(c - last_edge == 8 * div, $sformatf("baud_clk half period %0d, expected %0d", c - last_edge, 8 * div));
        last_edge = c;
      end
      prev_b = b;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    measure(10, 200, 1'b0);
    measure(326, 80, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

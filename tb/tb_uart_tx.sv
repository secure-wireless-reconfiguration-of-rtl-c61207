// tb_uart_tx: self-checking testbench of the port-bus UART transmitter.
// 1.6 MHz clock and 10 kbit/s (divisor 10, 160 cycles per bit). The port
// bus is driven with single Wishbone cycles. Checks: bytes written to the
// data port come out on tx_o as 8N1 frames (decoded by a line monitor);
// the start bit lasts exactly 160 cycles and tx_done follows tx_start by
// 1600 cycles less the tick phase (1590..1602); the status port reads busy = 1 / done = 0 during a frame
// and busy = 0 / done = 1 after it; a write while busy is dropped; every
// access is acknowledged.
module tb_uart_tx;
  import gumnut_pkg::*;

  localparam int unsigned CLK = 1_600_000;
  localparam int unsigned BR  = 10_000;
  localparam int unsigned BIT = 160;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic tick, bclk;
  logic cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  byte_t adr = '0, din = '0, dout;
  logic tx, tx_start, tx_busy, tx_done;

  baud_gen #(.CLK_FREQ_HZ(CLK), .BAUD(BR)) u_baud (.clk_i(clk), .rst_i(rst), .tick16_o(tick), .baud_clk_o(bclk));
  uart_tx dut (.clk_i(clk), .rst_i(rst), .tick16_i(tick), .sel_i(1'b1),
               .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr), .dat_i(din),
               .dat_o(dout), .ack_o(ack), .tx_o(tx), .tx_start_o(tx_start),
               .tx_busy_o(tx_busy), .tx_done_o(tx_done));
  uart_line_monitor #(.CLK_FREQ_HZ(CLK), .BAUD(BR)) mon (.clk_i(clk), .rx_i(tx));

  int checks = 0, failures = 0, n_start = 0, cycle = 0;
  int t_start_pulse = 0, t_fall = 0, low_len = 0, frame_len = 0;
  logic tx_q = 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    tx_q <= tx;
    if (!rst && tx_start) begin n_start++; t_start_pulse = cycle; end
    if (!rst && tx_q && !tx) t_fall = cycle;
    if (!rst && !tx_q && tx) low_len = cycle - t_fall;
    if (!rst && tx_done && !$past(tx_done)) frame_len = cycle - t_start_pulse;
  end

  task automatic port(input logic w, input byte_t a, input byte_t d, output byte_t q);
    int n;
    @(posedge clk);
    cyc <= 1'b1; stb <= 1'b1; we <= w; adr <= a; din <= d;
    n = 0;
    do begin @(posedge clk); n++; end while (!ack && n < 10);
    check(ack, "no ack");
    q = dout;
    cyc <= 1'b0; stb <= 1'b0; we <= 1'b0;
  endtask

  initial begin
    byte_t q;
    byte_t sent [$];
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (12 * BIT) @(posedge clk);   // let the monitor settle
    mon.bytes.delete();
    mon.framing_errors = 0;
    port(1'b0, PORT_UART_STATUS, 8'h00, q);
    check(q == 8'h00, $sformatf("idle status %02h", q));
    // 0xFF: the start bit is the only low bit
    port(1'b1, PORT_UART_DATA, 8'hFF, q); sent.push_back(8'hFF);
    port(1'b0, PORT_UART_STATUS, 8'h00, q);
    check(q == 8'h01, $sformatf("status during frame %02h, expected 01", q));
    port(1'b1, PORT_UART_DATA, 8'h12, q);           // dropped: busy
    wait (tx_done);
    repeat (2) @(posedge clk);
    check(low_len == BIT, $sformatf("start bit %0d cycles, expected %0d", low_len, BIT));
    check(frame_len >= 10 * BIT - 10 && frame_len <= 10 * BIT + 2, $sformatf("frame %0d cycles", frame_len));
    port(1'b0, PORT_UART_STATUS, 8'h00, q);
    check(q == 8'h02, $sformatf("status after frame %02h, expected 02", q));
    for (int i = 0; i < 20; i++) begin
      byte_t b;
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'h55 : 8'($urandom());
      port(1'b1, PORT_UART_DATA, b, q); sent.push_back(b);
      port(1'b0, PORT_UART_STATUS, 8'h00, q);
      check(q[1] == 1'b0, "done not cleared by a write");
      while (tx_busy) @(posedge clk);
    end
    repeat (2 * BIT) @(posedge clk);
    check(n_start == 21, $sformatf("%0d frames started, expected 21", n_start));
    check(mon.bytes.size() == sent.size(), $sformatf("%0d bytes on the line, expected %0d", mon.bytes.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < mon.bytes.size(); i++)
      check(mon.bytes[i] == sent[i], $sformatf("byte %0d: %02h expected %02h", i, mon.bytes[i], sent[i]));
    check(mon.framing_errors == 0, "stop bit missing");
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

// tb_uart_rx: self-checking testbench of the UART receiver.
// 1.6 MHz clock and 10 kbit/s (divisor 10, 160 cycles per bit) keep the run
// short. Three transmitter models drive the line in turn: nominal, 3% slow
// and 3% fast. Checks: every byte arrives intact and in order; valid_o rises
// 9.5 bit times after the start edge, within the tick alignment
// (-12..+6 cycles); a frame with a 0 stop bit gives frame_err_o and no byte; a
// low glitch shorter than half a bit is ignored.
module tb_uart_rx;

  localparam int unsigned CLK = 1_600_000;
  localparam int unsigned BR  = 10_000;
  localparam int unsigned BIT = 160;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic tick, bclk, valid, ferr;
  logic [7:0] idata;
  logic tx0, tx1, tx2, line;
  int   which = 0;

  assign line = (which == 0) ? tx0 : (which == 1) ? tx1 : tx2;

  baud_gen #(.CLK_FREQ_HZ(CLK), .BAUD(BR)) u_baud (.clk_i(clk), .rst_i(rst), .tick16_o(tick), .baud_clk_o(bclk));
  uart_rx dut (.clk_i(clk), .rst_i(rst), .tick16_i(tick), .rx_i(line),
               .idata_o(idata), .valid_o(valid), .frame_err_o(ferr));

  uart_host_model #(.CLK_FREQ_HZ(CLK), .BAUD(BR))                     h0 (.clk_i(clk), .tx_o(tx0));
  uart_host_model #(.CLK_FREQ_HZ(CLK), .BAUD(BR), .SKEW_PPM(30000))   h1 (.clk_i(clk), .tx_o(tx1));
  uart_host_model #(.CLK_FREQ_HZ(CLK), .BAUD(BR), .SKEW_PPM(-30000))  h2 (.clk_i(clk), .tx_o(tx2));

  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int n_valid = 0, n_ferr = 0, cycle = 0, t_start = 0;
  logic line_q = 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    line_q <= line;
    if (line_q && !line && t_start < 0) t_start <= cycle;
    if (!rst && valid) begin
      n_valid++;
      if (sent.size() == 0) check(0, $sformatf("unexpected byte %02h", idata));
      else begin
        logic [7:0] e;
        e = sent.pop_front();
        check(idata == e, $sformatf("received %02h expected %02h", idata, e));
      end
      if (which == 0) check(cycle - t_start >= BIT * 19 / 2 - 12 && cycle - t_start <= BIT * 19 / 2 + 6,
                            $sformatf("valid %0d cycles after start edge", cycle - t_start));
      t_start <= -1;
    end
    if (!rst && ferr) begin
      n_ferr++;
      t_start <= -1;
    end
  end

  task automatic send(int h, logic [7:0] b);
    which = h;
    sent.push_back(b);
    t_start = -1;
    case (h)
      0: h0.send_byte(b);
      1: h1.send_byte(b);
      default: h2.send_byte(b);
    endcase
  endtask

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (2 * BIT) @(posedge clk);
    send(0, 8'h00); send(0, 8'hFF); send(0, 8'h55); send(0, 8'hAA);
    for (int i = 0; i < 60; i++) send(i % 3, 8'($urandom()));
    which = 0;
    repeat (BIT) @(posedge clk);
    check(n_valid == 64, $sformatf("%0d bytes received, expected 64", n_valid));
    check(sent.size() == 0, "bytes lost");
    // framing error
    t_start = -1;
    h0.send_bad_stop(8'h3C);
    check(n_ferr == 1, $sformatf("frame errors %0d, expected 1", n_ferr));
    check(n_valid == 64, "byte delivered despite a bad stop bit");
    // glitch rejection
    h0.glitch(BIT / 4);
    repeat (12 * BIT) @(posedge clk);
    check(n_valid == 64 && n_ferr == 1, "glitch produced a byte or an error");
    // still working afterwards
    t_start = -1;
    send(0, 8'h5B);
    repeat (BIT) @(posedge clk);
    check(n_valid == 65, "no byte after glitch");
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

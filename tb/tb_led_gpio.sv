// tb_led_gpio: self-checking testbench of the LED output port.
// Checks: led_status follows writes to the LED port address; reads return
// the register; an access with sel_i = 0 or another address changes
// nothing; load mode shows 8'h80 without losing the register; reset clears
// it; every access is acknowledged in the cycle after the strobe.
module tb_led_gpio;
  import gumnut_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  cfg = 1'b0, sel = 1'b0, cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  byte_t adr = '0, din = '0, dout, leds;

  led_gpio dut (.clk_i(clk), .rst_i(rst), .cfg_mode_i(cfg), .sel_i(sel), .cyc_i(cyc),
                .stb_i(stb), .we_i(we), .adr_i(adr), .dat_i(din), .dat_o(dout),
                .ack_o(ack), .led_status_o(leds));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic port(input logic s, input logic w, input byte_t a, input byte_t d, output byte_t q);
    @(posedge clk);
    sel <= s; cyc <= 1'b1; stb <= 1'b1; we <= w; adr <= a; din <= d;
    @(posedge clk);
    @(posedge clk);
    check(ack == s, $sformatf("ack %0b with sel %0b", ack, s));
    q = dout;
    sel <= 1'b0; cyc <= 1'b0; stb <= 1'b0; we <= 1'b0;
  endtask

  initial begin
    byte_t q, model;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(leds == 8'h00, "LEDs not cleared by reset");
    model = 8'h00;
    for (int i = 0; i < 60; i++) begin
      byte_t v;
      v = 8'($urandom());
      case (i % 4)
        0, 1: begin port(1'b1, 1'b1, PORT_LED, v, q); model = v; end
        2:    port(1'b0, 1'b1, PORT_LED, v, q);            // not selected
        default: port(1'b1, 1'b1, PORT_LED ^ 8'h01, v, q); // other address
      endcase
      @(posedge clk);
      check(leds == model, $sformatf("leds %02h expected %02h", leds, model));
      port(1'b1, 1'b0, PORT_LED, 8'h00, q);
      check(q == model, $sformatf("read %02h expected %02h", q, model));
    end
    port(1'b1, 1'b1, PORT_LED, 8'h05, q);
    cfg <= 1'b1;
    @(posedge clk); @(posedge clk);
    check(leds == 8'h80, $sformatf("load-mode pattern %02h", leds));
    cfg <= 1'b0;
    @(posedge clk); @(posedge clk);
    check(leds == 8'h05, "register lost in load mode");
    rst <= 1'b1;
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(leds == 8'h00, "reset did not clear the LEDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

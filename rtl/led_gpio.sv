// led_gpio: LED output port of the Gumnut system (the GPIO / LED GPIO
// peripheral), driving led_status[7:0].
//
// An 8-bit register on the core's port bus at port address ADDR. An "out"
// to ADDR loads it from dat_i; an "inp" from ADDR reads it back. Accesses
// are acknowledged on the clock edge after the strobe; sel_i from the
// port-bus decoder qualifies the strobe. While the system is in load mode
// (cfg_mode_i = 1) the LEDs show LOAD_PATTERN instead of the register:
// only LED 7 lit, as the document's simulation shows while the program is
// being received. The register is cleared by rst_i, which in the system is
// the core's reset (also held during a load). The address 0x51 and the
// load-mode pattern are inferred from the document's example; the rest is
// this design's choice.
module led_gpio
  import gumnut_pkg::*;
#(
  parameter byte_t ADDR         = PORT_LED,
  parameter byte_t LOAD_PATTERN = 8'h80
) (
  input  logic  clk_i,
  input  logic  rst_i,
  input  logic  cfg_mode_i,
  input  logic  sel_i,
  input  logic  cyc_i,
  input  logic  stb_i,
  input  logic  we_i,
  input  byte_t adr_i,
  input  byte_t dat_i,
  output byte_t dat_o,
  output logic  ack_o,
  output byte_t led_status_o
);

  byte_t led_reg;
  logic  access;

  assign access       = sel_i && cyc_i && stb_i && !ack_o;
  assign led_status_o = cfg_mode_i ? LOAD_PATTERN : led_reg;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      led_reg <= '0;
      ack_o   <= 1'b0;
      dat_o   <= '0;
    end else begin
      ack_o <= access;
      if (access && adr_i == ADDR) begin
        if (we_i) led_reg <= dat_i;
        else      dat_o   <= led_reg;
      end
    end
  end

endmodule

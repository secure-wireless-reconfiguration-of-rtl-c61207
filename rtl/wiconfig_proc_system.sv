// wiconfig_proc_system: receiver side of a wirelessly reconfigurable
// soft-processor system.
//
// A remote transmitter sends a program as ASCII text over a ZigBee serial
// link. This top receives it on zigbee_rx, loads it into the instruction
// memory of an 8-bit Gumnut soft processor and restarts the processor on
// it, so the processor's function can be changed without a cable.
//
//   zigbee_rx -> uart_rx -> instruction_capture -> inst_mem (write port)
//   gumnut --inst bus--> inst_mem (read port)
//   gumnut --data bus--> data_mem
//   gumnut --port bus--> port_bus -> led_gpio (led_status), uart_tx (zigbee_tx)
//   baud_gen -> 16x tick for both UART halves, baud_clock output
//
// While a program is being loaded (between 'X' and 'Y') the core is held in
// reset and led_status shows 8'h80; after 'Y' the core starts at address 0.
// int_req / int_ack are the core's interrupt request and acknowledge. The
// port names are those of the document's top-level schematic. Clock and
// bit-rate defaults are this design's choices. The status nets rx_frame_err,
// load_done, words, unmapped, tx_start, tx_busy and tx_done have no load
// here: the top keeps the schematic's port list, and they are left for
// observation in simulation.
module wiconfig_proc_system
  import gumnut_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 9600
) (
  input  logic       clk_i,
  input  logic       rst_i,
  input  logic       int_req,
  input  logic       zigbee_rx,
  output logic [7:0] led_status,
  output logic       baud_clock,
  output logic       int_ack,
  output logic       zigbee_tx
);

  // ------------------------------------------------------------ UART receive
  logic  tick16;
  byte_t idata;
  logic  rx_valid, rx_frame_err;

  baud_gen #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_baud (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .tick16_o   (tick16),
    .baud_clk_o (baud_clock)
  );

  uart_rx u_rx (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .tick16_i    (tick16),
    .rx_i        (zigbee_rx),
    .idata_o     (idata),
    .valid_o     (rx_valid),
    .frame_err_o (rx_frame_err)
  );

  // ------------------------------------------------------ instruction capture
  logic   im_we, cfg_mode, load_done;
  iaddr_t im_waddr, words;
  inst_t  wiconfig_data;

  instruction_capture u_cap (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .rx_data_i   (idata),
    .rx_valid_i  (rx_valid),
    .im_we_o     (im_we),
    .im_addr_o   (im_waddr),
    .im_wdata_o  (wiconfig_data),
    .cfg_mode_o  (cfg_mode),
    .load_done_o (load_done),
    .words_o     (words)
  );

  logic core_rst;
  assign core_rst = rst_i || cfg_mode;

  // ------------------------------------------------------------------- core
  logic   inst_cyc, inst_stb, inst_ack;
  iaddr_t inst_adr;
  inst_t  inst_dat;
  logic   data_cyc, data_stb, data_we, data_ack;
  byte_t  data_adr, data_wdat, data_rdat;
  logic   port_cyc, port_stb, port_we, port_ack;
  byte_t  port_adr, port_wdat, port_rdat;

  gumnut u_core (
    .clk_i      (clk_i),
    .rst_i      (core_rst),
    .inst_cyc_o (inst_cyc),
    .inst_stb_o (inst_stb),
    .inst_ack_i (inst_ack),
    .inst_adr_o (inst_adr),
    .inst_dat_i (inst_dat),
    .data_cyc_o (data_cyc),
    .data_stb_o (data_stb),
    .data_we_o  (data_we),
    .data_ack_i (data_ack),
    .data_adr_o (data_adr),
    .data_dat_o (data_wdat),
    .data_dat_i (data_rdat),
    .port_cyc_o (port_cyc),
    .port_stb_o (port_stb),
    .port_we_o  (port_we),
    .port_ack_i (port_ack),
    .port_adr_o (port_adr),
    .port_dat_o (port_wdat),
    .port_dat_i (port_rdat),
    .int_req    (int_req),
    .int_ack    (int_ack)
  );

  inst_mem u_im (
    .clk_i   (clk_i),
    .rst_i   (core_rst),
    .we_i    (im_we),
    .waddr_i (im_waddr),
    .wdata_i (wiconfig_data),
    .cyc_i   (inst_cyc),
    .stb_i   (inst_stb),
    .adr_i   (inst_adr),
    .dat_o   (inst_dat),
    .ack_o   (inst_ack)
  );

  data_mem u_dm (
    .clk_i (clk_i),
    .rst_i (core_rst),
    .cyc_i (data_cyc),
    .stb_i (data_stb),
    .we_i  (data_we),
    .adr_i (data_adr),
    .dat_i (data_wdat),
    .dat_o (data_rdat),
    .ack_o (data_ack)
  );

  // --------------------------------------------------------------- port bus
  localparam int unsigned S_UART = 0;
  localparam int unsigned S_LED  = 1;

  logic [1:0]  sel, s_ack;
  logic [15:0] s_dat;
  logic        unmapped;
  byte_t       uart_dat, led_dat;
  logic        tx_start, tx_busy, tx_done;

  assign s_dat = {led_dat, uart_dat};

  port_bus #(
    .N    (2),
    .BASE ({PORT_LED, PORT_UART_DATA}),
    .MASK ({8'hFF, 8'hFE})
  ) u_pbus (
    .clk_i      (clk_i),
    .rst_i      (core_rst),
    .cyc_i      (port_cyc),
    .stb_i      (port_stb),
    .adr_i      (port_adr),
    .ack_o      (port_ack),
    .dat_o      (port_rdat),
    .sel_o      (sel),
    .s_ack_i    (s_ack),
    .s_dat_i    (s_dat),
    .unmapped_o (unmapped)
  );

  uart_tx u_tx (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .tick16_i   (tick16),
    .sel_i      (sel[S_UART]),
    .cyc_i      (port_cyc),
    .stb_i      (port_stb),
    .we_i       (port_we),
    .adr_i      (port_adr),
    .dat_i      (port_wdat),
    .dat_o      (uart_dat),
    .ack_o      (s_ack[S_UART]),
    .tx_o       (zigbee_tx),
    .tx_start_o (tx_start),
    .tx_busy_o  (tx_busy),
    .tx_done_o  (tx_done)
  );

  led_gpio u_led (
    .clk_i        (clk_i),
    .rst_i        (core_rst),
    .cfg_mode_i   (cfg_mode),
    .sel_i        (sel[S_LED]),
    .cyc_i        (port_cyc),
    .stb_i        (port_stb),
    .we_i         (port_we),
    .adr_i        (port_adr),
    .dat_i        (port_wdat),
    .dat_o        (led_dat),
    .ack_o        (s_ack[S_LED]),
    .led_status_o (led_status)
  );

endmodule

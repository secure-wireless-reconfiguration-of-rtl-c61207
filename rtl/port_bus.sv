// port_bus: address decoder and read multiplexer of the Gumnut I/O port bus.
//
// The core's port bus is a Wishbone bus with 8-bit addresses. Slave i is
// selected when (adr_i & MASK[i]) == BASE[i] (BASE and MASK are packed,
// slave 0 in the low byte); sel_o[i] qualifies that slave's strobe. The
// master's ack is the OR of the selected slaves' acks and its read data comes
// from the selected slave. An access that selects no slave is acknowledged
// by the decoder itself on the next clock edge with read data 0, so a
// program that touches an unused port does not hang the core; unmapped_o
// pulses when that happens. The Wishbone port bus is the document's; the
// decoding scheme and the unmapped-access rule are this design's choices.
module port_bus
  import gumnut_pkg::*;
#(
  parameter int unsigned   N    = 2,
  parameter logic [N*8-1:0] BASE = {PORT_LED, PORT_UART_DATA},
  parameter logic [N*8-1:0] MASK = {8'hFF, 8'hFE}
) (
  input  logic          clk_i,
  input  logic          rst_i,
  // from the master
  input  logic          cyc_i,
  input  logic          stb_i,
  input  byte_t         adr_i,
  output logic          ack_o,
  output byte_t         dat_o,
  // to and from the slaves
  output logic [N-1:0]  sel_o,
  input  logic [N-1:0]  s_ack_i,
  input  logic [N*8-1:0] s_dat_i,
  output logic          unmapped_o
);

  logic unm_ack;

  always_comb begin
    dat_o = '0;
    for (int i = 0; i < N; i++) begin
      sel_o[i] = ((adr_i & MASK[i*8 +: 8]) == BASE[i*8 +: 8]);
      if (sel_o[i]) dat_o = s_dat_i[i*8 +: 8];
    end
    ack_o = |(s_ack_i & sel_o) || unm_ack;
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) unm_ack <= 1'b0;
    else       unm_ack <= cyc_i && stb_i && (sel_o == '0) && !unm_ack;
  end

  assign unmapped_o = unm_ack;

  // at most one slave may claim an address
  a_onehot: assert property (@(posedge clk_i) disable iff (rst_i) $onehot0(sel_o));

endmodule

// data_mem: data memory (DM) of the Gumnut core, 256 x 8 bits.
//
// A single-port RAM behind a Wishbone slave on the core's data bus. A write
// strobe (we_i = 1) stores dat_i at adr_i; a read strobe returns mem[adr_i]
// on dat_o. Either way ack_o rises on the clock edge after the strobe and
// drops for a cycle between back-to-back strobes. The size is the
// document's (256 bytes, 8-bit addresses); the one-cycle timing is this
// design's choice. Contents start at zero.
module data_mem
  import gumnut_pkg::*;
#(
  parameter int unsigned ADDR_W = DADDR_W,
  parameter int unsigned WIDTH  = DATA_W
) (
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              cyc_i,
  input  logic              stb_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] adr_i,
  input  logic [WIDTH-1:0]  dat_i,
  output logic [WIDTH-1:0]  dat_o,
  output logic              ack_o
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  logic access;
  assign access = cyc_i && stb_i && !ack_o;

  always_ff @(posedge clk_i) begin
    if (access && we_i) mem[adr_i] <= dat_i;
    dat_o <= mem[adr_i];
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) ack_o <= 1'b0;
    else       ack_o <= access;
  end

endmodule

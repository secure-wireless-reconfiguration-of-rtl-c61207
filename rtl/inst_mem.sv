// inst_mem: instruction memory (IM) of the Gumnut core, 4096 x 18 bits.
//
// A simple dual-port RAM. The write port is driven by the instruction
// capture unit, which loads the program received over the wireless link.
// The read port is a Wishbone slave on the core's instruction bus: a strobe
// at address adr_i returns mem[adr_i] on dat_o together with ack_o on the
// next clock edge (one wait state, as a block RAM with a registered output).
// ack_o drops for a cycle between back-to-back strobes.
// Size follows the document (up to 4096 18-bit instructions); the dual-port
// arrangement and the one-cycle read are this design's choices. Contents
// start at zero, which the core executes as "add r0, r0, 0" (a no-op).
module inst_mem
  import gumnut_pkg::*;
#(
  parameter int unsigned ADDR_W = IADDR_W,
  parameter int unsigned WIDTH  = INST_W
) (
  input  logic              clk_i,
  input  logic              rst_i,
  // load port
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  // Wishbone read port
  input  logic              cyc_i,
  input  logic              stb_i,
  input  logic [ADDR_W-1:0] adr_i,
  output logic [WIDTH-1:0] dat_o,
  output logic              ack_o
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i) begin
    dat_o <= mem[adr_i];
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) ack_o <= 1'b0;
    else       ack_o <= cyc_i && stb_i && !ack_o;
  end

endmodule

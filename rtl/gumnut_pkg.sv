// gumnut_pkg: types and constants shared by the Gumnut receiver-side system.
//
// Holds the instruction-set encoding of the 8-bit Gumnut soft processor
// (18-bit instructions, 12-bit instruction addresses, 8-bit data and port
// addresses), the port-bus address map of the peripherals, the ASCII
// characters of the reconfiguration protocol, and small encoder functions
// that build instruction words (used by testbenches as a tiny assembler).
//
// The instruction set (mnemonics, operand forms, register and flag set) is
// the one described for the Gumnut core. The bit-level field layout is the
// published Gumnut encoding; the document lists the instructions but does not
// print their bit fields. The port addresses are this design's choice, picked
// so that the example program sent by the transmitter drives the LEDs.
package gumnut_pkg;

  localparam int unsigned INST_W  = 18;  // instruction width
  localparam int unsigned IADDR_W = 12;  // 4096 instructions
  localparam int unsigned DATA_W  = 8;   // data and register width
  localparam int unsigned DADDR_W = 8;   // 256 data bytes / 256 ports

  typedef logic [INST_W-1:0]  inst_t;
  typedef logic [IADDR_W-1:0] iaddr_t;
  typedef logic [DATA_W-1:0]  byte_t;

  // Arithmetic / logical function codes (immediate form: inst[16:14],
  // register form: inst[2:0]).
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0, ALU_ADDC = 3'd1, ALU_SUB = 3'd2, ALU_SUBC = 3'd3,
    ALU_AND  = 3'd4, ALU_OR   = 3'd5, ALU_XOR = 3'd6, ALU_MASK = 3'd7
  } alu_fn_e;

  // Shift function codes, inst[1:0].
  typedef enum logic [1:0] {SH_SHL = 2'd0, SH_SHR = 2'd1, SH_ROL = 2'd2, SH_ROR = 2'd3} shift_fn_e;

  // Memory and I/O function codes, inst[15:14].
  typedef enum logic [1:0] {MEM_LDM = 2'd0, MEM_STM = 2'd1, MEM_INP = 2'd2, MEM_OUT = 2'd3} mem_fn_e;

  // Branch function codes, inst[11:10].
  typedef enum logic [1:0] {BR_BZ = 2'd0, BR_BNZ = 2'd1, BR_BC = 2'd2, BR_BNC = 2'd3} br_fn_e;

  // Miscellaneous function codes, inst[10:8].
  typedef enum logic [2:0] {
    MISC_RET = 3'd0, MISC_RETI = 3'd1, MISC_ENAI = 3'd2, MISC_DISI = 3'd3,
    MISC_WAIT = 3'd4, MISC_STBY = 3'd5
  } misc_fn_e;

  // Reset and interrupt vectors.
  localparam iaddr_t RESET_VECTOR = 12'h000;
  localparam iaddr_t INT_VECTOR   = 12'h001;

  // Port-bus address map.
  localparam byte_t PORT_UART_DATA   = 8'h00;  // write: byte to transmit
  localparam byte_t PORT_UART_STATUS = 8'h01;  // read: {6'b0, tx_done, tx_busy}
  localparam byte_t PORT_LED         = 8'h51;  // read/write: LED register

  // Reconfiguration protocol characters.
  localparam byte_t CH_START = 8'h58;  // 'X': enter load mode
  localparam byte_t CH_END   = 8'h59;  // 'Y': leave load mode, run
  localparam byte_t CH_OPEN  = 8'h5B;  // '[': begin an instruction word
  localparam byte_t CH_CLOSE = 8'h5D;  // ']': write the word

  // Encoders for the seven instruction formats.
  function automatic inst_t enc_alu_imm(alu_fn_e fn, logic [2:0] rd, logic [2:0] rs, byte_t imm);
    return {1'b0, fn, rd, rs, imm};
  endfunction

  function automatic inst_t enc_alu_reg(alu_fn_e fn, logic [2:0] rd, logic [2:0] rs, logic [2:0] r2);
    return {4'b1110, rd, rs, r2, 2'b00, fn};
  endfunction

  function automatic inst_t enc_shift(shift_fn_e fn, logic [2:0] rd, logic [2:0] rs, logic [2:0] count);
    return {3'b110, 1'b0, rd, rs, count, 3'b000, fn};
  endfunction

  function automatic inst_t enc_mem(mem_fn_e fn, logic [2:0] rd, logic [2:0] rs, byte_t offset);
    return {2'b10, fn, rd, rs, offset};
  endfunction

  function automatic inst_t enc_jump(logic jsb, iaddr_t addr);
    return {5'b11110, jsb, addr};
  endfunction

  function automatic inst_t enc_branch(br_fn_e fn, byte_t disp);
    return {6'b111110, fn, 2'b00, disp};
  endfunction

  function automatic inst_t enc_misc(misc_fn_e fn);
    return {7'b1111110, fn, 8'h00};
  endfunction

endpackage

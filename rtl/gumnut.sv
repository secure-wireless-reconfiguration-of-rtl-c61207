// gumnut: 8-bit Gumnut soft-processor core with Wishbone instruction, data
// and I/O-port master buses.
//
// Architecture (as described for the Gumnut): 18-bit instructions from an
// instruction memory of up to 4096 words (12-bit PC), 256 bytes of data
// memory, eight 8-bit registers r0..r7 with r0 hard-wired to zero, and two
// condition flags Z and C. Reset clears the PC to 0. The instruction set is
// the arithmetic/logical, shift, memory/I-O, branch, jump and miscellaneous
// groups of the Gumnut table, including interrupts (enai/disi/reti/wait) and
// standby.
//
// Implementation (this design's own): a multi-cycle state machine
//   FETCH  - instruction bus cycle at PC until inst_ack_i, latch IR
//   EXEC   - decode and execute; ALU, shift, branch, jump and misc complete
//   DATA   - data bus cycle for ldm/stm until data_ack_i
//   PORT   - port bus cycle for inp/out until port_ack_i
//   WAIT   - wait/stby: idle until an enabled interrupt request
//   INT    - interrupt entry: save PC, Z and C, disable interrupts, jump to
//            address 1, pulse int_ack for one cycle
// An enabled int_req is taken between instructions. jsb/ret use an internal
// return-address stack of STACK_DEPTH entries that wraps on overflow.
// Each bus uses classic Wishbone single read / single write cycles: cyc and
// stb rise together and stay high, with address and data stable, until the
// slave's ack. With single-cycle-ack slaves an ALU instruction takes 3 clock
// cycles, a memory or I/O instruction 5.
// The register file and flags are cleared at reset (this design's choice so
// that programs start from a known state).
module gumnut
  import gumnut_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic        clk_i,
  input  logic        rst_i,
  // instruction bus
  output logic        inst_cyc_o,
  output logic        inst_stb_o,
  input  logic        inst_ack_i,
  output iaddr_t      inst_adr_o,
  input  inst_t       inst_dat_i,
  // data bus
  output logic        data_cyc_o,
  output logic        data_stb_o,
  output logic        data_we_o,
  input  logic        data_ack_i,
  output byte_t       data_adr_o,
  output byte_t       data_dat_o,
  input  byte_t       data_dat_i,
  // I/O port bus
  output logic        port_cyc_o,
  output logic        port_stb_o,
  output logic        port_we_o,
  input  logic        port_ack_i,
  output byte_t       port_adr_o,
  output byte_t       port_dat_o,
  input  byte_t       port_dat_i,
  // interrupts
  input  logic        int_req,
  output logic        int_ack
);

  localparam int unsigned SP_W = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  typedef enum logic [2:0] {S_FETCH, S_EXEC, S_DATA, S_PORT, S_WAIT, S_INT} state_e;

  state_e         state;
  iaddr_t         pc;
  inst_t          ir;
  byte_t          gpr [8];
  logic           z_flag, c_flag, ie;
  iaddr_t         stack [STACK_DEPTH];
  logic [SP_W-1:0] sp;
  iaddr_t         int_pc;
  logic           int_z, int_c;

  // ---------------------------------------------------------------- decode
  logic is_alui, is_mem, is_shift, is_alur, is_jump, is_branch, is_misc;
  logic [2:0] rd, rs, r2;
  byte_t      imm, rs_val, rd_val, op2, ea;
  alu_fn_e    alu_fn;
  shift_fn_e  shift_fn;
  mem_fn_e    mem_fn;
  br_fn_e     br_fn;
  misc_fn_e   misc_fn;
  logic       br_taken;
  iaddr_t     pc_next, br_target;

  always_comb begin
    is_alui   = (ir[17]    == 1'b0);
    is_mem    = (ir[17:16] == 2'b10);
    is_shift  = (ir[17:15] == 3'b110);
    is_alur   = (ir[17:14] == 4'b1110);
    is_jump   = (ir[17:13] == 5'b11110);
    is_branch = (ir[17:12] == 6'b111110);
    is_misc   = (ir[17:11] == 7'b1111110);
    rd        = ir[13:11];
    rs        = ir[10:8];
    r2        = ir[7:5];
    imm       = ir[7:0];
    alu_fn    = alu_fn_e'(is_alui ? ir[16:14] : ir[2:0]);
    shift_fn  = shift_fn_e'(ir[1:0]);
    mem_fn    = mem_fn_e'(ir[15:14]);
    br_fn     = br_fn_e'(ir[11:10]);
    misc_fn   = misc_fn_e'(ir[10:8]);
    rs_val    = gpr[rs];
    rd_val    = gpr[rd];
    // op2: immediate, second register, or shift count
    if (is_alur)       op2 = gpr[r2];
    else if (is_shift) op2 = {5'd0, ir[7:5]};
    else               op2 = imm;
    ea        = rs_val + imm;   // (rs) +/- offset, modulo 256
    pc_next   = pc + 12'd1;
    br_target = pc_next + {{4{imm[7]}}, imm};
    unique case (br_fn)
      BR_BZ:   br_taken =  z_flag;
      BR_BNZ:  br_taken = !z_flag;
      BR_BC:   br_taken =  c_flag;
      BR_BNC:  br_taken = !c_flag;
      default: br_taken = 1'b0;
    endcase
  end

  byte_t alu_y;
  logic  alu_z, alu_c;

  gumnut_alu u_alu (
    .a        (rs_val),
    .b        (op2),
    .c_in     (c_flag),
    .is_shift (is_shift),
    .alu_fn   (alu_fn),
    .shift_fn (shift_fn),
    .y        (alu_y),
    .z_out    (alu_z),
    .c_out    (alu_c)
  );

  // -------------------------------------------------------------- bus outputs
  always_comb begin
    inst_cyc_o = (state == S_FETCH);
    inst_stb_o = (state == S_FETCH);
    inst_adr_o = pc;
    data_cyc_o = (state == S_DATA);
    data_stb_o = (state == S_DATA);
    data_we_o  = (state == S_DATA) && (mem_fn == MEM_STM);
    data_adr_o = ea;
    data_dat_o = rd_val;
    port_cyc_o = (state == S_PORT);
    port_stb_o = (state == S_PORT);
    port_we_o  = (state == S_PORT) && (mem_fn == MEM_OUT);
    port_adr_o = ea;
    port_dat_o = rd_val;
  end

  // Between instructions: take an enabled interrupt or fetch the next one.
  function automatic state_e after_instr(logic ie_now, logic req);
    return (ie_now && req) ? S_INT : S_FETCH;
  endfunction

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state   <= S_FETCH;
      pc      <= RESET_VECTOR;
      ir      <= '0;
      z_flag  <= 1'b0;
      c_flag  <= 1'b0;
      ie      <= 1'b0;
      sp      <= '0;
      int_pc  <= '0;
      int_z   <= 1'b0;
      int_c   <= 1'b0;
      int_ack <= 1'b0;
      for (int i = 0; i < 8; i++) gpr[i] <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else begin
      int_ack <= 1'b0;
      unique case (state)
        S_FETCH: begin
          if (inst_ack_i) begin
            ir    <= inst_dat_i;
            state <= S_EXEC;
          end
        end

        S_EXEC: begin
          if (is_alui || is_alur || is_shift) begin
            if (rd != 3'd0) gpr[rd] <= alu_y;
            z_flag <= alu_z;
            c_flag <= alu_c;
            pc     <= pc_next;
            state  <= after_instr(ie, int_req);
          end else if (is_mem) begin
            state <= (mem_fn == MEM_LDM || mem_fn == MEM_STM) ? S_DATA : S_PORT;
          end else if (is_jump) begin
            if (ir[12]) begin           // jsb: push return address
              stack[sp] <= pc_next;
              sp        <= sp + 1'b1;
            end
            pc    <= ir[11:0];
            state <= after_instr(ie, int_req);
          end else if (is_branch) begin
            pc    <= br_taken ? br_target : pc_next;
            state <= after_instr(ie, int_req);
          end else if (is_misc) begin
            pc    <= pc_next;
            state <= after_instr(ie, int_req);
            unique case (misc_fn)
              MISC_RET: begin
                pc <= stack[sp - 1'b1];
                sp <= sp - 1'b1;
              end
              MISC_RETI: begin
                pc     <= int_pc;
                z_flag <= int_z;
                c_flag <= int_c;
                ie     <= 1'b1;
                state  <= after_instr(1'b1, int_req);
              end
              MISC_ENAI: ie <= 1'b1;
              MISC_DISI: ie <= 1'b0;
              MISC_WAIT, MISC_STBY: state <= S_WAIT;
              default: ;
            endcase
          end else begin
            // undefined encoding: executes as a no-op
            pc    <= pc_next;
            state <= after_instr(ie, int_req);
          end
        end

        S_DATA: begin
          if (data_ack_i) begin
            if (mem_fn == MEM_LDM && rd != 3'd0) gpr[rd] <= data_dat_i;
            pc    <= pc_next;
            state <= after_instr(ie, int_req);
          end
        end

        S_PORT: begin
          if (port_ack_i) begin
            if (mem_fn == MEM_INP && rd != 3'd0) gpr[rd] <= port_dat_i;
            pc    <= pc_next;
            state <= after_instr(ie, int_req);
          end
        end

        S_WAIT: begin
          if (ie && int_req) state <= S_INT;
        end

        S_INT: begin
          int_pc  <= pc;
          int_z   <= z_flag;
          int_c   <= c_flag;
          ie      <= 1'b0;
          pc      <= INT_VECTOR;
          int_ack <= 1'b1;
          state   <= S_FETCH;
        end

        default: state <= S_FETCH;
      endcase
    end
  end

  // r0 always reads as zero: it is never written, and reset clears it.
  // Wishbone rules: a strobe stays up with a stable address until its ack.
  property p_stb_held(logic stb, logic ack, logic [11:0] adr);
    @(posedge clk_i) disable iff (rst_i) (stb && !ack) |=> (stb && $stable(adr));
  endproperty
  a_inst_held: assert property (p_stb_held(inst_stb_o, inst_ack_i, inst_adr_o));
  a_data_held: assert property (p_stb_held(data_stb_o, data_ack_i, {4'd0, data_adr_o}));
  a_port_held: assert property (p_stb_held(port_stb_o, port_ack_i, {4'd0, port_adr_o}));
  a_r0_zero:   assert property (@(posedge clk_i) disable iff (rst_i) gpr[0] == 8'd0);

endmodule

// tb_gumnut: self-checking testbench of the Gumnut core.
//
// The core runs against behavioural Wishbone slaves: an instruction ROM, a
// data RAM and a port bus that logs every "out" and answers every "inp" with
// (address ^ 8'hA5). All slaves acknowledge one cycle after the strobe. The
// program is assembled here with the encoders of gumnut_pkg and covers:
//   - random arithmetic/logical operations, register and immediate forms,
//     with Z and C observed through conditional branches;
//   - random shifts and rotates;
//   - writes to r0 being ignored, a counted backward branch loop;
//   - ldm/stm with positive and negative offsets, inp;
//   - nested jsb/ret;
//   - interrupts: wait and stby woken by int_req, Z/C restored by reti,
//     a request ignored while interrupts are disabled;
//   - timing: 3 cycles per ALU instruction, 5 per "out".
// Each "out" is compared in order against a list of expected (port, value)
// pairs computed by an independent reference model.
module tb_gumnut;
  import gumnut_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic   inst_cyc, inst_stb, inst_ack;
  iaddr_t inst_adr;
  inst_t  inst_dat;
  logic   data_cyc, data_stb, data_we, data_ack;
  byte_t  data_adr, data_wdat, data_rdat;
  logic   port_cyc, port_stb, port_we, port_ack;
  byte_t  port_adr, port_wdat, port_rdat;
  logic   int_req = 1'b0;
  logic   int_ack;

  gumnut dut (
    .clk_i(clk), .rst_i(rst),
    .inst_cyc_o(inst_cyc), .inst_stb_o(inst_stb), .inst_ack_i(inst_ack),
    .inst_adr_o(inst_adr), .inst_dat_i(inst_dat),
    .data_cyc_o(data_cyc), .data_stb_o(data_stb), .data_we_o(data_we),
    .data_ack_i(data_ack), .data_adr_o(data_adr), .data_dat_o(data_wdat),
    .data_dat_i(data_rdat),
    .port_cyc_o(port_cyc), .port_stb_o(port_stb), .port_we_o(port_we),
    .port_ack_i(port_ack), .port_adr_o(port_adr), .port_dat_o(port_wdat),
    .port_dat_i(port_rdat),
    .int_req(int_req), .int_ack(int_ack)
  );

  // ---------------------------------------------------------------- slaves
  inst_t rom [4096];
  byte_t ram [256];

  always_ff @(posedge clk) begin
    if (rst) begin
      inst_ack <= 1'b0; data_ack <= 1'b0; port_ack <= 1'b0;
    end else begin
      inst_ack <= inst_cyc && inst_stb && !inst_ack;
      data_ack <= data_cyc && data_stb && !data_ack;
      port_ack <= port_cyc && port_stb && !port_ack;
      if (data_cyc && data_stb && !data_ack && data_we) ram[data_adr] <= data_wdat;
    end
    inst_dat  <= rom[inst_adr];
    data_rdat <= ram[data_adr];
    port_rdat <= port_adr ^ 8'hA5;
  end

  // ------------------------------------------------------------- assembler
  typedef struct packed { byte_t port; byte_t value; } ev_t;
  ev_t expected [$];
  int  pc_asm;

  task automatic emit(inst_t i);
    rom[pc_asm] = i;
    pc_asm++;
  endtask

  task automatic expect_out(byte_t port, byte_t value);
    expected.push_back('{port: port, value: value});
  endtask

  // independent reference for the arithmetic, logic and shift instructions
  function automatic logic [9:0] ref_op(logic is_sh, int fn, int a, int b, int cin);
    int y, c;
    c = 0;
    if (!is_sh) begin
      case (fn)
        0: begin y = a + b;        c = (y > 255); end
        1: begin y = a + b + cin;  c = (y > 255); end
        2: begin y = a - b;        c = (a < b); end
        3: begin y = a - b - cin;  c = (a < b + cin); end
        4: y = a & b;
        5: y = a | b;
        6: y = a ^ b;
        default: y = a & (~b);
      endcase
    end else begin
      case (fn)
        0: begin y = a << b; c = (b != 0) ? ((a >> (8 - b)) & 1) : 0; end
        1: begin y = a >> b; c = (b != 0) ? ((a >> (b - 1)) & 1) : 0; end
        2: begin y = ((a << b) | (a >> (8 - b))) & 255; c = (b != 0) ? (y & 1) : 0; end
        default: begin y = ((a >> b) | (a << (8 - b))) & 255; c = (b != 0) ? ((y >> 7) & 1) : 0; end
      endcase
    end
    y = y & 255;
    return {c[0], (y == 0), y[7:0]};
  endfunction

  // observe C and Z: "out" to 0x20 happens iff C = 0, to 0x21 iff Z = 0
  task automatic emit_flag_probe(logic c, logic z);
    emit(enc_branch(BR_BC, 8'd1));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h20));
    emit(enc_branch(BR_BZ, 8'd1));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h21));
    if (!c) expect_out(8'h20, 8'h00);
    if (!z) expect_out(8'h21, 8'h00);
  endtask

  task automatic build_program();
    int a, b, fn, cin, cnt;
    logic [2:0] rd;
    logic [9:0] r;
    logic regform;
    for (int i = 0; i < 4096; i++) rom[i] = enc_jump(1'b0, iaddr_t'(i)); // trap: jump to self
    pc_asm = 0;
    emit(enc_jump(1'b0, 12'd8));                          // 0: reset -> main
    emit(enc_alu_imm(ALU_ADD, 3'd7, 3'd7, 8'd1));         // 1: ISR: r7++
    emit(enc_mem(MEM_OUT, 3'd7, 3'd0, 8'hE0));            // 2: out r7 -> 0xE0
    emit(enc_misc(MISC_RETI));                            // 3: reti
    pc_asm = 8;

    // random arithmetic / logical
    for (int t = 0; t < 60; t++) begin
      a = int'($urandom_range(0, 255));
      b = int'($urandom_range(0, 255));
      if (t < 8) begin a = 8'hF0 + t; b = 8'h10 - (t % 3); end  // carry corners
      fn = int'($urandom_range(0, 7));
      cin = int'($urandom_range(0, 1));
      regform = 1'($urandom_range(0, 1));
      rd = ($urandom_range(0, 9) == 0) ? 3'd0 : 3'd3;
      emit(enc_alu_imm(ALU_ADD, 3'd1, 3'd0, byte_t'(a)));
      emit(enc_alu_imm(ALU_ADD, 3'd2, 3'd0, byte_t'(b)));
      if (cin != 0) emit(enc_alu_imm(ALU_SUB, 3'd6, 3'd0, 8'd1));   // C = 1
      else          emit(enc_alu_imm(ALU_ADD, 3'd6, 3'd0, 8'd0));   // C = 0
      if (regform) emit(enc_alu_reg(alu_fn_e'(fn), rd, 3'd1, 3'd2));
      else         emit(enc_alu_imm(alu_fn_e'(fn), rd, 3'd1, byte_t'(b)));
      r = ref_op(1'b0, fn, a, b, cin);
      emit(enc_mem(MEM_OUT, rd, 3'd0, 8'h10));
      expect_out(8'h10, (rd == 3'd0) ? 8'h00 : r[7:0]);
      emit_flag_probe(r[9], r[8]);
    end

    // random shifts / rotates
    for (int t = 0; t < 40; t++) begin
      a = int'($urandom_range(0, 255));
      fn = int'($urandom_range(0, 3));
      cnt = int'($urandom_range(0, 7));
      emit(enc_alu_imm(ALU_ADD, 3'd1, 3'd0, byte_t'(a)));
      emit(enc_shift(shift_fn_e'(fn), 3'd3, 3'd1, 3'(cnt)));
      emit(enc_mem(MEM_OUT, 3'd3, 3'd0, 8'h12));
      r = ref_op(1'b1, fn, a, cnt, 0);
      expect_out(8'h12, r[7:0]);
      emit_flag_probe(r[9], r[8]);
    end

    // backward branch loop: r4 = 5; do { r4--; out r4 } while (r4 != 0)
    emit(enc_alu_imm(ALU_ADD, 3'd4, 3'd0, 8'd5));
    emit(enc_alu_imm(ALU_SUB, 3'd4, 3'd4, 8'd1));
    emit(enc_mem(MEM_OUT, 3'd4, 3'd0, 8'h30));
    emit(enc_branch(BR_BNZ, 8'hFD));                      // -3
    for (int k = 4; k >= 0; k--) expect_out(8'h30, byte_t'(k));

    // data memory and input port
    emit(enc_alu_imm(ALU_ADD, 3'd1, 3'd0, 8'h40));
    emit(enc_alu_imm(ALU_ADD, 3'd2, 3'd0, 8'h99));
    emit(enc_mem(MEM_STM, 3'd2, 3'd1, 8'd3));             // ram[0x43] = 0x99
    emit(enc_alu_imm(ALU_ADD, 3'd2, 3'd0, 8'h00));
    emit(enc_mem(MEM_LDM, 3'd3, 3'd1, 8'd3));
    emit(enc_mem(MEM_OUT, 3'd3, 3'd0, 8'h13));
    expect_out(8'h13, 8'h99);
    emit(enc_mem(MEM_LDM, 3'd4, 3'd1, 8'hFF));            // (r1) - 1 = 0x3F
    emit(enc_mem(MEM_OUT, 3'd4, 3'd0, 8'h14));
    expect_out(8'h14, 8'h5C);
    emit(enc_mem(MEM_INP, 3'd5, 3'd0, 8'h33));
    emit(enc_mem(MEM_OUT, 3'd5, 3'd0, 8'h15));
    expect_out(8'h15, 8'h33 ^ 8'hA5);
    emit(enc_mem(MEM_LDM, 3'd0, 3'd1, 8'd3));             // load into r0: ignored
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h16));
    expect_out(8'h16, 8'h00);

    // nested subroutines: r6 = ((1) + 2) + 4
    emit(enc_jump(1'b1, 12'd3000));
    emit(enc_mem(MEM_OUT, 3'd6, 3'd0, 8'h40));
    expect_out(8'h40, 8'd7);

    // timing: out, four no-ops, out -> 3*4 + 5 cycles apart
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h50));
    expect_out(8'h50, 8'h00);
    repeat (4) emit(enc_alu_imm(ALU_ADD, 3'd0, 3'd0, 8'd0));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h51));
    expect_out(8'h51, 8'h00);

    // interrupt from wait; flags C = 1, Z = 0 restored by reti
    emit(enc_misc(MISC_ENAI));
    emit(enc_alu_imm(ALU_SUB, 3'd6, 3'd0, 8'd1));         // C = 1, Z = 0
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h60));            // tb raises int_req
    expect_out(8'h60, 8'h00);
    emit(enc_misc(MISC_WAIT));
    expect_out(8'hE0, 8'd1);                              // ISR
    emit(enc_branch(BR_BC, 8'd1));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h62));            // skipped if C restored
    emit(enc_mem(MEM_OUT, 3'd7, 3'd0, 8'h61));
    expect_out(8'h61, 8'd1);

    // request while disabled is ignored
    emit(enc_misc(MISC_DISI));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h63));            // tb holds int_req
    expect_out(8'h63, 8'h00);
    repeat (30) emit(enc_alu_imm(ALU_ADD, 3'd0, 3'd0, 8'd0));
    emit(enc_mem(MEM_OUT, 3'd7, 3'd0, 8'h64));
    expect_out(8'h64, 8'd1);

    // interrupt from standby
    emit(enc_misc(MISC_ENAI));
    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'h65));            // tb raises int_req
    expect_out(8'h65, 8'h00);
    emit(enc_misc(MISC_STBY));
    expect_out(8'hE0, 8'd2);
    emit(enc_mem(MEM_OUT, 3'd7, 3'd0, 8'h66));
    expect_out(8'h66, 8'd2);

    emit(enc_mem(MEM_OUT, 3'd0, 3'd0, 8'hFF));            // end marker
    expect_out(8'hFF, 8'h00);

    // subroutines
    pc_asm = 3000;
    emit(enc_alu_imm(ALU_ADD, 3'd6, 3'd0, 8'd1));
    emit(enc_jump(1'b1, 12'd3010));
    emit(enc_alu_imm(ALU_ADD, 3'd6, 3'd6, 8'd4));
    emit(enc_misc(MISC_RET));
    pc_asm = 3010;
    emit(enc_alu_imm(ALU_ADD, 3'd6, 3'd6, 8'd2));
    emit(enc_misc(MISC_RET));
  endtask

  // ---------------------------------------------------------------- checker
  int checks = 0, failures = 0;
  int cycle = 0, t50 = 0, n_int_ack = 0;
  bit done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst && int_ack) n_int_ack <= n_int_ack + 1;

  always @(posedge clk) begin
    if (!rst && port_stb && port_ack && port_we) begin
      ev_t e;
      if (expected.size() == 0) begin
        check(0, $sformatf("unexpected out %02h <- %02h", port_adr, port_wdat));
      end else begin
        e = expected.pop_front();
        check(e.port == port_adr && e.value == port_wdat,
              $sformatf("out %02h <- %02h, expected %02h <- %02h",
                        port_adr, port_wdat, e.port, e.value));
      end
      if (port_adr == 8'h50) t50 = cycle;
      if (port_adr == 8'h51) check(cycle - t50 == 17, $sformatf("timing: %0d cycles, expected 17", cycle - t50));
      if (port_adr == 8'hFF) done = 1;
    end
  end

  // interrupt stimulus keyed to the program's marker outputs
  initial begin
    forever begin
      @(posedge clk);
      if (port_stb && port_ack && port_we && (port_adr == 8'h60 || port_adr == 8'h65)) begin
        repeat (20) @(posedge clk);
        int_req <= 1'b1;
        while (!int_ack) @(posedge clk);
        int_req <= 1'b0;
      end else if (port_stb && port_ack && port_we && port_adr == 8'h63) begin
        int_req <= 1'b1;
        repeat (60) @(posedge clk);
        int_req <= 1'b0;
      end
    end
  end

  initial begin
    void'($urandom(32'd12345));
    build_program();
    for (int i = 0; i < 256; i++) ram[i] = byte_t'(i * 7);
    ram[8'h3F] = 8'h5C;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    repeat (10) @(posedge clk);
    check(expected.size() == 0, $sformatf("%0d expected outputs missing", expected.size()));
    check(ram[8'h43] == 8'h99, "stm did not write the data RAM");
    check(n_int_ack == 2, $sformatf("int_ack pulses = %0d, expected 2", n_int_ack));
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

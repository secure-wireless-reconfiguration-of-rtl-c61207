// tb_wiconfig_proc_system: end-to-end testbench of the receiver system at
// its default parameters (50 MHz clock, 9600 bit/s link).
//
// A model of the remote transmitter sends programs as text on zigbee_rx; a
// line monitor decodes zigbee_tx. Two reconfigurations are run:
//  1. The example stream XXYX[50800][158C2][005F2]Y. During the load the LEDs
//     must show 8'h80; the instruction memory must then hold 00805 (add r1,
//     r0, 5), 2C851 (out r1 to the LED port) and 2F500 (out r6 to the UART
//     data port); after 'Y' the LEDs must show 8'h05 and a 0x00 byte must
//     come back on zigbee_tx, with tx_done set at the end of its frame. (The
//     example program then runs on through the empty memory and wraps, so
//     it repeats; each repeat clears tx_done with its UART write.)
//  2. A second program, loaded over the first, that uses the data memory,
//     a subroutine, an unmapped input port and interrupts: it sends 'A'
//     (0x41) back over the link, then waits; each int_req pulse runs an
//     interrupt routine that counts on the LEDs.
// Each mechanism is counted and must occur: load-mode entries, memory
// writes, core restarts, LED load pattern, UART frames sent, unmapped port
// accesses, interrupts acknowledged, wait state.
module tb_wiconfig_proc_system;
  import gumnut_pkg::*;

  localparam int unsigned CLK = 50_000_000;
  localparam int unsigned BR  = 9600;

  logic clk = 1'b0, rst = 1'b1;
  always #10 clk = ~clk;   // 50 MHz

  logic       int_req = 1'b0;
  logic       rx_line;
  logic [7:0] led_status;
  logic       baud_clock, int_ack, zigbee_tx;

  wiconfig_proc_system dut (
    .clk_i(clk), .rst_i(rst), .int_req(int_req), .zigbee_rx(rx_line),
    .led_status(led_status), .baud_clock(baud_clock), .int_ack(int_ack),
    .zigbee_tx(zigbee_tx));

  uart_host_model #(.CLK_FREQ_HZ(CLK), .BAUD(BR)) host (.clk_i(clk), .tx_o(rx_line));
  uart_line_monitor #(.CLK_FREQ_HZ(CLK), .BAUD(BR)) mon (.clk_i(clk), .rx_i(zigbee_tx));

  int checks = 0, failures = 0;
  int n_loads = 0, n_imwr = 0, n_restart = 0, n_pattern = 0, n_txframes = 0;
  int n_unmapped = 0, n_intack = 0, n_wait = 0, n_baud_edges = 0, n_txdone = 0;
  logic cfg_q = 1'b0, baud_q = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters, from the design's internal signals
  always @(posedge clk) if (!rst) begin
    cfg_q  <= dut.cfg_mode;
    baud_q <= baud_clock;
    if (dut.cfg_mode && !cfg_q) n_loads++;
    if (!dut.cfg_mode && cfg_q) n_restart++;
    if (dut.im_we) n_imwr++;
    if (dut.cfg_mode && led_status == 8'h80) n_pattern++;
    if (dut.tx_start) n_txframes++;
    if (dut.tx_done && !$past(dut.tx_done)) n_txdone++;
    if (dut.unmapped) n_unmapped++;
    if (int_ack) n_intack++;
    if (dut.u_core.state == 3'd4 && !$past(dut.u_core.state == 3'd4)) n_wait++;
    if (baud_clock != baud_q) n_baud_edges++;
  end

  function automatic string hexdig(int v);
    string h;
    h = "0123456789ABCDEF";
    return h.substr(v, v);
  endfunction

  // one instruction as the transmitter sends it: digits least-significant first
  function automatic string word_str(inst_t w);
    string s;
    logic [19:0] x;
    x = {2'b00, w};
    s = "[";
    for (int k = 0; k < 5; k++) s = {s, hexdig(int'(x[4*k +: 4]))};
    return {s, "]"};
  endfunction

  inst_t prog2 [$];

  task automatic build_prog2();
    prog2 = {};
    prog2.push_back(enc_jump(1'b0, 12'd4));                       // 0
    prog2.push_back(enc_alu_imm(ALU_ADD, 3'd5, 3'd5, 8'd1));      // 1 ISR: r5++
    prog2.push_back(enc_mem(MEM_OUT, 3'd5, 3'd0, PORT_LED));      // 2 LEDs = r5
    prog2.push_back(enc_misc(MISC_RETI));                         // 3
    prog2.push_back(enc_misc(MISC_ENAI));                         // 4
    prog2.push_back(enc_alu_imm(ALU_ADD, 3'd1, 3'd0, 8'h30));     // 5
    prog2.push_back(enc_mem(MEM_STM, 3'd1, 3'd0, 8'h10));         // 6 dm[0x10] = 0x30
    prog2.push_back(enc_mem(MEM_LDM, 3'd2, 3'd0, 8'h10));         // 7 r2 = 0x30
    prog2.push_back(enc_jump(1'b1, 12'd12));                      // 8 jsb 12
    prog2.push_back(enc_mem(MEM_OUT, 3'd3, 3'd0, PORT_UART_DATA));// 9 send r3
    prog2.push_back(enc_misc(MISC_WAIT));                         // 10
    prog2.push_back(enc_jump(1'b0, 12'd10));                      // 11
    prog2.push_back(enc_mem(MEM_INP, 3'd4, 3'd0, 8'h77));         // 12 unmapped: r4 = 0
    prog2.push_back(enc_alu_reg(ALU_ADD, 3'd3, 3'd2, 3'd4));      // 13 r3 = r2 + r4
    prog2.push_back(enc_alu_imm(ALU_ADD, 3'd3, 3'd3, 8'h11));     // 14 r3 = 0x41
    prog2.push_back(enc_misc(MISC_RET));                          // 15
  endtask

  task automatic pulse_int();
    @(posedge clk);
    int_req <= 1'b1;
    while (!int_ack) @(posedge clk);
    int_req <= 1'b0;
    repeat (200) @(posedge clk);
  endtask

  initial begin
    string s;
    repeat (20) @(posedge clk);
    rst <= 1'b0;
    repeat (60000) @(posedge clk);   // longer than one frame: lets the monitor settle
    mon.bytes.delete();
    mon.framing_errors = 0;

    // ---- 1: the example stream
    host.send_string("XXYX[50800][158C2]");
    check(led_status == 8'h80, $sformatf("LEDs during load %02h, expected 80", led_status));
    host.send_string("[005F2]Y");
    check(dut.u_im.mem[0] == 18'h00805, $sformatf("IM[0] = %05h", dut.u_im.mem[0]));
    check(dut.u_im.mem[1] == 18'h2C851, $sformatf("IM[1] = %05h", dut.u_im.mem[1]));
    check(dut.u_im.mem[2] == 18'h2F500, $sformatf("IM[2] = %05h", dut.u_im.mem[2]));
    repeat (2000) @(posedge clk);
    check(led_status == 8'h05, $sformatf("LEDs after the example %02h, expected 05", led_status));
    repeat (12 * 16 * 326) @(posedge clk);
    check(n_txdone >= 1, "tx_done not set after the example program");
    check(mon.bytes.size() >= 1 && mon.bytes[0] == 8'h00, "no 0x00 byte returned on zigbee_tx");

    // ---- 2: reconfigure with a second program
    build_prog2();
    s = "X";
    foreach (prog2[i]) s = {s, word_str(prog2[i])};
    s = {s, "Y"};
    mon.bytes.delete();
    host.send_string(s);
    foreach (prog2[i]) check(dut.u_im.mem[i] == prog2[i], $sformatf("IM[%0d] = %05h expected %05h", i, dut.u_im.mem[i], prog2[i]));
    repeat (12 * 16 * 326) @(posedge clk);
    // frames of the first program still in flight may precede the 'A'
    check(mon.bytes.size() >= 1 && mon.bytes[$] == 8'h41,
          $sformatf("second program: last byte returned %02h, expected 41", mon.bytes.size() ? mon.bytes[$] : 8'h00));
    foreach (mon.bytes[i]) if (i < mon.bytes.size() - 1)
      check(mon.bytes[i] == 8'h00, $sformatf("unexpected byte %02h", mon.bytes[i]));
    check(dut.u_dm.mem[8'h10] == 8'h30, "data memory not written");
    check(led_status == 8'h00, $sformatf("LEDs before interrupts %02h", led_status));
    pulse_int();
    check(led_status == 8'h01, $sformatf("LEDs after 1 interrupt %02h", led_status));
    pulse_int();
    pulse_int();
    check(led_status == 8'h03, $sformatf("LEDs after 3 interrupts %02h", led_status));

    // ---- mechanisms
    check(n_loads == 3, $sformatf("load-mode entries %0d, expected 3", n_loads));
    check(n_restart == 3, $sformatf("core restarts %0d, expected 3", n_restart));
    check(n_imwr == 3 + prog2.size(), $sformatf("IM writes %0d", n_imwr));
    check(n_pattern > 0, "LED load pattern never shown");
    check(n_txframes >= 2, $sformatf("UART frames sent %0d", n_txframes));
    check(n_unmapped >= 1, "no unmapped port access");
    check(n_intack == 3, $sformatf("interrupts acknowledged %0d, expected 3", n_intack));
    check(n_wait >= 3, $sformatf("wait entered %0d times", n_wait));
    check(n_baud_edges > 0, "baud_clock never toggled");
    check(mon.framing_errors == 0, "framing error on zigbee_tx");
    $display("mechanisms: loads=%0d restarts=%0d im_writes=%0d load_pattern_cycles=%0d tx_frames=%0d unmapped=%0d int_acks=%0d waits=%0d",
             n_loads, n_restart, n_imwr, n_pattern, n_txframes, n_unmapped, n_intack, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_port_bus: self-checking testbench of the port-bus decoder.
// Two behavioural slaves (one-cycle ack, read data 0xA0 / 0xB0 plus the low
// address bits) sit behind the default map: slave 0 at 0x00-0x01, slave 1
// at 0x51. Every one of the 256 port addresses is read: the select line,
// the returned data and the ack must match the map, and unmapped addresses
// must be acknowledged by the decoder with data 0 and an unmapped_o pulse.
module tb_port_bus;
  import gumnut_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        cyc = 1'b0, stb = 1'b0, ack, unm;
  byte_t       adr = '0, dout;
  logic [1:0]  sel, s_ack;
  logic [15:0] s_dat;

  port_bus dut (.clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .adr_i(adr),
                .ack_o(ack), .dat_o(dout), .sel_o(sel), .s_ack_i(s_ack),
                .s_dat_i(s_dat), .unmapped_o(unm));

  always_ff @(posedge clk) begin
    if (rst) s_ack <= '0;
    else for (int i = 0; i < 2; i++) s_ack[i] <= cyc && stb && sel[i] && !s_ack[i];
  end
  assign s_dat = {8'hB0 | {6'd0, adr[1:0]}, 8'hA0 | {6'd0, adr[1:0]}};

  int checks = 0, failures = 0, n_unm = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst && unm) n_unm++;

  initial begin
    int n, exp_unm;
    byte_t q, e;
    logic [1:0] esel;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    exp_unm = 0;
    for (int a = 0; a < 256; a++) begin
      esel = (a == 0 || a == 1) ? 2'b01 : (a == 8'h51) ? 2'b10 : 2'b00;
      e = esel[0] ? (8'hA0 | 8'(a & 3)) : esel[1] ? (8'hB1) : 8'h00;
      if (esel == 2'b00) exp_unm++;
      @(posedge clk);
      cyc <= 1'b1; stb <= 1'b1; adr <= 8'(a);
      @(posedge clk);
      #1 check(sel == esel, $sformatf("addr %02h sel %b expected %b", a, sel, esel));
      n = 0;
      do begin @(posedge clk); n++; end while (!ack && n < 8);
      q = dout;
      check(ack && n == 1, $sformatf("addr %02h: ack after %0d cycles", a, n));
      check(q == e, $sformatf("addr %02h read %02h expected %02h", a, q, e));
      cyc <= 1'b0; stb <= 1'b0;
    end
    @(posedge clk);
    check(n_unm == exp_unm, $sformatf("unmapped pulses %0d, expected %0d", n_unm, exp_unm));
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

// tb_inst_mem: self-checking testbench of the 4096 x 18 instruction memory.
// Loads random words through the write port (at random addresses, some
// written twice), reads every written address back over the Wishbone port
// and checks the data and that ack_o is high in the clock cycle right after
// the strobe cycle. Unwritten words must read as zero.
module tb_inst_mem;
  import gumnut_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic we = 1'b0, cyc = 1'b0, stb = 1'b0, ack;
  logic [11:0] waddr = '0, adr = '0;
  logic [17:0] wdata = '0, dat;

  inst_mem dut (.clk_i(clk), .rst_i(rst), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                .cyc_i(cyc), .stb_i(stb), .adr_i(adr), .dat_o(dat), .ack_o(ack));

  int checks = 0, failures = 0;
  logic [17:0] model [int];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wb_read(input logic [11:0] a, output logic [17:0] d, output int lat);
    @(posedge clk);
    cyc <= 1'b1; stb <= 1'b1; adr <= a;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!ack);
    d = dat;
    cyc <= 1'b0; stb <= 1'b0;
  endtask

  initial begin
    logic [17:0] d;
    int lat;
    logic [11:0] a;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 300; i++) begin
      a = (i < 4) ? 12'(i * 1365) : 12'($urandom_range(0, 4095));
      if (i == 299) a = 12'hFFF;
      @(posedge clk);
      we <= 1'b1; waddr <= a; wdata <= 18'($urandom());
      @(posedge clk);
      model[int'(a)] = wdata;
      we <= 1'b0;
    end
    foreach (model[k]) begin
      wb_read(12'(k), d, lat);
      check(d == model[k], $sformatf("addr %03h read %05h expected %05h", k, d, model[k]));
      check(lat == 2, $sformatf("ack latency %0d", lat));
    end
    for (int k = 0; k < 4096; k += 97) if (!model.exists(k)) begin
      wb_read(12'(k), d, lat);
      check(d == 18'd0, $sformatf("unwritten addr %03h reads %05h", k, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
